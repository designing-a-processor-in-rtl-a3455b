// alu_unit: single-cycle tagged ALU with a result FIFO.
//
// Takes one request per cycle (req/req_data, accepted while req_ready), computes the
// result combinationally and enqueues {tag, value} into a 2-entry output FIFO, so a
// result is available to the reorder buffer the cycle after the request. The tag is
// returned unchanged. Multiplies and divides are split into a HI and a LO half (two
// requests, one per reorder-buffer slot). Signed ADD/SUB do not trap on overflow.
// Division by zero gives quotient all-ones and remainder equal to the dividend.
// Single-cycle operation, the result FIFO and tag return follow the design; the
// overflow and divide-by-zero behaviour are this implementation's choices.
module alu_unit (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req,
  input  mips_pkg::alu_req_t  req_data,
  output logic                req_ready,
  output logic                res_valid,
  output mips_pkg::alu_res_t  res_data,
  input  logic                res_deq
);
  import mips_pkg::*;

  function automatic word_t compute(input aluop_t op, input word_t a, input word_t b);
    logic [63:0] ps, pu;
    word_t q, r;
    ps = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b});
    pu = {32'd0, a} * {32'd0, b};
    case (op)
      OP_ADD:      return a + b;
      OP_SUB:      return a - b;
      OP_AND:      return a & b;
      OP_OR:       return a | b;
      OP_XOR:      return a ^ b;
      OP_NOR:      return ~(a | b);
      OP_SLT:      return {31'd0, $signed(a) < $signed(b)};
      OP_SLTU:     return {31'd0, a < b};
      OP_SLL:      return a << b[4:0];
      OP_SRL:      return a >> b[4:0];
      OP_SRA:      return word_t'($signed(a) >>> b[4:0]);
      OP_LUI:      return {b[15:0], 16'd0};
      OP_PASS:     return a;
      OP_MULT_HI:  return ps[63:32];
      OP_MULT_LO:  return ps[31:0];
      OP_MULTU_HI: return pu[63:32];
      OP_MULTU_LO: return pu[31:0];
      OP_DIV_HI, OP_DIV_LO: begin
        if (b == '0) begin
          q = '1; r = a;
        end else if (a == 32'h8000_0000 && b == '1) begin
          q = a; r = '0;
        end else begin
          q = word_t'($signed(a) / $signed(b));
          r = word_t'($signed(a) % $signed(b));
        end
        return (op == OP_DIV_HI) ? r : q;
      end
      OP_DIVU_HI, OP_DIVU_LO: begin
        if (b == '0) begin
          q = '1; r = a;
        end else begin
          q = a / b;
          r = a % b;
        end
        return (op == OP_DIVU_HI) ? r : q;
      end
      default:     return '0;
    endcase
  endfunction

  alu_res_t res_in;
  logic     full;

  assign res_in.tag   = req_data.tag;
  assign res_in.value = compute(req_data.op, req_data.v1, req_data.v2);
  assign req_ready    = !full;

  sync_fifo #(.W($bits(alu_res_t)), .DEPTH(2)) u_res (
    .clk, .rst_n,
    .enq(req && !full), .enq_data(res_in), .full(full),
    .deq_valid(res_valid), .deq_data(res_data), .deq(res_deq)
  );
endmodule
