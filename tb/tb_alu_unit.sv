// tb_alu_unit: sends random ALU requests (every operation, random operands including
// zero divisors) and checks that each result comes back exactly one cycle after its
// request, with the request's tag, and equal to a value computed here.
// The single-cycle latency checked is the design's; the reference results follow the
// MIPS I definitions, and the divide-by-zero result is this implementation's choice.
module tb_alu_unit;
  import mips_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  logic req = 1'b0, req_ready, res_valid, res_deq = 1'b1;
  alu_req_t req_data = '0;
  alu_res_t res_data;
  int checks = 0, failures = 0;
  logic     p_req = 1'b0;
  alu_res_t p_exp;

  alu_unit dut (.*);

  function automatic word_t ref_alu(aluop_t op, word_t a, word_t b);
    logic signed [63:0] s;
    logic [63:0] u;
    s = 64'($signed(a)) * 64'($signed(b));
    u = 64'(a) * 64'(b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_NOR: return ~(a | b);
      OP_SLT: return ($signed(a) < $signed(b)) ? 1 : 0;
      OP_SLTU: return (a < b) ? 1 : 0;
      OP_SLL: return a << (b % 32);
      OP_SRL: return a >> (b % 32);
      OP_SRA: return word_t'($signed(a) >>> (b % 32));
      OP_LUI: return b << 16;
      OP_PASS: return a;
      OP_MULT_HI: return s[63:32];
      OP_MULT_LO: return s[31:0];
      OP_MULTU_HI: return u[63:32];
      OP_MULTU_LO: return u[31:0];
      OP_DIV_LO:  return (b == 0) ? '1 : (a == 32'h80000000 && b == '1) ? a : word_t'($signed(a) / $signed(b));
      OP_DIV_HI:  return (b == 0) ? a : (a == 32'h80000000 && b == '1) ? 0 : word_t'($signed(a) % $signed(b));
      OP_DIVU_LO: return (b == 0) ? '1 : a / b;
      OP_DIVU_HI: return (b == 0) ? a : a % b;
      default: return 0;
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (res_valid !== p_req) begin
        failures++; $display("result not exactly one cycle after request");
      end else if (p_req && res_data !== p_exp) begin
        failures++; $display("tag %0d: got %h/%h expected %h/%h", p_exp.tag, res_data.tag, res_data.value, p_exp.tag, p_exp.value);
      end
    end
    p_req <= req;
    p_exp <= '{tag: req_data.tag, value: ref_alu(req_data.op, req_data.v1, req_data.v2)};
  end

  initial begin
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      req = $urandom_range(0, 4) != 0;
      req_data.tag = 8'($urandom);
      req_data.op  = aluop_t'($urandom_range(0, 20));
      req_data.v1  = ($urandom_range(0, 9) == 0) ? 32'h80000000 : word_t'($urandom);
      case ($urandom_range(0, 5))
        0: req_data.v2 = '0;
        1: req_data.v2 = '1;
        2: req_data.v2 = word_t'($urandom_range(0, 40));
        default: req_data.v2 = word_t'($urandom);
      endcase
      @(negedge clk);
    end
    req = 1'b0;
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
