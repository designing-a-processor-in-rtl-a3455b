// decode_unit: decodes up to two MIPS I instructions per cycle into a 2-way FIFO.
//
// The fetch unit offers one or two fetched instructions (in_valid[0] first,
// in_valid[1] only with in_valid[0]); they are accepted together when the FIFO has
// room for two (in_ready) and are decoded combinationally in the cycle they arrive, so
// they can leave the FIFO in the next cycle. The reorder buffer sees the two oldest
// entries (out_valid/out_inst) and removes 0, 1 or 2 of them per cycle (deq_n).
// Decoding produces the instruction class, ALU/branch/memory operation, source and
// destination register indices (HI/LO as 32/33), the extended immediate or shift
// amount, and for branches and jumps the target address. MULT/MULTU/DIV/DIVU are
// marked muldiv and later occupy two reorder-buffer slots. SYSCALL, BREAK, LWL, LWR
// and unknown opcodes decode to a no-operation. The 2-way FIFO follows the design;
// DEPTH and all encodings are this implementation's choices.
module decode_unit #(
  parameter int DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [1:0]                 in_valid,
  input  mips_pkg::finst_t [1:0]     in_inst,
  output logic                       in_ready,
  output logic [1:0]                 out_valid,
  output mips_pkg::dinst_t [1:0]     out_inst,
  input  logic [1:0]                 deq_n
);
  import mips_pkg::*;
  localparam int AW = $clog2(DEPTH);

  function automatic dinst_t decode(input finst_t f);
    dinst_t d;
    logic [5:0] opc, fn;
    logic [4:0] rs, rt, rd, sh;
    word_t sext, zext, pc4;
    opc  = f.instr[31:26];
    rs   = f.instr[25:21];
    rt   = f.instr[20:16];
    rd   = f.instr[15:11];
    sh   = f.instr[10:6];
    fn   = f.instr[5:0];
    sext = {{16{f.instr[15]}}, f.instr[15:0]};
    zext = {16'd0, f.instr[15:0]};
    pc4  = f.ia + 32'd4;
    d = '0;
    d.ia      = f.ia;
    d.pred_ia = f.pred_ia;
    d.epoch   = f.epoch;
    d.itype   = IT_ALU;
    d.op      = 5'(OP_OR);
    d.src1    = {1'b0, rs};
    d.src2    = {1'b0, rt};
    case (opc)
      6'h00: begin
        d.dest = {1'b0, rd};
        d.dest_v = 1'b1;
        d.src1_v = 1'b1;
        d.src2_v = 1'b1;
        case (fn)
          6'h00, 6'h02, 6'h03: begin
            d.op = (fn == 6'h00) ? 5'(OP_SLL) : (fn == 6'h02) ? 5'(OP_SRL) : 5'(OP_SRA);
            d.src1 = {1'b0, rt};
            d.src2_v = 1'b0;
            d.imm = {27'd0, sh};
          end
          6'h04, 6'h06, 6'h07: begin
            d.op = (fn == 6'h04) ? 5'(OP_SLL) : (fn == 6'h06) ? 5'(OP_SRL) : 5'(OP_SRA);
            d.src1 = {1'b0, rt};
            d.src2 = {1'b0, rs};
          end
          6'h08, 6'h09: begin
            d.itype = IT_BRANCH;
            d.op = 5'(BR_JR);
            d.src2_v = 1'b0;
            d.dest_v = (fn == 6'h09);
          end
          6'h10, 6'h12: begin
            d.op = 5'(OP_PASS);
            d.src1 = (fn == 6'h10) ? REG_HI : REG_LO;
            d.src2_v = 1'b0;
          end
          6'h11, 6'h13: begin
            d.op = 5'(OP_PASS);
            d.dest = (fn == 6'h11) ? REG_HI : REG_LO;
            d.src2_v = 1'b0;
          end
          6'h18: begin d.op = 5'(OP_MULT_HI);  d.muldiv = 1'b1; d.dest = REG_HI; end
          6'h19: begin d.op = 5'(OP_MULTU_HI); d.muldiv = 1'b1; d.dest = REG_HI; end
          6'h1A: begin d.op = 5'(OP_DIV_HI);   d.muldiv = 1'b1; d.dest = REG_HI; end
          6'h1B: begin d.op = 5'(OP_DIVU_HI);  d.muldiv = 1'b1; d.dest = REG_HI; end
          6'h20, 6'h21: d.op = 5'(OP_ADD);
          6'h22, 6'h23: d.op = 5'(OP_SUB);
          6'h24: d.op = 5'(OP_AND);
          6'h25: d.op = 5'(OP_OR);
          6'h26: d.op = 5'(OP_XOR);
          6'h27: d.op = 5'(OP_NOR);
          6'h2A: d.op = 5'(OP_SLT);
          6'h2B: d.op = 5'(OP_SLTU);
          default: begin d.dest_v = 1'b0; d.src1_v = 1'b0; d.src2_v = 1'b0; end
        endcase
      end
      6'h01: begin
        d.itype  = IT_BRANCH;
        d.src1_v = 1'b1;
        d.op     = rt[0] ? 5'(BR_GEZ) : 5'(BR_LTZ);
        d.imm    = pc4 + {sext[29:0], 2'b00};
        d.dest   = 6'd31;
        d.dest_v = rt[4];
      end
      6'h02, 6'h03: begin
        d.itype  = IT_BRANCH;
        d.op     = 5'(BR_J);
        d.imm    = {pc4[31:28], f.instr[25:0], 2'b00};
        d.dest   = 6'd31;
        d.dest_v = opc[0];
      end
      6'h04, 6'h05, 6'h06, 6'h07: begin
        d.itype  = IT_BRANCH;
        d.src1_v = 1'b1;
        d.src2_v = !opc[1];
        d.op     = (opc == 6'h04) ? 5'(BR_EQ) : (opc == 6'h05) ? 5'(BR_NE) :
                   (opc == 6'h06) ? 5'(BR_LEZ) : 5'(BR_GTZ);
        d.imm    = pc4 + {sext[29:0], 2'b00};
      end
      6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E, 6'h0F: begin
        d.src1_v = (opc != 6'h0F);
        d.dest   = {1'b0, rt};
        d.dest_v = 1'b1;
        d.imm    = (opc >= 6'h0C && opc <= 6'h0E) ? zext : sext;
        case (opc)
          6'h0A:   d.op = 5'(OP_SLT);
          6'h0B:   d.op = 5'(OP_SLTU);
          6'h0C:   d.op = 5'(OP_AND);
          6'h0D:   d.op = 5'(OP_OR);
          6'h0E:   d.op = 5'(OP_XOR);
          6'h0F:   d.op = 5'(OP_LUI);
          default: d.op = 5'(OP_ADD);
        endcase
      end
      6'h20, 6'h21, 6'h23, 6'h24, 6'h25: begin
        d.itype  = IT_LOAD;
        d.src1_v = 1'b1;
        d.imm    = sext;
        d.dest   = {1'b0, rt};
        d.dest_v = 1'b1;
        d.op     = {2'b00, !opc[2], (opc[1:0] == 2'b11) ? MS_WORD : (opc[0] ? MS_HALF : MS_BYTE)};
      end
      6'h28, 6'h29, 6'h2B: begin
        d.itype  = IT_STORE;
        d.src1_v = 1'b1;
        d.src2_v = 1'b1;
        d.imm    = sext;
        d.op     = {2'b00, 1'b0, (opc[1:0] == 2'b11) ? MS_WORD : (opc[0] ? MS_HALF : MS_BYTE)};
      end
      default: ;
    endcase
    if (d.dest == '0) d.dest_v = 1'b0;
    return d;
  endfunction

  dinst_t        q [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [AW:0]   cnt;
  logic [1:0]    n_in, n_out;

  assign in_ready = (cnt <= (AW+1)'(DEPTH - 2));
  assign n_in     = (in_ready && in_valid[0]) ? (in_valid[1] ? 2'd2 : 2'd1) : 2'd0;
  assign out_valid = {cnt >= 2, cnt >= 1};
  assign out_inst[0] = q[rp];
  assign out_inst[1] = q[AW'(rp + 1'b1)];
  assign n_out = ((AW+1)'(deq_n) > cnt) ? 2'(cnt) : deq_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
    end else begin
      rp  <= rp + AW'(n_out);
      wp  <= wp + AW'(n_in);
      cnt <= cnt + (AW+1)'(n_in) - (AW+1)'(n_out);
    end
  end

  always_ff @(posedge clk) begin
    if (n_in != 0) q[wp] <= decode(in_inst[0]);
    if (n_in == 2) q[AW'(wp + 1'b1)] <= decode(in_inst[1]);
  end

  a_deq_ok: assert property (@(posedge clk) disable iff (!rst_n) (AW+1)'(deq_n) <= cnt);
endmodule
