// tb_decode_unit: checks the decoded fields of representative MIPS I instructions
// (register ALU, immediate ALU, shifts, LUI, loads, stores, conditional branches,
// jumps and links, MULT/DIV, MFHI/MTLO, writes to r0) against hand-derived
// expectations, and the 2-way FIFO: two instructions in per cycle, visible the next
// cycle, removed one or two at a time in order, and in_ready dropping when fewer than
// two entries are free.
// The two-way FIFO is the design's; the decoded record checked here is this
// implementation's own format.
module tb_decode_unit;
  import mips_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] in_valid = '0, out_valid, deq_n = '0;
  finst_t [1:0] in_inst = '0;
  logic in_ready;
  dinst_t [1:0] out_inst;
  int checks = 0, failures = 0;

  decode_unit #(.DEPTH(4)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // push one instruction, wait a cycle, look at the head and remove it
  task automatic dec1(input word_t ia, input word_t ins, output dinst_t d);
    in_valid = 2'b01;
    in_inst[0] = '{ia: ia, pred_ia: ia + 4, epoch: 6'd3, instr: ins};
    @(negedge clk);
    in_valid = '0;
    d = out_inst[0];
    chk(out_valid[0] && d.ia == ia && d.epoch == 6'd3 && d.pred_ia == ia + 4, "fields carried");
    deq_n = 2'd1;
    @(negedge clk);
    deq_n = 2'd0;
  endtask

  initial begin
    dinst_t d;
    @(negedge clk) rst_n = 1'b1;
    // addu r3, r1, r2
    dec1(32'h100, 32'h00221821, d);
    chk(d.itype == IT_ALU && d.op == 5'(OP_ADD) && d.src1_v && d.src1 == 1 && d.src2_v &&
        d.src2 == 2 && d.dest_v && d.dest == 3, "addu");
    // slt r4, r5, r6
    dec1(32'h104, 32'h00A6202A, d);
    chk(d.op == 5'(OP_SLT) && d.src1 == 5 && d.src2 == 6 && d.dest == 4, "slt");
    // addiu r7, r8, -4
    dec1(32'h108, 32'h2507FFFC, d);
    chk(d.op == 5'(OP_ADD) && d.src1 == 8 && !d.src2_v && d.imm == 32'hFFFFFFFC && d.dest == 7, "addiu");
    // andi r7, r8, 0x8000 (zero extended)
    dec1(32'h10C, 32'h31078000, d);
    chk(d.op == 5'(OP_AND) && !d.src2_v && d.imm == 32'h00008000, "andi");
    // sll r1, r2, 5
    dec1(32'h110, 32'h00020940, d);
    chk(d.op == 5'(OP_SLL) && d.src1 == 2 && !d.src2_v && d.imm == 5 && d.dest == 1, "sll");
    // srav r1, r2, r3  (value r2 shifted by r3)
    dec1(32'h114, 32'h00620807, d);
    chk(d.op == 5'(OP_SRA) && d.src1 == 2 && d.src2_v && d.src2 == 3 && d.dest == 1, "srav");
    // lui r9, 0x1234
    dec1(32'h118, 32'h3C091234, d);
    chk(d.op == 5'(OP_LUI) && !d.src1_v && d.imm[15:0] == 16'h1234 && d.dest == 9, "lui");
    // lw r5, -8(r6)
    dec1(32'h11C, 32'h8CC5FFF8, d);
    chk(d.itype == IT_LOAD && d.src1 == 6 && d.imm == 32'hFFFFFFF8 && d.dest == 5 &&
        d.op == {2'b00, 1'b1, MS_WORD}, "lw");
    // lbu r5, 3(r6)
    dec1(32'h120, 32'h90C50003, d);
    chk(d.itype == IT_LOAD && d.op == {2'b00, 1'b0, MS_BYTE}, "lbu");
    // sh r5, 2(r6)
    dec1(32'h124, 32'hA4C50002, d);
    chk(d.itype == IT_STORE && d.src1 == 6 && d.src2_v && d.src2 == 5 && !d.dest_v &&
        d.op[1:0] == MS_HALF && d.imm == 2, "sh");
    // beq r1, r2, +3  at 0x128: target 0x12C + 12
    dec1(32'h128, 32'h10220003, d);
    chk(d.itype == IT_BRANCH && d.op == 5'(BR_EQ) && d.src1 == 1 && d.src2 == 2 &&
        d.imm == 32'h138 && !d.dest_v, "beq");
    // bgtz r4, -2 at 0x12C: target 0x130 - 8
    dec1(32'h12C, 32'h1C80FFFE, d);
    chk(d.op == 5'(BR_GTZ) && d.src1 == 4 && !d.src2_v && d.imm == 32'h128, "bgtz");
    // bgezal r4, +1 at 0x130
    dec1(32'h130, 32'h04910001, d);
    chk(d.op == 5'(BR_GEZ) && d.dest_v && d.dest == 31 && d.imm == 32'h138, "bgezal");
    // jal 0x400 at 0x134
    dec1(32'h134, 32'h0C000100, d);
    chk(d.op == 5'(BR_J) && d.dest == 31 && d.dest_v && d.imm == 32'h400, "jal");
    // jr r31
    dec1(32'h138, 32'h03E00008, d);
    chk(d.op == 5'(BR_JR) && d.src1 == 31 && !d.dest_v, "jr");
    // jalr r5, r6
    dec1(32'h13C, 32'h00C02809, d);
    chk(d.op == 5'(BR_JR) && d.src1 == 6 && d.dest_v && d.dest == 5, "jalr");
    // mult r4, r5
    dec1(32'h140, 32'h00850018, d);
    chk(d.muldiv && d.op == 5'(OP_MULT_HI) && d.src1 == 4 && d.src2 == 5 && d.dest == REG_HI, "mult");
    // divu r4, r5
    dec1(32'h144, 32'h0085001B, d);
    chk(d.muldiv && d.op == 5'(OP_DIVU_HI), "divu");
    // mfhi r7
    dec1(32'h148, 32'h00003810, d);
    chk(d.op == 5'(OP_PASS) && d.src1 == REG_HI && d.dest == 7 && !d.muldiv, "mfhi");
    // mtlo r7
    dec1(32'h14C, 32'h00E00013, d);
    chk(d.op == 5'(OP_PASS) && d.src1 == 7 && d.dest == REG_LO, "mtlo");
    // addu r0, r1, r2: no destination
    dec1(32'h150, 32'h00220021, d);
    chk(!d.dest_v, "write to r0 dropped");
    // FIFO behaviour: 2 in per cycle
    in_valid = 2'b11;
    in_inst[0] = '{ia: 32'h200, pred_ia: 32'h204, epoch: '0, instr: 32'h00221821};
    in_inst[1] = '{ia: 32'h204, pred_ia: 32'h208, epoch: '0, instr: 32'h00221821};
    #1 chk(in_ready && out_valid == 2'b00, "empty and ready");
    @(negedge clk);
    in_inst[0].ia = 32'h208; in_inst[1].ia = 32'h20C;
    #1 chk(out_valid == 2'b11 && out_inst[0].ia == 32'h200 && out_inst[1].ia == 32'h204, "two visible next cycle");
    @(negedge clk);
    in_valid = '0;
    #1 chk(!in_ready, "not ready with 4 of 4 entries used");
    deq_n = 2'd1; @(negedge clk);
    #1 chk(out_inst[0].ia == 32'h204 && out_inst[1].ia == 32'h208, "deq 1 in order");
    deq_n = 2'd2; @(negedge clk);
    #1 chk(out_valid == 2'b01 && out_inst[0].ia == 32'h20C && in_ready, "deq 2 in order");
    deq_n = 2'd1; @(negedge clk); deq_n = 2'd0;
    #1 chk(out_valid == 2'b00, "empty again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
