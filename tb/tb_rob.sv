// tb_rob: runs the reorder buffer with a decode FIFO, register file, ALU, memory unit
// and data memory around it, fed by a small testbench fetcher that always predicts
// the next sequential address and follows the buffer's branch-miss redirects.
// A short MIPS program checks: in-order commit of the expected instructions (the
// MULT HI/LO pair as two lanes), operand forwarding through dependent instructions,
// a store followed by a load of the same word, a branch miss with the right
// {correct address, branch address, new epoch}, the delay slot kept and the wrong path
// killed (including stores already buffered in the memory unit, which must be
// discarded), and the stop of commit at a misaligned load. Final register and memory
// contents are compared with hand-computed values.
module tb_rob;
  import mips_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam word_t END = 32'h70;
  word_t prog [0:31];
  int checks = 0, failures = 0;

  // testbench fetcher
  word_t pc = '0;
  epoch_t ep = '0;
  logic run = 1'b0;
  logic [1:0] f_valid;
  finst_t [1:0] f_inst;
  logic f_ready;

  logic [1:0] d_valid, deq_n;
  dinst_t [1:0] d_inst;
  regidx_t [3:0] rf_raddr;
  word_t [3:0] rf_rdata;
  logic [1:0] rf_we;
  regidx_t [1:0] rf_waddr;
  word_t [1:0] rf_wdata;
  word_t rf_hi, rf_lo;
  logic alu_req, alu_ready, alu_res_valid, alu_res_deq;
  alu_req_t alu_req_data;
  alu_res_t alu_res_data;
  logic mem_req, mem_ready, mem_res_valid, mem_res_deq, mem_commit, mem_inval;
  mem_req_t mem_req_data;
  mem_res_t mem_res_data;
  logic sb_empty, ld_wait, dm_req, dm_we, dm_rvalid;
  word_t dm_addr, dm_wdata, dm_rdata, dbg_rdata;
  logic [3:0] dm_mask;
  logic miss_valid, miss_deq;
  miss_t miss_data;
  logic [1:0] cm_valid;
  word_t [1:0] cm_ia;
  logic halted, ev_miss, ev_drop, ev_full, ev_pair, ev_ins2, ev_kill_busy;
  word_t dbg_addr = '0;
  logic dbg_we = 1'b0;

  always_comb begin
    f_valid = '0;
    for (int i = 0; i < 2; i++) begin
      f_inst[i].ia      = pc + 32'(4 * i);
      f_inst[i].pred_ia = pc + 32'(4 * i + 4);
      f_inst[i].epoch   = ep;
      f_inst[i].instr   = prog[f_inst[i].ia[6:2]];
      f_valid[i] = run && !miss_valid && f_inst[i].ia < END;
    end
  end
  assign miss_deq = miss_valid;
  always @(posedge clk) begin
    if (miss_valid) begin
      pc <= miss_data.correct_ia;
      ep <= miss_data.epoch;
    end else if (f_ready && f_valid[0]) begin
      pc <= pc + (f_valid[1] ? 32'd8 : 32'd4);
    end
  end

  decode_unit #(.DEPTH(4)) u_dec (.clk, .rst_n, .in_valid(f_valid), .in_inst(f_inst),
    .in_ready(f_ready), .out_valid(d_valid), .out_inst(d_inst), .deq_n);
  rob #(.N(16)) dut (.clk, .rst_n, .in_valid(d_valid), .in_inst(d_inst), .deq_n,
    .rf_raddr, .rf_rdata, .rf_we, .rf_waddr, .rf_wdata,
    .alu_req, .alu_req_data, .alu_ready, .alu_res_valid, .alu_res_data, .alu_res_deq,
    .mem_req, .mem_req_data, .mem_ready, .mem_res_valid, .mem_res_data, .mem_res_deq,
    .mem_commit, .mem_inval, .miss_valid, .miss_data, .miss_deq, .cm_valid, .cm_ia,
    .halted, .ev_miss, .ev_drop, .ev_full, .ev_pair, .ev_ins2, .ev_kill_busy);
  regfile u_rf (.clk, .rst_n, .raddr(rf_raddr), .rdata(rf_rdata), .we(rf_we),
    .waddr(rf_waddr), .wdata(rf_wdata), .hi(rf_hi), .lo(rf_lo));
  alu_unit u_alu (.clk, .rst_n, .req(alu_req), .req_data(alu_req_data),
    .req_ready(alu_ready), .res_valid(alu_res_valid), .res_data(alu_res_data),
    .res_deq(alu_res_deq));
  mem_unit #(.SB_DEPTH(4)) u_mu (.clk, .rst_n, .req(mem_req), .req_data(mem_req_data),
    .req_ready(mem_ready), .res_valid(mem_res_valid), .res_data(mem_res_data),
    .res_deq(mem_res_deq), .commit(mem_commit), .inval(mem_inval), .sb_empty, .ld_wait,
    .dm_req, .dm_we, .dm_addr, .dm_wdata, .dm_mask, .dm_rvalid, .dm_rdata);
  dmem #(.WORDS(64)) u_dm (.clk, .rst_n, .req(dm_req), .we(dm_we), .addr(dm_addr),
    .wdata(dm_wdata), .mask(dm_mask), .rvalid(dm_rvalid), .rdata(dm_rdata),
    .dbg_we, .dbg_addr, .dbg_wdata('0), .dbg_rdata);

  // encoders
  function automatic word_t addiu(int rt, int rs, int imm);
    return {6'h09, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic word_t addu(int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h21};
  endfunction
  function automatic word_t mem(logic [5:0] opc, int rt, int off, int rs);
    return {opc, 5'(rs), 5'(rt), 16'(off)};
  endfunction

  // observed state
  word_t shadow [34];
  logic  written [34];
  word_t commits [$];
  int n_miss = 0, n_inval = 0, n_mcommit = 0, n_pair = 0;
  miss_t first_miss;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < 2; p++) begin
        if (rf_we[p]) begin shadow[rf_waddr[p]] <= rf_wdata[p]; written[rf_waddr[p]] <= 1'b1; end
        if (cm_valid[p]) commits.push_back(cm_ia[p]);
      end
      if (miss_valid && miss_deq) begin
        if (n_miss == 0) first_miss <= miss_data;
        n_miss++;
      end
      n_inval   += int'(mem_inval);
      n_mcommit += int'(mem_commit);
      n_pair    += int'(ev_pair);
    end
  end

  task automatic chk(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    word_t exp_cm [$];
    for (int i = 0; i < 32; i++) prog[i] = addiu(6, 6, 1);  // wrong-path filler
    for (int i = 0; i < 34; i++) begin shadow[i] = '0; written[i] = 1'b0; end
    prog[0]  = addiu(1, 0, 5);
    prog[1]  = addiu(2, 1, 7);
    prog[2]  = {6'h00, 5'd1, 5'd2, 10'd0, 6'h18};       // mult r1, r2
    prog[3]  = {6'h00, 10'd0, 5'd3, 5'd0, 6'h12};       // mflo r3
    prog[4]  = mem(6'h2b, 3, 0, 0);                      // sw r3, 0(r0)
    prog[5]  = mem(6'h23, 4, 0, 0);                      // lw r4, 0(r0)
    prog[6]  = addiu(9, 4, 1);
    prog[7]  = addiu(9, 9, 1);
    prog[8]  = addiu(9, 9, 1);
    prog[9]  = {6'h04, 5'd9, 5'd9, 16'd14};              // beq r9, r9, 0x60
    prog[10] = addiu(5, 0, 1);                           // delay slot
    prog[11] = addiu(6, 0, 99);                          // wrong path from here
    prog[12] = mem(6'h2b, 6, 4, 0);
    prog[13] = mem(6'h2b, 6, 8, 0);
    prog[24] = addu(7, 4, 5);                            // 0x60
    prog[25] = addiu(8, 7, 1);
    prog[26] = mem(6'h23, 10, 2, 0);                     // misaligned lw: stops commit
    prog[27] = addiu(11, 0, 7);
    exp_cm = '{32'h00, 32'h04, 32'h08, 32'h08, 32'h0c, 32'h10, 32'h14, 32'h18, 32'h1c,
               32'h20, 32'h24, 32'h28, 32'h60, 32'h64};
    @(negedge clk); rst_n = 1'b1;
    for (int a = 0; a < 3; a++) begin  // clear the words the program touches
      dbg_we = 1'b1; dbg_addr = 32'(4 * a);
      @(negedge clk);
    end
    dbg_we = 1'b0;
    @(negedge clk); run = 1'b1;
    repeat (150) @(negedge clk);
    chk("commit count", commits.size(), exp_cm.size());
    for (int i = 0; i < exp_cm.size() && i < commits.size(); i++)
      chk($sformatf("commit %0d", i), commits[i], exp_cm[i]);
    chk("r1", shadow[1], 5);
    chk("r2", shadow[2], 12);
    chk("r3", shadow[3], 60);
    chk("r4", shadow[4], 60);
    chk("r5", shadow[5], 1);
    chk("r7", shadow[7], 61);
    chk("r8", shadow[8], 62);
    chk("r9", shadow[9], 63);
    chk("HI", rf_hi, 0);
    chk("LO", rf_lo, 60);
    chk("r6 never written", 32'(written[6]), 0);
    chk("r10 never written", 32'(written[10]), 0);
    chk("r11 never written", 32'(written[11]), 0);
    chk("misses", n_miss, 1);
    chk("miss correct_ia", first_miss.correct_ia, 32'h60);
    chk("miss branch_ia", first_miss.branch_ia, 32'h24);
    chk("miss epoch", 32'(first_miss.epoch), 1);
    chk("store commits", n_mcommit, 1);
    chk("buffered wrong-path stores discarded", 32'(n_inval >= 1), 1);
    chk("mult pair committed together", n_pair, 1);
    chk("halted on misaligned load", 32'(halted), 1);
    for (int a = 0; a < 3; a++) begin
      dbg_addr = 32'(4 * a);
      #1;
      chk($sformatf("mem[%0d]", a), dbg_rdata, a == 0 ? 60 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
