// tb_fetch_unit: runs the fetch unit against an instruction memory and a BTB and
// checks the stream of instructions it sends: two sequential instructions per cycle
// with the right predicted successors and the memory's contents, a single instruction
// when the BTB predicts a taken branch after the next instruction, the jump to the
// predicted target after the delay slot, no progress while decode is not ready, and a
// branch-miss redirect to the correct address with the new epoch.
// The PC/nextPC/epoch behaviour and the one-or-two send rule are the design's; replay
// on a decode stall is this implementation's choice.
module tb_fetch_unit;
  import mips_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic im_req, im_valid, out_ready = 1'b1, miss_valid = 1'b0, miss_deq, two_sent;
  word_t im_addr, btb_ia, btb_next;
  word_t [3:0] im_block;
  logic [1:0] out_valid;
  finst_t [1:0] out_inst;
  miss_t miss_data = '0;
  logic ld_we = 1'b0, upd = 1'b0, hit;
  word_t ld_addr = '0, ld_data = '0, upd_ia = '0, upd_next = '0;
  logic rst_f = 1'b0;  // fetch and memory port held in reset until loaded
  int checks = 0, failures = 0;
  finst_t got [$];

  fetch_unit dut (.clk, .rst_n(rst_f), .im_req, .im_addr, .im_valid, .im_instr(im_block[1:0]),
    .btb_ia, .btb_next, .out_valid, .out_inst, .out_ready, .miss_valid, .miss_data,
    .miss_deq, .two_sent);
  imem #(.WORDS(256), .BLOCK(4)) u_im (.clk, .rst_n(rst_f), .req(im_req), .req_addr(im_addr),
    .resp_valid(im_valid), .resp_instr(im_block), .ld_we, .ld_addr, .ld_data);
  btb #(.ENTRIES(8)) u_btb (.clk, .rst_n, .lookup_ia(btb_ia), .lookup_next(btb_next),
    .lookup_hit(hit), .upd, .upd_ia, .upd_next);

  always @(posedge clk) begin
    if (rst_f && out_ready) begin
      if (out_valid[0]) got.push_back(out_inst[0]);
      if (out_valid[1]) got.push_back(out_inst[1]);
    end
  end

  task automatic expect_ia(input word_t ia, input word_t pred, input epoch_t ep);
    finst_t f;
    checks++;
    if (got.size() == 0) begin
      failures++; $display("missing instruction %h", ia);
      return;
    end
    f = got.pop_front();
    if (f.ia != ia || f.pred_ia != pred || f.epoch != ep || f.instr != (32'hF0000000 | ia)) begin
      failures++;
      $display("got ia=%h pred=%h ep=%0d instr=%h, expected ia=%h pred=%h ep=%0d",
               f.ia, f.pred_ia, f.epoch, f.instr, ia, pred, ep);
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); ld_we = 1'b1; ld_addr = i * 4; ld_data = 32'hF0000000 | (i * 4);
    end
    // predicted-taken branch at 0x20 (delay slot 0x24, target 0x80)
    upd = 1'b1; upd_ia = 32'h24; upd_next = 32'h80;
    @(negedge clk);
    ld_we = 1'b0; upd = 1'b0;
    rst_f = 1'b1;
    repeat (10) @(negedge clk);
    // 0x00 .. 0x1C in pairs
    for (int a = 0; a < 32'h20; a += 4) expect_ia(a, a + 4, 0);
    expect_ia(32'h20, 32'h24, 0);
    expect_ia(32'h24, 32'h80, 0);
    for (int a = 32'h80; a < 32'h90; a += 4) expect_ia(a, a + 4, 0);
    got.delete();
    // stall: nothing is taken while decode is not ready, and nothing is skipped
    @(negedge clk);
    out_ready = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (two_sent) begin failures++; $display("advanced while stalled"); end
    out_ready = 1'b1;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (got.size() < 2 || got[1].ia != got[0].ia + 4) begin failures++; $display("stall broke stream"); end
    // redirect
    miss_valid = 1'b1;
    miss_data = '{correct_ia: 32'h200, branch_ia: 32'h40, epoch: 6'd5};
    #1;
    checks++;
    if (!miss_deq || out_valid != 2'b00) begin failures++; $display("redirect not taken at once"); end
    @(negedge clk);
    miss_valid = 1'b0;
    got.delete();
    repeat (3) @(negedge clk);
    expect_ia(32'h200, 32'h204, 6'd5);
    expect_ia(32'h204, 32'h208, 6'd5);
    expect_ia(32'h208, 32'h20C, 6'd5);
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
