// tb_btb: checks the branch table buffer: misses predict address + 4, an update is
// returned as a hit from the next cycle, all eight entries hold distinct mappings,
// and a conflicting address replaces the entry it maps to (direct mapped).
// The 8 entries and the next-sequential default are the design's; the delay-slot
// keying is this implementation's choice.
module tb_btb;
  import mips_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  word_t lookup_ia = '0, lookup_next, upd_ia = '0, upd_next = '0;
  logic lookup_hit, upd = 1'b0;
  int checks = 0, failures = 0;

  btb #(.ENTRIES(8)) dut (.*);

  task automatic look(input word_t a, input word_t e, input logic h);
    @(negedge clk);
    lookup_ia = a;
    #1;
    checks++;
    if (lookup_next !== e || lookup_hit !== h) begin
      failures++;
      $display("lookup %h: next=%h hit=%b expected %h %b", a, lookup_next, lookup_hit, e, h);
    end
  endtask

  initial begin
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      word_t a;
      a = word_t'($urandom) & ~32'h3;
      look(a, a + 4, 1'b0);
    end
    // fill all 8 entries
    for (int i = 0; i < 8; i++) begin
      upd = 1'b1; upd_ia = 32'h400 + 4 * i; upd_next = 32'h8000 + 16 * i;
      @(negedge clk);
    end
    upd = 1'b0;
    for (int i = 0; i < 8; i++) look(32'h400 + 4 * i, 32'h8000 + 16 * i, 1'b1);
    // same index, different address: miss, then replacement
    look(32'h420, 32'h424, 1'b0);
    upd = 1'b1; upd_ia = 32'h420; upd_next = 32'h1230; @(negedge clk); upd = 1'b0;
    look(32'h420, 32'h1230, 1'b1);
    look(32'h400, 32'h404, 1'b0);
    look(32'h404, 32'h8010, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
