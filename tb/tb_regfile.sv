// tb_regfile: checks the register file: r0 reads zero even after writes, four
// independent read ports, two write ports (port 1 wins on the same register), HI/LO
// at indices 32/33 and on their direct outputs, and that a write is seen from the
// next cycle; random traffic against an array model.
// Four read and two write ports and r0 = 0 are the design's; HI/LO as indices 32/33
// and port 1 winning a collision are this implementation's choices.
module tb_regfile;
  import mips_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  regidx_t [3:0] raddr = '0;
  word_t   [3:0] rdata;
  logic    [1:0] we = '0;
  regidx_t [1:0] waddr = '0;
  word_t   [1:0] wdata = '0;
  word_t hi, lo;
  word_t model [34];
  int checks = 0, failures = 0;

  regfile dut (.*);

  initial begin
    for (int i = 0; i < 34; i++) model[i] = '0;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 800; i++) begin
      for (int p = 0; p < 4; p++) raddr[p] = regidx_t'($urandom_range(0, 33));
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++; $display("read r%0d = %h expected %h", raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      checks++;
      if (hi !== model[32] || lo !== model[33]) begin failures++; $display("hi/lo"); end
      we = 2'($urandom);
      waddr[0] = regidx_t'($urandom_range(0, 33));
      waddr[1] = (i % 7 == 0) ? waddr[0] : regidx_t'($urandom_range(0, 33));
      wdata[0] = word_t'($urandom);
      wdata[1] = word_t'($urandom);
      @(negedge clk);
      if (we[0] && waddr[0] != 0) model[waddr[0]] = wdata[0];
      if (we[1] && waddr[1] != 0) model[waddr[1]] = wdata[1];
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
