// tb_mp_reg: checks the multi-ported register: reset value, hold without writes, and
// that among simultaneous writers the lowest-numbered port wins, with random port
// enables and data compared against a reference computed here.
// Priority to the lowest-numbered writing port is the design's rule; port count and
// width are set here.
module tb_mp_reg;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [3:0] wen = '0;
  logic [3:0][7:0] wdata = '0;
  logic [7:0] rd, expv;
  int checks = 0, failures = 0;

  mp_reg #(.NPORTS(4), .W(8), .RESET(8'h5A)) dut (.*);

  task automatic check(input logic [7:0] e, input string what);
    checks++;
    if (rd !== e) begin
      failures++;
      $display("%s: rd=%h expected %h", what, rd, e);
    end
  endtask

  initial begin
    #2;
    check(8'h5A, "reset");
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk);
    check(8'h5A, "hold after reset");
    expv = 8'h5A;
    for (int i = 0; i < 400; i++) begin
      wen = 4'($urandom);
      for (int p = 0; p < 4; p++) wdata[p] = 8'($urandom);
      if (wen[0]) expv = wdata[0];
      else if (wen[1]) expv = wdata[1];
      else if (wen[2]) expv = wdata[2];
      else if (wen[3]) expv = wdata[3];
      @(negedge clk);
      check(expv, "write");
    end
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
