// tb_imem: loads the instruction memory and checks that every request returns, one
// cycle later, the four consecutive words starting at the requested address, with
// back-to-back requests and wrap-around at the end of the array.
// The four-word block returned the next cycle is the design's; wrap-around at the end
// is this implementation's choice.
module tb_imem;
  import mips_pkg::*;
  localparam int WORDS = 256;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  logic req = 1'b0, resp_valid, ld_we = 1'b0;
  word_t req_addr = '0, ld_addr = '0, ld_data = '0;
  word_t [3:0] resp_instr;
  int checks = 0, failures = 0;
  word_t last_addr;
  logic  last_req = 1'b0;

  imem #(.WORDS(WORDS), .BLOCK(4)) dut (.*);

  function automatic word_t content(int i);
    return 32'hA5000000 ^ (i * 32'h00010203);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (resp_valid !== last_req) begin failures++; $display("resp_valid wrong"); end
      if (last_req) begin
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (resp_instr[k] !== content((int'(last_addr[9:2]) + k) % WORDS)) begin
            failures++;
            $display("addr %h word %0d: %h", last_addr, k, resp_instr[k]);
          end
        end
      end
    end
    last_req  <= req;
    last_addr <= req_addr;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      ld_we = 1'b1; ld_addr = i * 4; ld_data = content(i);
    end
    @(negedge clk);
    ld_we = 1'b0;
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      req = $urandom_range(0, 3) != 0;
      req_addr = (i == 5) ? 32'h3F8 : ($urandom_range(0, WORDS - 1) * 4);
    end
    @(negedge clk) req = 1'b0;
    @(negedge clk);
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
