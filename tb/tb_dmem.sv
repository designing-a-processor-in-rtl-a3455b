// tb_dmem: checks the data memory: masked byte writes change only the selected byte
// lanes, a read returns the word one cycle later, and a read after a write sees it;
// random traffic against a word-array model.
// The 4-bit byte write mask is the design's; the one-cycle read of a flat array is
// this implementation's choice.
module tb_dmem;
  import mips_pkg::*;
  localparam int WORDS = 64;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  logic req = 1'b0, we = 1'b0, rvalid, dbg_we = 1'b0;
  word_t addr = '0, wdata = '0, rdata, dbg_addr = '0, dbg_wdata = '0, dbg_rdata;
  logic [3:0] mask = '0;
  word_t model [WORDS];
  int checks = 0, failures = 0;
  logic pend = 1'b0, p_pend = 1'b0;
  word_t pend_v, p_pend_v;

  dmem #(.WORDS(WORDS)) dut (.*);

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (rvalid !== p_pend) begin failures++; $display("rvalid wrong"); end
      else if (p_pend && rdata !== p_pend_v) begin
        failures++; $display("read %h expected %h", rdata, p_pend_v);
      end
    end
    p_pend   <= pend;
    p_pend_v <= pend_v;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      dbg_we = 1'b1; dbg_addr = i * 4; dbg_wdata = 32'h11111111 * (i % 15); model[i] = dbg_wdata;
    end
    @(negedge clk) dbg_we = 1'b0; rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      int w;
      req = $urandom_range(0, 3) != 0;
      we = $urandom_range(0, 1);
      w = $urandom_range(0, 7);   // small range so reads hit written words
      addr = w * 4;
      wdata = word_t'($urandom);
      mask = 4'($urandom);
      pend = req && !we;
      pend_v = model[w];
      if (req && we)
        for (int b = 0; b < 4; b++) if (mask[b]) model[w][8*b +: 8] = wdata[8*b +: 8];
      @(negedge clk);
    end
    req = 1'b0; pend = 1'b0;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      dbg_addr = i * 4; #1;
      checks++;
      if (dbg_rdata !== model[i]) begin failures++; $display("final word %0d", i); end
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
