// dmem: data memory.
//
// WORDS 32-bit words, addressed with word-aligned byte addresses. Requests are
// handled one per cycle in order: a write (we = 1) stores the bytes selected by the
// 4-bit mask (bit i enables byte lane i, bits 8i+7:8i); a read returns the whole word
// in the next cycle on rdata with rvalid. A read issued after a write sees that
// write. A second port (dbg_*) lets a test load and inspect the memory; it is meant
// for use while the core is idle. Word alignment and the byte mask follow the
// design; no cache organisation is modelled, the array is the whole memory.
module dmem #(
  parameter int WORDS = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req,
  input  logic            we,
  input  mips_pkg::word_t addr,
  input  mips_pkg::word_t wdata,
  input  logic [3:0]      mask,
  output logic            rvalid,
  output mips_pkg::word_t rdata,
  input  logic            dbg_we,
  input  mips_pkg::word_t dbg_addr,
  input  mips_pkg::word_t dbg_wdata,
  output mips_pkg::word_t dbg_rdata
);
  import mips_pkg::*;
  localparam int AW = $clog2(WORDS);

  word_t mem [WORDS];
  logic [AW-1:0] wa;
  assign wa = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (req && we) begin
      for (int b = 0; b < 4; b++)
        if (mask[b]) mem[wa][8*b +: 8] <= wdata[8*b +: 8];
    end else if (dbg_we) begin
      mem[dbg_addr[AW+1:2]] <= dbg_wdata;
    end
    if (req && !we) rdata <= mem[wa];
  end

  assign dbg_rdata = mem[dbg_addr[AW+1:2]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= req && !we;
  end
endmodule
