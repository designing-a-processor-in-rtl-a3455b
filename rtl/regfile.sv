// regfile: architectural register file of the core.
//
// 32 general-purpose registers, r0 hard-wired to zero, plus the HI and LO registers
// written by multiplies and divides. Four combinational read ports and two write
// ports. Ports take a 6-bit index: 0..31 are the GPRs, 32 is HI and 33 is LO
// (hi/lo outputs also show those two directly). Writes take effect at the clock edge;
// a read in the same cycle returns the old value (the reorder buffer holds the newer
// value, so it never needs a bypass). If both write ports write the same register,
// port 1 (the younger instruction) wins. Port counts, r0 and HI/LO follow the design;
// the shared index space and reset-to-zero are this implementation's choices.
module regfile (
  input  logic                        clk,
  input  logic                        rst_n,
  input  mips_pkg::regidx_t [3:0]     raddr,
  output mips_pkg::word_t   [3:0]     rdata,
  input  logic              [1:0]     we,
  input  mips_pkg::regidx_t [1:0]     waddr,
  input  mips_pkg::word_t   [1:0]     wdata,
  output mips_pkg::word_t             hi,
  output mips_pkg::word_t             lo
);
  import mips_pkg::*;
  word_t r [34];

  always_comb begin
    for (int i = 0; i < 4; i++)
      rdata[i] = (raddr[i] == '0 || raddr[i] > REG_LO) ? '0 : r[raddr[i]];
  end
  assign hi = r[REG_HI];
  assign lo = r[REG_LO];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 34; i++) r[i] <= '0;
    end else begin
      for (int p = 0; p < 2; p++)
        if (we[p] && waddr[p] != '0 && waddr[p] <= REG_LO) r[waddr[p]] <= wdata[p];
    end
  end
endmodule
