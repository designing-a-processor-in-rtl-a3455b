// btb: branch table buffer, a direct-mapped table of ENTRIES address -> next-address
// mappings.
//
// lookup_ia is an instruction address; lookup_next is combinationally the address
// predicted to be fetched after it: the recorded target on a hit, otherwise
// lookup_ia + 4 (not taken). An update writes (upd_ia -> upd_next) into the entry
// indexed by upd_ia[IDX+1:2], with the full address kept as tag; the new entry is
// seen by lookups from the next cycle. With MIPS branch delay slots the core
// records a taken branch under the address of its delay slot, so the lookup of the
// delay slot returns the branch target. Eight direct-mapped entries, combinational
// lookup and the +4 default follow the design; the tag format and the delay-slot
// keying are this implementation's choices.
module btb #(
  parameter int ENTRIES = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mips_pkg::word_t    lookup_ia,
  output mips_pkg::word_t    lookup_next,
  output logic               lookup_hit,
  input  logic               upd,
  input  mips_pkg::word_t    upd_ia,
  input  mips_pkg::word_t    upd_next
);
  import mips_pkg::*;
  localparam int IDX = $clog2(ENTRIES);

  logic [ENTRIES-1:0] valid;
  word_t              tag  [ENTRIES];
  word_t              next [ENTRIES];

  logic [IDX-1:0] li, ui;
  assign li = lookup_ia[IDX+1:2];
  assign ui = upd_ia[IDX+1:2];

  assign lookup_hit  = valid[li] && (tag[li] == lookup_ia);
  assign lookup_next = lookup_hit ? next[li] : lookup_ia + 32'd4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   valid <= '0;
    else if (upd) valid[ui] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (upd) begin
      tag[ui]  <= upd_ia;
      next[ui] <= upd_next;
    end
  end
endmodule
