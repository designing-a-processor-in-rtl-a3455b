// bypass_fifo: FIFO whose enqueue is sequenced before dequeue in the same cycle.
//
// A circular buffer of DEPTH entries followed by an output multiplexer. When the
// buffer is empty, the value being enqueued is passed straight to the output, so a
// consumer can take it in the very cycle it is produced; when the consumer is not
// ready the value is stored and nothing is lost. Used for the reorder buffer's
// branch-miss notification so the fetch unit is redirected without an extra cycle.
// Interface: enq/enq_data with full flag; deq_valid/deq_data/deq (deq only while
// deq_valid). The structure (storage plus output mux) follows the bypassing FIFO of
// the design; DEPTH = 2 is this implementation's choice.
module bypass_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enq,
  input  logic [W-1:0] enq_data,
  output logic         full,
  output logic         deq_valid,
  output logic [W-1:0] deq_data,
  input  logic         deq
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [AW:0]   cnt;
  logic          empty, bypass, do_enq, do_deq;

  assign empty     = (cnt == 0);
  assign full      = (cnt == (AW+1)'(DEPTH));
  assign bypass    = empty && enq;
  assign deq_valid = !empty || enq;
  assign deq_data  = empty ? enq_data : mem[rp];
  assign do_deq    = deq && deq_valid;
  // a bypassed value that is taken at once is never stored
  assign do_enq    = enq && !full && !(bypass && do_deq);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
    end else begin
      if (do_enq) wp <= inc(wp);
      if (do_deq && !bypass) rp <= inc(rp);
      cnt <= cnt + (AW+1)'(do_enq) - (AW+1)'(do_deq && !bypass);
    end
  end

  always_ff @(posedge clk) if (do_enq) mem[wp] <= enq_data;

  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) enq |-> !full || (bypass && do_deq);
  endproperty
  a_no_overflow: assert property (p_no_overflow);
endmodule
