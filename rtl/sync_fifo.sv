// sync_fifo: output FIFO of a get/put channel.
//
// The producing unit enqueues results (put side) and the consumer dequeues them
// (get side); an entry enqueued in one cycle can be dequeued from the next cycle on.
// Enqueue and dequeue may happen in the same cycle, also when the FIFO is full.
// Interface: enq/enq_data/full and deq/deq_data/deq_valid. The FIFO-on-the-output
// organisation follows the design; DEPTH is chosen per use.
module sync_fifo #(
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
  logic          do_enq, do_deq;

  assign deq_valid = (cnt != 0);
  assign deq_data  = mem[rp];
  assign do_deq    = deq && deq_valid;
  assign full      = (cnt == (AW+1)'(DEPTH)) && !do_deq;
  assign do_enq    = enq && !full;

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
      if (do_deq) rp <= inc(rp);
      cnt <= cnt + (AW+1)'(do_enq) - (AW+1)'(do_deq);
    end
  end

  always_ff @(posedge clk) if (do_enq) mem[wp] <= enq_data;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) enq |-> !full);
endmodule
