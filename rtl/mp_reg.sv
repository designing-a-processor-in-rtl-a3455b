// mp_reg: multi-ported register.
//
// A register with NPORTS independent write ports and one read port. Any number of
// ports may write in the same cycle; the lowest-numbered port that writes wins and the
// others are ignored, so writers that can collide are simply given fixed priorities.
// Internally each port's (enable, data) pair acts as a wire, and one combinational
// priority selection picks the value that is loaded at the next clock edge. The read
// port returns the registered value (writes become visible the following cycle).
// Four ports and the lowest-number-wins rule follow the multi-ported register the
// core is built with; the reset value is this design's choice.
module mp_reg #(
  parameter int          NPORTS = 4,
  parameter int          W      = 8,
  parameter logic [W-1:0] RESET = '0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NPORTS-1:0]    wen,
  input  logic [NPORTS-1:0][W-1:0] wdata,
  output logic [W-1:0]         rd
);
  logic [W-1:0] nxt;
  logic         any;

  always_comb begin
    nxt = rd;
    any = 1'b0;
    for (int p = NPORTS - 1; p >= 0; p--) begin
      if (wen[p]) begin
        nxt = wdata[p];
        any = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   rd <= RESET;
    else if (any) rd <= nxt;
  end
endmodule
