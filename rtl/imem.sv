// imem: instruction memory.
//
// WORDS 32-bit words. A request (req, req_addr: byte address, word aligned) is
// answered in the next cycle with the BLOCK consecutive instructions starting at that
// address (resp_valid, resp_instr[0] is the word at req_addr); addresses wrap at the
// end of the array. One request may be issued every cycle and responses come back in
// request order. A separate write port (ld_we/ld_addr/ld_data) loads the program.
// The four-instruction block returned one cycle later follows the design; the size,
// the wrap-around and the load port are this implementation's choices.
module imem #(
  parameter int WORDS = 1024,
  parameter int BLOCK = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       req,
  input  mips_pkg::word_t            req_addr,
  output logic                       resp_valid,
  output mips_pkg::word_t [BLOCK-1:0] resp_instr,
  input  logic                       ld_we,
  input  mips_pkg::word_t            ld_addr,
  input  mips_pkg::word_t            ld_data
);
  import mips_pkg::*;
  localparam int AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr[AW+1:2]] <= ld_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) resp_valid <= 1'b0;
    else        resp_valid <= req;
  end

  always_ff @(posedge clk) begin
    if (req) begin
      for (int i = 0; i < BLOCK; i++)
        resp_instr[i] <= mem[AW'(req_addr[AW+1:2] + AW'(i))];
    end
  end
endmodule
