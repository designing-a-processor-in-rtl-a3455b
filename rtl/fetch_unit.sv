// fetch_unit: program counter, next-PC and epoch; feeds one or two instructions per
// cycle to decode.
//
// pc is the address of the next instruction to send and npc the address predicted to
// follow it (they differ from pc+4 after a predicted-taken branch's delay slot). Every
// cycle the unit requests the instruction block at the address pc will hold in the
// next cycle, so the block arriving from the instruction memory (one-cycle latency)
// always starts at the current pc. On a response the BTB is asked for the successor
// of npc (btb_ia = npc, btb_next):
//   * npc == pc+4 and btb_next == npc+4 (no taken branch ahead): both instructions are
//     sent, pc <= pc+8, npc <= pc+12;
//   * otherwise only the instruction at pc is sent, pc <= npc, npc <= btb_next.
// Each instruction carries the current epoch and pred_ia, the address fetched after
// it. If decode cannot take the pair, the block is dropped and pc re-requested.
// A branch miss from the reorder buffer (miss_valid/miss_data, always taken at once)
// sets pc to the correct address, npc to that + 4 and the epoch to the new value.
// The PC/nextPC/epoch organisation, the one-or-two send rule, the BTB consultation
// and the redirect follow the design; request replay and the exact lookup key are
// this implementation's choices.
module fetch_unit #(
  parameter mips_pkg::word_t RESET_PC = '0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic                   im_req,
  output mips_pkg::word_t        im_addr,
  input  logic                   im_valid,
  input  mips_pkg::word_t [1:0]  im_instr,
  output mips_pkg::word_t        btb_ia,
  input  mips_pkg::word_t        btb_next,
  output logic [1:0]             out_valid,
  output mips_pkg::finst_t [1:0] out_inst,
  input  logic                   out_ready,
  input  logic                   miss_valid,
  input  mips_pkg::miss_t        miss_data,
  output logic                   miss_deq,
  output logic                   two_sent
);
  import mips_pkg::*;

  word_t  pc, npc, pc_n, npc_n;
  epoch_t epoch, epoch_n;
  logic   two;

  assign btb_ia   = npc;
  assign two      = (npc == pc + 32'd4) && (btb_next == npc + 32'd4);
  assign miss_deq = miss_valid;
  assign two_sent = !miss_valid && im_valid && out_ready && two;

  always_comb begin
    out_valid = '0;
    out_inst[0].ia      = pc;
    out_inst[0].pred_ia = npc;
    out_inst[0].epoch   = epoch;
    out_inst[0].instr   = im_instr[0];
    out_inst[1].ia      = npc;
    out_inst[1].pred_ia = btb_next;
    out_inst[1].epoch   = epoch;
    out_inst[1].instr   = im_instr[1];
    pc_n    = pc;
    npc_n   = npc;
    epoch_n = epoch;
    if (miss_valid) begin
      pc_n    = miss_data.correct_ia;
      npc_n   = miss_data.correct_ia + 32'd4;
      epoch_n = miss_data.epoch;
    end else if (im_valid) begin
      out_valid = {two, 1'b1};
      if (out_ready) begin
        if (two) begin
          pc_n  = btb_next;
          npc_n = btb_next + 32'd4;
        end else begin
          pc_n  = npc;
          npc_n = btb_next;
        end
      end
    end
  end

  assign im_req  = 1'b1;
  assign im_addr = pc_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc    <= RESET_PC;
      npc   <= RESET_PC + 32'd4;
      epoch <= '0;
    end else begin
      pc    <= pc_n;
      npc   <= npc_n;
      epoch <= epoch_n;
    end
  end
endmodule
