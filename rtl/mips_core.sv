// mips_core: 2-way superscalar out-of-order MIPS I integer core.
//
// Fetch/decode logic (fetch_unit, imem, btb, decode_unit) delivers up to two
// instructions per cycle, tagged with the fetch epoch, to the reorder buffer (rob).
// The reorder buffer renames operands through its slots, dispatches ready work to a
// single-cycle ALU (alu_unit) and, in program order, to the memory unit (mem_unit)
// with its speculative store buffer in front of the data memory (dmem), executes
// branches itself, and commits up to two instructions per cycle into the register
// file (regfile). A branch miss leaves the reorder buffer through a bypassing FIFO and
// redirects fetch and updates the BTB in the same cycle.
//
// Ports: ld_* writes the program into the instruction memory and dbg_* reads or
// writes the data memory (both meant for use while the core is held in reset or idle).
// cm_* is the commit trace: per commit lane the instruction address and the register
// write it makes (a MULT/DIV commits as two lanes, HI then LO). st_* shows each store
// as it is written to the data memory. ev_* are one-cycle event pulses for
// performance counting. halted is set when an instruction that faulted (misaligned
// access) reaches the head of the reorder buffer.
// Execution starts at RESET_PC after reset. The unit partitioning and the connections
// follow the design; the debug/trace ports are this implementation's additions.
module mips_core #(
  parameter int              ROB_SLOTS  = 16,
  parameter int              IMEM_WORDS = 1024,
  parameter int              DMEM_WORDS = 1024,
  parameter mips_pkg::word_t RESET_PC   = '0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         ld_we,
  input  mips_pkg::word_t              ld_addr,
  input  mips_pkg::word_t              ld_data,
  input  logic                         dbg_we,
  input  mips_pkg::word_t              dbg_addr,
  input  mips_pkg::word_t              dbg_wdata,
  output mips_pkg::word_t              dbg_rdata,
  output logic [1:0]                   cm_valid,
  output mips_pkg::word_t [1:0]        cm_ia,
  output logic [1:0]                   cm_we,
  output mips_pkg::regidx_t [1:0]      cm_dest,
  output mips_pkg::word_t [1:0]        cm_value,
  output logic                         st_valid,
  output mips_pkg::word_t              st_addr,
  output mips_pkg::word_t              st_data,
  output logic [3:0]                   st_mask,
  output logic                         halted,
  output logic                         ev_miss,
  output logic                         ev_drop,
  output logic                         ev_full,
  output logic                         ev_pair,
  output logic                         ev_ins2,
  output logic                         ev_kill_busy,
  output logic                         ev_fetch2,
  output logic                         ev_btb_hit,
  output logic                         ev_dec_stall,
  output logic                         ev_inval,
  output logic                         ev_load_wait
);
  import mips_pkg::*;

  // fetch <-> imem
  logic               im_req, im_valid;
  word_t              im_addr;
  word_t [3:0]        im_block;
  // fetch <-> btb
  word_t              btb_ia, btb_next;
  logic               btb_hit;
  // fetch -> decode
  logic [1:0]         f_valid;
  finst_t [1:0]       f_inst;
  logic               f_ready;
  // decode -> rob
  logic [1:0]         d_valid, d_deq;
  dinst_t [1:0]       d_inst;
  // rob <-> regfile
  regidx_t [3:0]      rf_raddr;
  word_t   [3:0]      rf_rdata;
  logic    [1:0]      rf_we;
  regidx_t [1:0]      rf_waddr;
  word_t   [1:0]      rf_wdata;
  word_t              rf_hi, rf_lo;
  // rob <-> alu
  logic               alu_req, alu_ready, alu_res_valid, alu_res_deq;
  alu_req_t           alu_req_data;
  alu_res_t           alu_res_data;
  // rob <-> mem unit
  logic               mem_req, mem_ready, mem_res_valid, mem_res_deq, mem_commit, mem_inval;
  mem_req_t           mem_req_data;
  mem_res_t           mem_res_data;
  logic               sb_empty;
  // mem unit <-> dmem
  logic               dm_req, dm_we, dm_rvalid;
  word_t              dm_addr, dm_wdata, dm_rdata;
  logic [3:0]         dm_mask;
  // branch miss
  logic               miss_valid, miss_deq;
  miss_t              miss_data;

  imem #(.WORDS(IMEM_WORDS), .BLOCK(4)) u_imem (
    .clk, .rst_n,
    .req(im_req), .req_addr(im_addr),
    .resp_valid(im_valid), .resp_instr(im_block),
    .ld_we, .ld_addr, .ld_data
  );

  btb #(.ENTRIES(8)) u_btb (
    .clk, .rst_n,
    .lookup_ia(btb_ia), .lookup_next(btb_next), .lookup_hit(btb_hit),
    .upd(miss_valid && miss_deq),
    .upd_ia(miss_data.branch_ia + 32'd4),
    .upd_next(miss_data.correct_ia)
  );

  fetch_unit #(.RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst_n,
    .im_req, .im_addr, .im_valid, .im_instr(im_block[1:0]),
    .btb_ia, .btb_next,
    .out_valid(f_valid), .out_inst(f_inst), .out_ready(f_ready),
    .miss_valid, .miss_data, .miss_deq,
    .two_sent(ev_fetch2)
  );

  decode_unit #(.DEPTH(4)) u_decode (
    .clk, .rst_n,
    .in_valid(f_valid), .in_inst(f_inst), .in_ready(f_ready),
    .out_valid(d_valid), .out_inst(d_inst), .deq_n(d_deq)
  );

  regfile u_rf (
    .clk, .rst_n,
    .raddr(rf_raddr), .rdata(rf_rdata),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .hi(rf_hi), .lo(rf_lo)
  );

  rob #(.N(ROB_SLOTS)) u_rob (
    .clk, .rst_n,
    .in_valid(d_valid), .in_inst(d_inst), .deq_n(d_deq),
    .rf_raddr, .rf_rdata, .rf_we, .rf_waddr, .rf_wdata,
    .alu_req, .alu_req_data, .alu_ready, .alu_res_valid, .alu_res_data, .alu_res_deq,
    .mem_req, .mem_req_data, .mem_ready, .mem_res_valid, .mem_res_data, .mem_res_deq,
    .mem_commit, .mem_inval,
    .miss_valid, .miss_data, .miss_deq,
    .cm_valid, .cm_ia, .halted,
    .ev_miss, .ev_drop, .ev_full, .ev_pair, .ev_ins2, .ev_kill_busy
  );

  alu_unit u_alu (
    .clk, .rst_n,
    .req(alu_req), .req_data(alu_req_data), .req_ready(alu_ready),
    .res_valid(alu_res_valid), .res_data(alu_res_data), .res_deq(alu_res_deq)
  );

  mem_unit #(.SB_DEPTH(4)) u_mu (
    .clk, .rst_n,
    .req(mem_req), .req_data(mem_req_data), .req_ready(mem_ready),
    .res_valid(mem_res_valid), .res_data(mem_res_data), .res_deq(mem_res_deq),
    .commit(mem_commit), .inval(mem_inval), .sb_empty, .ld_wait(ev_load_wait),
    .dm_req, .dm_we, .dm_addr, .dm_wdata, .dm_mask, .dm_rvalid, .dm_rdata
  );

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .rst_n,
    .req(dm_req), .we(dm_we), .addr(dm_addr), .wdata(dm_wdata), .mask(dm_mask),
    .rvalid(dm_rvalid), .rdata(dm_rdata),
    .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata
  );

  assign cm_we    = rf_we;
  assign cm_dest  = rf_waddr;
  assign cm_value = rf_wdata;
  assign st_valid = dm_req && dm_we;
  assign st_addr  = dm_addr;
  assign st_data  = dm_wdata;
  assign st_mask  = dm_mask;

  assign ev_btb_hit   = btb_hit && im_valid && !miss_valid;
  assign ev_dec_stall = im_valid && !f_ready && !miss_valid;
  assign ev_inval     = mem_inval;

  // HI/LO are read through the regular read ports; their direct outputs stay internal.
  logic unused_ok;
  assign unused_ok = ^{rf_hi, rf_lo, im_block[3:2], sb_empty};
endmodule
