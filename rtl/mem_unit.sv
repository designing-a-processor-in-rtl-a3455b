// mem_unit: in-order memory unit between the reorder buffer and the data memory.
//
// Memory instructions arrive in program order with their operands resolved (base,
// offset, store value). A store is checked for alignment, turned into a word address,
// shifted data and a 4-bit byte mask, and kept in a SB_DEPTH-entry store buffer; its
// response (only the error flag) is returned at once, so the store's reorder-buffer
// slot can complete while the store itself stays speculative. The reorder buffer
// later either commits the oldest buffered store (commit: it is written to the data
// memory) or invalidates it (inval: it was on a false path and is dropped); stores
// leave the buffer in order. A load waits in a one-entry load request buffer until
// every earlier store has left the store buffer, then reads the data memory; one cycle
// later the word is aligned, sign/zero extended and returned. Misaligned accesses
// return err = 1 and touch no memory. Responses leave through a 2-entry FIFO
// (res_valid/res_data/res_deq). ld_wait shows a load held back by buffered stores. A new request is accepted only while no load is
// waiting or in flight, which keeps responses in request order.
// The store buffer size, response-at-once for stores, loads waiting for earlier
// stores and commit/invalidate follow the design; the one-entry load buffer, the
// error rule and the acceptance rule are this implementation's choices.
module mem_unit #(
  parameter int SB_DEPTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req,
  input  mips_pkg::mem_req_t req_data,
  output logic               req_ready,
  output logic               res_valid,
  output mips_pkg::mem_res_t res_data,
  input  logic               res_deq,
  input  logic               commit,
  input  logic               inval,
  output logic               sb_empty,
  output logic               ld_wait,
  output logic               dm_req,
  output logic               dm_we,
  output mips_pkg::word_t    dm_addr,
  output mips_pkg::word_t    dm_wdata,
  output logic [3:0]         dm_mask,
  input  logic               dm_rvalid,
  input  mips_pkg::word_t    dm_rdata
);
  import mips_pkg::*;

  typedef struct packed {
    word_t      addr;
    word_t      data;
    logic [3:0] mask;
  } sb_ent_t;

  // ---------------- request decoding ----------------
  word_t      ea;
  logic       misalign;
  sb_ent_t    st_ent;
  assign ea = req_data.base + req_data.offset;
  always_comb begin
    case (req_data.size)
      MS_HALF: misalign = ea[0];
      MS_WORD: misalign = |ea[1:0];
      default: misalign = 1'b0;
    endcase
    st_ent.addr = {ea[31:2], 2'b00};
    case (req_data.size)
      MS_BYTE: begin
        st_ent.data = {4{req_data.data[7:0]}};
        st_ent.mask = 4'b0001 << ea[1:0];
      end
      MS_HALF: begin
        st_ent.data = {2{req_data.data[15:0]}};
        st_ent.mask = ea[1] ? 4'b1100 : 4'b0011;
      end
      default: begin
        st_ent.data = req_data.data;
        st_ent.mask = 4'b1111;
      end
    endcase
  end

  // ---------------- store buffer ----------------
  logic    sb_full, sb_valid, sb_enq, sb_pop;
  sb_ent_t sb_head;

  // ---------------- load request buffer ----------------
  logic       ld_v, ld_inflight;
  logic [7:0] ld_tag;
  logic       ld_sgn;
  msize_t     ld_size;
  word_t      ld_addr;

  logic       res_full, res_enq;
  mem_res_t   res_in;
  logic       accept, fire;

  assign req_ready = !ld_v && !ld_inflight && !sb_full && !res_full;
  assign accept    = req && req_ready;
  assign sb_enq    = accept && req_data.store && !misalign;
  assign sb_pop    = (commit || inval) && sb_valid;
  assign sb_empty  = !sb_valid;
  assign ld_wait   = ld_v && sb_valid;
  assign fire      = ld_v && !sb_valid && !commit;

  sync_fifo #(.W($bits(sb_ent_t)), .DEPTH(SB_DEPTH)) u_sb (
    .clk, .rst_n,
    .enq(sb_enq), .enq_data(st_ent), .full(sb_full),
    .deq_valid(sb_valid), .deq_data(sb_head), .deq(sb_pop)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_v        <= 1'b0;
      ld_inflight <= 1'b0;
    end else begin
      ld_inflight <= fire;
      if (fire) ld_v <= 1'b0;
      if (accept && !req_data.store && !misalign) ld_v <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (accept && !req_data.store) begin
      ld_tag  <= req_data.tag;
      ld_sgn  <= req_data.sgn;
      ld_size <= req_data.size;
      ld_addr <= ea;
    end
  end

  // ---------------- data memory port ----------------
  assign dm_req   = (commit && sb_valid) || fire;
  assign dm_we    = commit && sb_valid;
  assign dm_addr  = dm_we ? sb_head.addr : {ld_addr[31:2], 2'b00};
  assign dm_wdata = sb_head.data;
  assign dm_mask  = sb_head.mask;

  // ---------------- responses ----------------
  word_t ld_val;
  always_comb begin
    logic [7:0]  b;
    logic [15:0] h;
    b = dm_rdata[8*ld_addr[1:0] +: 8];
    h = ld_addr[1] ? dm_rdata[31:16] : dm_rdata[15:0];
    case (ld_size)
      MS_BYTE: ld_val = ld_sgn ? {{24{b[7]}}, b} : {24'd0, b};
      MS_HALF: ld_val = ld_sgn ? {{16{h[15]}}, h} : {16'd0, h};
      default: ld_val = dm_rdata;
    endcase
  end

  always_comb begin
    res_enq = 1'b0;
    res_in  = '0;
    if (ld_inflight && dm_rvalid) begin
      res_enq      = 1'b1;
      res_in.tag   = ld_tag;
      res_in.value = ld_val;
    end else if (accept && (req_data.store || misalign)) begin
      res_enq    = 1'b1;
      res_in.tag = req_data.tag;
      res_in.err = misalign;
    end
  end

  sync_fifo #(.W($bits(mem_res_t)), .DEPTH(2)) u_res (
    .clk, .rst_n,
    .enq(res_enq), .enq_data(res_in), .full(res_full),
    .deq_valid(res_valid), .deq_data(res_data), .deq(res_deq)
  );

  a_commit_has_store: assert property (@(posedge clk) disable iff (!rst_n)
    (commit || inval) |-> sb_valid);
endmodule
