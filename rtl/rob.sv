// rob: reorder buffer of the 2-way out-of-order MIPS I core, with the branch unit.
//
// Instructions live in N slots of a circular buffer between head (oldest) and tail
// (next free). Each slot holds the instruction template (address, class, operation,
// immediate, destination, predicted next address), two operands that are either the
// tag (slot number) of the producing instruction or a value, the result and a state:
// Empty -> Waiting -> Dispatched -> Done -> Empty, with any non-empty state able to
// become Killed on a branch miss and Killed -> Empty at commit. The slot state is a
// multi-ported register (mp_reg) with port priority kill > commit > done > dispatch/
// insert, so all actions can be applied to different slots in the same cycle.
//
// Every cycle, concurrently:
//  * insert: up to two decoded instructions (in_valid/in_inst, deq_n taken) are
//    written at tail. An instruction needs its slots Empty and the slot after them
//    Empty too (one slot always stays free); the head pointer is not consulted.
//    Operands are found by a combinational search of the slots for the youngest live
//    writer of the register (its value if Done, else its tag), otherwise from the
//    register file (4 read ports). Instructions whose epoch differs from the current
//    epoch are dropped. MULT/DIV take two consecutive slots (HI then LO) and the whole
//    insert bandwidth of the cycle. No insert happens in a cycle with a branch miss.
//  * operand update: a Waiting slot holding a tag takes the value once that slot is Done.
//  * dispatch: the oldest ready ALU instruction goes to the ALU, the oldest memory
//    instruction (memory operations leave strictly in program order) to the memory
//    unit, without an intermediate FIFO.
//  * branch execution: the oldest Waiting branch/jump resolves once its operands are
//    values and its delay-slot instruction is in the buffer. The address that must
//    follow the delay slot is compared with the delay slot's predicted successor; on a
//    miss every slot after the delay slot is Killed (tail is unchanged), the epoch is
//    incremented and {correct address, branch address, new epoch} is pushed into a
//    bypassing FIFO towards fetch and the BTB (visible in the same cycle).
//  * writeback: ALU and memory results (tag, value) mark the slot Done.
//  * commit: up to two oldest slots leave per cycle; Done slots write their result to
//    the register file (2 write ports), Killed slots are dropped. A MULT/DIV pair
//    leaves together. A committed store tells the memory unit to write its buffered
//    store (mem_commit), a killed store that reached the memory unit discards it
//    (mem_inval); at most one of these per cycle. A slot Killed while its operation is
//    still in a functional unit waits for the result before it is freed. A Done slot
//    with the error flag stops commit for good (halted).
// The slot organisation, states, epoch handling, delay-slot rule, 2-slot MULT/DIV,
// single-rule dispatch and bypass FIFO follow the design. N, oldest-first selection,
// in-order branch resolution and the error stop are this implementation's choices.
module rob #(
  parameter int N = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // from decode
  input  logic [1:0]                  in_valid,
  input  mips_pkg::dinst_t [1:0]      in_inst,
  output logic [1:0]                  deq_n,
  // register file
  output mips_pkg::regidx_t [3:0]     rf_raddr,
  input  mips_pkg::word_t   [3:0]     rf_rdata,
  output logic              [1:0]     rf_we,
  output mips_pkg::regidx_t [1:0]     rf_waddr,
  output mips_pkg::word_t   [1:0]     rf_wdata,
  // ALU
  output logic                        alu_req,
  output mips_pkg::alu_req_t          alu_req_data,
  input  logic                        alu_ready,
  input  logic                        alu_res_valid,
  input  mips_pkg::alu_res_t          alu_res_data,
  output logic                        alu_res_deq,
  // memory unit
  output logic                        mem_req,
  output mips_pkg::mem_req_t          mem_req_data,
  input  logic                        mem_ready,
  input  logic                        mem_res_valid,
  input  mips_pkg::mem_res_t          mem_res_data,
  output logic                        mem_res_deq,
  output logic                        mem_commit,
  output logic                        mem_inval,
  // branch miss to fetch / BTB
  output logic                        miss_valid,
  output mips_pkg::miss_t             miss_data,
  input  logic                        miss_deq,
  // commit trace and events
  output logic [1:0]                  cm_valid,
  output mips_pkg::word_t [1:0]       cm_ia,
  output logic                        halted,
  output logic                        ev_miss,
  output logic                        ev_drop,
  output logic                        ev_full,
  output logic                        ev_pair,
  output logic                        ev_ins2,
  output logic                        ev_kill_busy
);
  import mips_pkg::*;
  localparam int TW = $clog2(N);
  typedef logic [TW-1:0] tag_t;

  typedef enum logic [2:0] {
    S_EMPTY  = 3'd0,
    S_WAIT   = 3'd1,
    S_DISP   = 3'd2,
    S_DONE   = 3'd3,
    S_KILLED = 3'd4
  } sstate_t;

  // ---------------- slot storage ----------------
  sstate_t    state   [N];
  word_t      s_ia    [N];
  word_t      s_pred  [N];
  itype_t     s_itype [N];
  logic [4:0] s_op    [N];
  logic       s_phi   [N];   // first (HI) slot of a MULT/DIV pair
  logic       s_t1    [N];   // operand 1 holds a tag
  word_t      s_v1    [N];
  logic       s_t2    [N];
  word_t      s_v2    [N];
  word_t      s_imm   [N];
  word_t      s_dval  [N];
  logic       s_dv    [N];
  regidx_t    s_dest  [N];
  logic       s_err   [N];
  logic       s_sent  [N];

  logic [N-1:0] s_busy;  // operation outstanding in a functional unit
  tag_t   head, tail;
  epoch_t cur_epoch;

  // ---------------- per-slot state write ports ----------------
  logic [N-1:0] w_kill, w_commit, w_done, w_disp, w_ins;

  for (genvar k = 0; k < N; k++) begin : g_state
    logic [3:0][2:0] wd;
    logic [2:0]      rd;
    assign wd[0] = 3'(S_KILLED);
    assign wd[1] = 3'(S_EMPTY);
    assign wd[2] = 3'(S_DONE);
    assign wd[3] = w_ins[k] ? 3'(S_WAIT) : 3'(S_DISP);
    mp_reg #(.NPORTS(4), .W(3), .RESET(3'(S_EMPTY))) u_state (
      .clk, .rst_n,
      .wen({w_disp[k] | w_ins[k], w_done[k], w_commit[k], w_kill[k]}),
      .wdata(wd), .rd(rd)
    );
    assign state[k] = sstate_t'(rd);
  end

  function automatic tag_t add(input tag_t a, input int b);
    return tag_t'((int'(a) + b) % N);
  endfunction

  // ---------------- operand lookup ----------------
  typedef struct packed {
    logic  found;
    logic  done;
    tag_t  tag;
    word_t val;
  } look_t;

  function automatic look_t lookup(input regidx_t r);
    look_t l;
    l = '0;
    for (int i = 0; i < N; i++) begin
      tag_t k;
      k = add(head, i);
      if ((state[k] == S_WAIT || state[k] == S_DISP || state[k] == S_DONE) &&
          s_dv[k] && s_dest[k] == r) begin
        l.found = 1'b1;
        l.done  = (state[k] == S_DONE);
        l.tag   = k;
        l.val   = s_dval[k];
      end
    end
    return l;
  endfunction

  // ---------------- branch resolution ----------------
  logic   br_found, br_fire, br_miss, br_taken;
  tag_t   br_j, br_ds;
  word_t  br_correct, br_target;
  logic [1:0] br_dslen;

  always_comb begin
    br_found = 1'b0;
    br_j     = '0;
    for (int i = N - 1; i >= 0; i--) begin
      tag_t k;
      k = add(head, i);
      if (state[k] == S_WAIT && s_itype[k] == IT_BRANCH) begin
        br_found = 1'b1;
        br_j     = k;
      end
    end
    br_ds    = add(br_j, 1);
    br_dslen = s_phi[br_ds] ? 2'd2 : 2'd1;
    case (brop_t'(s_op[br_j][2:0]))
      BR_EQ:   br_taken = (s_v1[br_j] == s_v2[br_j]);
      BR_NE:   br_taken = (s_v1[br_j] != s_v2[br_j]);
      BR_LEZ:  br_taken = ($signed(s_v1[br_j]) <= 0);
      BR_GTZ:  br_taken = ($signed(s_v1[br_j]) > 0);
      BR_LTZ:  br_taken = s_v1[br_j][31];
      BR_GEZ:  br_taken = !s_v1[br_j][31];
      default: br_taken = 1'b1;
    endcase
    br_target  = (brop_t'(s_op[br_j][2:0]) == BR_JR) ? s_v1[br_j] : s_imm[br_j];
    br_correct = br_taken ? br_target : s_ia[br_j] + 32'd8;
  end

  logic miss_full;
  assign br_fire = br_found && !s_t1[br_j] && !s_t2[br_j] &&
                   state[br_ds] != S_EMPTY && !miss_full;
  assign br_miss = br_fire && (br_correct != s_pred[br_ds]);

  miss_t miss_in;
  assign miss_in.correct_ia = br_correct;
  assign miss_in.branch_ia  = s_ia[br_j];
  assign miss_in.epoch      = cur_epoch + 1'b1;

  bypass_fifo #(.W($bits(miss_t)), .DEPTH(2)) u_miss (
    .clk, .rst_n,
    .enq(br_miss), .enq_data(miss_in), .full(miss_full),
    .deq_valid(miss_valid), .deq_data(miss_data), .deq(miss_deq)
  );

  // kill everything after the delay slot, up to tail
  always_comb begin
    int span;
    span = (int'(tail) - int'(br_j) + N) % N;
    for (int k = 0; k < N; k++) begin
      int dst;
      dst = (k - int'(br_j) + N) % N;
      w_kill[k] = br_miss && dst > int'(br_dslen) && dst < span &&
                  state[k] != S_EMPTY && state[k] != S_KILLED;
    end
  end

  // ---------------- dispatch ----------------
  logic alu_found, mem_found;
  tag_t alu_j, mem_j;
  always_comb begin
    alu_found = 1'b0;
    alu_j     = '0;
    mem_found = 1'b0;
    mem_j     = '0;
    for (int i = N - 1; i >= 0; i--) begin
      tag_t k;
      k = add(head, i);
      if (state[k] == S_WAIT && s_itype[k] == IT_ALU && !s_t1[k] && !s_t2[k]) begin
        alu_found = 1'b1;
        alu_j     = k;
      end
      if (state[k] == S_WAIT && (s_itype[k] == IT_LOAD || s_itype[k] == IT_STORE)) begin
        mem_found = 1'b1;
        mem_j     = k;
      end
    end
  end

  logic alu_go, mem_go;
  assign alu_go  = alu_found && alu_ready;
  assign mem_go  = mem_found && !s_t1[mem_j] && !s_t2[mem_j] && mem_ready;
  assign alu_req = alu_go;
  assign mem_req = mem_go;

  assign alu_req_data.tag = 8'(alu_j);
  assign alu_req_data.op  = aluop_t'(s_op[alu_j]);
  assign alu_req_data.v1  = s_v1[alu_j];
  assign alu_req_data.v2  = s_v2[alu_j];

  assign mem_req_data.tag    = 8'(mem_j);
  assign mem_req_data.store  = (s_itype[mem_j] == IT_STORE);
  assign mem_req_data.sgn    = s_op[mem_j][2];
  assign mem_req_data.size   = msize_t'(s_op[mem_j][1:0]);
  assign mem_req_data.base   = s_v1[mem_j];
  assign mem_req_data.offset = s_imm[mem_j];
  assign mem_req_data.data   = s_v2[mem_j];

  // ---------------- writeback ----------------
  tag_t alu_wt, mem_wt;
  assign alu_res_deq = alu_res_valid;
  assign mem_res_deq = mem_res_valid;
  assign alu_wt = tag_t'(alu_res_data.tag);
  assign mem_wt = tag_t'(mem_res_data.tag);

  // ---------------- commit ----------------
  tag_t h1;
  logic c0, c0_pair, c0_done, c1, c1_done, c0_mem, c1_mem;
  logic [1:0] c_slots;

  function automatic logic can_leave(input tag_t k);
    return (state[k] == S_DONE && !s_err[k]) || (state[k] == S_KILLED && !s_busy[k]);
  endfunction

  always_comb begin
    tag_t hp;
    hp      = add(head, 1);
    c0_pair = s_phi[head];
    c0_done = (state[head] == S_DONE);
    c0      = can_leave(head) && (!c0_pair || (can_leave(hp) && state[hp] == state[head]));
    c0_mem  = c0 && s_itype[head] == IT_STORE && s_sent[head];
    h1      = c0_pair ? add(head, 2) : hp;
    c1_done = (state[h1] == S_DONE);
    c1_mem  = s_itype[h1] == IT_STORE && s_sent[h1];
    c1      = c0 && !c0_pair && can_leave(h1) && !s_phi[h1] && !(c0_mem && c1_mem);
    c_slots = !c0 ? 2'd0 : c0_pair ? 2'd2 : (2'd1 + 2'(c1));
  end

  assign halted = (state[head] == S_DONE) && s_err[head];

  always_comb begin
    rf_we    = '0;
    rf_waddr = '0;
    rf_wdata = '0;
    cm_valid = '0;
    cm_ia    = '0;
    if (c0) begin
      rf_we[0]    = c0_done && s_dv[head];
      rf_waddr[0] = s_dest[head];
      rf_wdata[0] = s_dval[head];
      cm_valid[0] = c0_done;
      cm_ia[0]    = s_ia[head];
    end
    if (c0 && c0_pair) begin
      rf_we[1]    = c0_done && s_dv[add(head, 1)];
      rf_waddr[1] = s_dest[add(head, 1)];
      rf_wdata[1] = s_dval[add(head, 1)];
      cm_valid[1] = c0_done;
      cm_ia[1]    = s_ia[add(head, 1)];
    end else if (c1) begin
      rf_we[1]    = c1_done && s_dv[h1];
      rf_waddr[1] = s_dest[h1];
      rf_wdata[1] = s_dval[h1];
      cm_valid[1] = c1_done;
      cm_ia[1]    = s_ia[h1];
    end
  end

  always_comb begin
    mem_commit = 1'b0;
    mem_inval  = 1'b0;
    if (c0_mem) begin
      mem_commit = c0_done;
      mem_inval  = !c0_done;
    end else if (c1 && c1_mem) begin
      mem_commit = c1_done;
      mem_inval  = !c1_done;
    end
  end

  // ---------------- insert ----------------
  logic    drop0, drop1, ins0, ins1;
  tag_t    t1;
  logic [1:0] n0, n1;
  look_t   lk [4];
  logic    fwd12, fwd22;

  function automatic logic free_run(input tag_t start, input logic [1:0] n);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i <= int'(n); i++)
      if (state[add(start, i)] != S_EMPTY) ok = 1'b0;
    return ok;
  endfunction

  assign rf_raddr[0] = in_inst[0].src1;
  assign rf_raddr[1] = in_inst[0].src2;
  assign rf_raddr[2] = in_inst[1].src1;
  assign rf_raddr[3] = in_inst[1].src2;

  always_comb begin
    for (int i = 0; i < 4; i++) lk[i] = lookup(rf_raddr[i]);
  end

  always_comb begin
    n0    = in_inst[0].muldiv ? 2'd2 : 2'd1;
    n1    = in_inst[1].muldiv ? 2'd2 : 2'd1;
    drop0 = 1'b0;
    ins0  = 1'b0;
    drop1 = 1'b0;
    ins1  = 1'b0;
    if (in_valid[0] && !br_miss) begin
      if (in_inst[0].epoch != cur_epoch) drop0 = 1'b1;
      else if (free_run(tail, n0))       ins0  = 1'b1;
    end
    t1 = ins0 ? add(tail, 1) : tail;
    if (in_valid[1] && (drop0 || (ins0 && !in_inst[0].muldiv))) begin
      if (in_inst[1].epoch != cur_epoch)                        drop1 = 1'b1;
      else if (!(ins0 && in_inst[1].muldiv) && free_run(t1, n1)) ins1  = 1'b1;
    end
    deq_n = 2'(drop0 | ins0) + 2'(drop1 | ins1);
  end

  assign fwd12 = ins0 && in_inst[0].dest_v && in_inst[1].src1 == in_inst[0].dest;
  assign fwd22 = ins0 && in_inst[0].dest_v && in_inst[1].src2 == in_inst[0].dest;

  typedef struct packed {
    logic  t;
    word_t v;
  } tv_t;

  function automatic tv_t opnd(input logic used, input look_t l, input word_t rfv,
                               input word_t dflt);
    tv_t o;
    if (!used)                o = '{t: 1'b0, v: dflt};
    else if (l.found && l.done) o = '{t: 1'b0, v: l.val};
    else if (l.found)         o = '{t: 1'b1, v: word_t'(l.tag)};
    else                      o = '{t: 1'b0, v: rfv};
    return o;
  endfunction

  tv_t op01, op02, op11, op12;
  always_comb begin
    op01 = opnd(in_inst[0].src1_v, lk[0], rf_rdata[0], '0);
    op02 = opnd(in_inst[0].src2_v, lk[1], rf_rdata[1], in_inst[0].imm);
    op11 = opnd(in_inst[1].src1_v, lk[2], rf_rdata[2], '0);
    op12 = opnd(in_inst[1].src2_v, lk[3], rf_rdata[3], in_inst[1].imm);
    if (in_inst[1].src1_v && fwd12) op11 = '{t: 1'b1, v: word_t'(tail)};
    if (in_inst[1].src2_v && fwd22) op12 = '{t: 1'b1, v: word_t'(tail)};
  end

  // slot-level write enables
  always_comb begin
    for (int k = 0; k < N; k++) begin
      w_commit[k] = 1'b0;
      w_done[k]   = 1'b0;
      w_disp[k]   = 1'b0;
      w_ins[k]    = 1'b0;
    end
    if (c0) w_commit[head] = 1'b1;
    if (c0 && c0_pair) w_commit[add(head, 1)] = 1'b1;
    if (c1) w_commit[h1] = 1'b1;
    if (alu_res_valid && state[alu_wt] == S_DISP) w_done[alu_wt] = 1'b1;
    if (mem_res_valid && state[mem_wt] == S_DISP) w_done[mem_wt] = 1'b1;
    if (br_fire) w_done[br_j] = 1'b1;
    if (alu_go) w_disp[alu_j] = 1'b1;
    if (mem_go) w_disp[mem_j] = 1'b1;
    if (ins0) begin
      w_ins[tail] = 1'b1;
      if (in_inst[0].muldiv) w_ins[add(tail, 1)] = 1'b1;
    end
    if (ins1) begin
      w_ins[t1] = 1'b1;
      if (in_inst[1].muldiv) w_ins[add(t1, 1)] = 1'b1;
    end
  end

  // ---------------- slot data registers ----------------
  task automatic write_slot(input tag_t k, input dinst_t d, input tv_t a, input tv_t b,
                            input logic hi, input logic lo);
    s_ia[k]    <= d.ia;
    s_pred[k]  <= d.pred_ia;
    s_itype[k] <= d.itype;
    s_op[k]    <= lo ? d.op + 5'd1 : d.op;
    s_phi[k]   <= hi;
    s_t1[k]    <= a.t;
    s_v1[k]    <= a.v;
    s_t2[k]    <= b.t;
    s_v2[k]    <= b.v;
    s_imm[k]   <= d.imm;
    s_dv[k]    <= d.dest_v;
    s_dest[k]  <= lo ? REG_LO : d.dest;
    s_err[k]   <= 1'b0;
    s_sent[k]  <= 1'b0;
  endtask

  always_ff @(posedge clk) begin
    // operand update from Done producers
    for (int k = 0; k < N; k++) begin
      if (state[k] == S_WAIT && s_t1[k] && state[tag_t'(s_v1[k])] == S_DONE) begin
        s_t1[k] <= 1'b0;
        s_v1[k] <= s_dval[tag_t'(s_v1[k])];
      end
      if (state[k] == S_WAIT && s_t2[k] && state[tag_t'(s_v2[k])] == S_DONE) begin
        s_t2[k] <= 1'b0;
        s_v2[k] <= s_dval[tag_t'(s_v2[k])];
      end
    end
    if (w_done[alu_wt] && alu_res_valid) s_dval[alu_wt] <= alu_res_data.value;
    if (w_done[mem_wt] && mem_res_valid) begin
      s_dval[mem_wt] <= mem_res_data.value;
      s_err[mem_wt]  <= mem_res_data.err;
    end
    if (br_fire) s_dval[br_j] <= s_ia[br_j] + 32'd8;
    if (mem_go && s_itype[mem_j] == IT_STORE) s_sent[mem_j] <= 1'b1;
    if (ins0) begin
      write_slot(tail, in_inst[0], op01, op02, in_inst[0].muldiv, 1'b0);
      if (in_inst[0].muldiv) write_slot(add(tail, 1), in_inst[0], op01, op02, 1'b0, 1'b1);
    end
    if (ins1) begin
      write_slot(t1, in_inst[1], op11, op12, in_inst[1].muldiv, 1'b0);
      if (in_inst[1].muldiv) write_slot(add(t1, 1), in_inst[1], op11, op12, 1'b0, 1'b1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head      <= '0;
      tail      <= '0;
      cur_epoch <= '0;
      s_busy    <= '0;
    end else begin
      head <= add(head, int'(c_slots));
      tail <= add(tail, (ins0 ? int'(n0) : 0) + (ins1 ? int'(n1) : 0));
      if (br_miss) cur_epoch <= cur_epoch + 1'b1;
      if (alu_res_valid) s_busy[alu_wt] <= 1'b0;
      if (mem_res_valid) s_busy[mem_wt] <= 1'b0;
      if (alu_go) s_busy[alu_j] <= 1'b1;
      if (mem_go) s_busy[mem_j] <= 1'b1;
    end
  end

  // ---------------- events ----------------
  assign ev_miss      = br_miss;
  assign ev_drop      = drop0 | drop1;
  assign ev_full      = in_valid[0] && !br_miss && !drop0 && !ins0;
  assign ev_pair      = (ins0 && in_inst[0].muldiv) || (ins1 && in_inst[1].muldiv);
  assign ev_ins2      = ins0 && ins1;
  assign ev_kill_busy = |(w_kill & s_busy);

  // ---------------- rules of the slot protocol ----------------
  a_one_free: assert property (@(posedge clk) disable iff (!rst_n) state[tail] == S_EMPTY);
  a_wb_tag:   assert property (@(posedge clk) disable iff (!rst_n)
                alu_res_valid |-> s_busy[alu_wt]);
  a_mem_tag:  assert property (@(posedge clk) disable iff (!rst_n)
                mem_res_valid |-> s_busy[mem_wt]);
endmodule
