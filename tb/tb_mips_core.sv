// tb_mips_core: end-to-end test of the out-of-order MIPS I core at its default size.
//
// The testbench assembles a program (directed parts: a counted loop with stores and
// dependent loads, MULT/DIV with MFHI/MFLO, a JAL/JR subroutine, byte/half accesses,
// a mispredicted branch whose wrong path holds a store; then a seeded random block of
// ALU, multiply/divide, load/store and short forward branches run three times). It
// runs the same program on an in-order instruction-set model kept here, which records
// every executed instruction (address and register write; a MULT/DIV as a HI and a
// LO entry). Every commit of the core is compared in order with that record, and at
// the end the data memory is compared word by word. The core's event outputs are
// counted, and each mechanism (branch miss, BTB hit, two-wide fetch, insert and
// commit, wrong-epoch drop, reorder-buffer full, decode stall, MULT/DIV pair, store
// invalidation, load waiting for stores) must occur at least once.
// The mechanisms counted are those the design names; the program and the reference
// model are this testbench's own.
module tb_mips_core;
  import mips_pkg::*;

  localparam int IW = 1024;
  localparam int DW = 1024;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ld_we = 1'b0, dbg_we = 1'b0;
  word_t ld_addr = '0, ld_data = '0, dbg_addr = '0, dbg_wdata = '0, dbg_rdata;
  logic [1:0] cm_valid, cm_we;
  word_t [1:0] cm_ia, cm_value;
  regidx_t [1:0] cm_dest;
  logic st_valid;
  word_t st_addr, st_data;
  logic [3:0] st_mask;
  logic halted, ev_miss, ev_drop, ev_full, ev_pair, ev_ins2, ev_kill_busy, ev_fetch2,
        ev_btb_hit, ev_dec_stall, ev_inval, ev_load_wait;

  mips_core dut (.*);

  int checks = 0, failures = 0;

  // ---------------- assembler ----------------
  word_t prog [IW];
  int    pn = 0;
  function automatic word_t R(int fn, int rs, int rt, int rd, int sh = 0);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic word_t I(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic word_t Jt(int op, int target_addr);
    return {6'(op), 26'(target_addr >> 2)};
  endfunction
  task automatic emit(input word_t w);
    prog[pn] = w;
    pn++;
  endtask
  function automatic int boff(int from_idx, int to_idx);  // branch offset in words
    return to_idx - (from_idx + 1);
  endfunction

  // ---------------- reference model ----------------
  typedef struct packed {
    word_t   ia;
    logic    we;
    regidx_t dest;
    word_t   value;
  } exp_t;
  exp_t  expq [$];
  word_t rr [34];
  word_t mm [DW];

  function automatic word_t ld_ext(word_t w, word_t a, int size, bit sgn);
    logic [7:0] b;
    logic [15:0] h;
    b = w[8*a[1:0] +: 8];
    h = a[1] ? w[31:16] : w[15:0];
    if (size == 0) return sgn ? {{24{b[7]}}, b} : {24'd0, b};
    if (size == 1) return sgn ? {{16{h[15]}}, h} : {16'd0, h};
    return w;
  endfunction

  task automatic iss_run(input int end_idx);
    word_t pc, npc, ins, nn, a, v, q, r;
    int steps;
    logic [5:0] op, fn;
    logic [4:0] rs, rt, rd, sh;
    word_t se, ze;
    logic [63:0] p;
    for (int i = 0; i < 34; i++) rr[i] = '0;
    pc = 0; npc = 4; steps = 0;
    while (pc != word_t'(end_idx * 4) && steps < 50000) begin
      ins = prog[pc[11:2]];
      op = ins[31:26]; fn = ins[5:0];
      rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11]; sh = ins[10:6];
      se = {{16{ins[15]}}, ins[15:0]};
      ze = {16'd0, ins[15:0]};
      nn = npc + 4;
      steps++;
      case (op)
        6'h00: begin
          v = '0;
          case (fn)
            6'h00: v = rr[rt] << sh;
            6'h02: v = rr[rt] >> sh;
            6'h03: v = word_t'($signed(rr[rt]) >>> sh);
            6'h04: v = rr[rt] << rr[rs][4:0];
            6'h06: v = rr[rt] >> rr[rs][4:0];
            6'h07: v = word_t'($signed(rr[rt]) >>> rr[rs][4:0]);
            6'h08, 6'h09: begin
              nn = rr[rs];
              v = pc + 8;
            end
            6'h10: v = rr[32];
            6'h12: v = rr[33];
            6'h20, 6'h21: v = rr[rs] + rr[rt];
            6'h22, 6'h23: v = rr[rs] - rr[rt];
            6'h24: v = rr[rs] & rr[rt];
            6'h25: v = rr[rs] | rr[rt];
            6'h26: v = rr[rs] ^ rr[rt];
            6'h27: v = ~(rr[rs] | rr[rt]);
            6'h2A: v = {31'd0, $signed(rr[rs]) < $signed(rr[rt])};
            6'h2B: v = {31'd0, rr[rs] < rr[rt]};
            default: ;
          endcase
          if (fn == 6'h11 || fn == 6'h13) begin
            expq.push_back('{pc, 1'b1, (fn == 6'h11) ? REG_HI : REG_LO, rr[rs]});
            rr[(fn == 6'h11) ? 32 : 33] = rr[rs];
          end else if (fn >= 6'h18 && fn <= 6'h1B) begin
            if (fn == 6'h18) p = $signed({{32{rr[rs][31]}}, rr[rs]}) * $signed({{32{rr[rt][31]}}, rr[rt]});
            else if (fn == 6'h19) p = {32'd0, rr[rs]} * {32'd0, rr[rt]};
            else begin
              if (rr[rt] == 0) begin q = '1; r = rr[rs]; end
              else if (fn == 6'h1A && rr[rs] == 32'h8000_0000 && rr[rt] == '1) begin q = rr[rs]; r = 0; end
              else if (fn == 6'h1A) begin
                q = word_t'($signed(rr[rs]) / $signed(rr[rt]));
                r = word_t'($signed(rr[rs]) % $signed(rr[rt]));
              end else begin
                q = rr[rs] / rr[rt];
                r = rr[rs] % rr[rt];
              end
              p = {r, q};
            end
            rr[32] = p[63:32];
            rr[33] = p[31:0];
            expq.push_back('{pc, 1'b1, REG_HI, p[63:32]});
            expq.push_back('{pc, 1'b1, REG_LO, p[31:0]});
          end else if (fn == 6'h08 || rd == 0) begin
            expq.push_back('{pc, 1'b0, '0, '0});
          end else begin
            expq.push_back('{pc, 1'b1, regidx_t'(rd), v});
            rr[rd] = v;
          end
        end
        6'h01, 6'h04, 6'h05, 6'h06, 6'h07: begin
          logic t;
          case (op)
            6'h01: t = rt[0] ? !rr[rs][31] : rr[rs][31];
            6'h04: t = rr[rs] == rr[rt];
            6'h05: t = rr[rs] != rr[rt];
            6'h06: t = $signed(rr[rs]) <= 0;
            default: t = $signed(rr[rs]) > 0;
          endcase
          if (t) nn = pc + 4 + {se[29:0], 2'b00};
          if (op == 6'h01 && rt[4]) begin
            expq.push_back('{pc, 1'b1, 6'd31, pc + 8});
            rr[31] = pc + 8;
          end else expq.push_back('{pc, 1'b0, '0, '0});
        end
        6'h02, 6'h03: begin
          nn = {npc[31:28], ins[25:0], 2'b00};
          if (op == 6'h03) begin
            expq.push_back('{pc, 1'b1, 6'd31, pc + 8});
            rr[31] = pc + 8;
          end else expq.push_back('{pc, 1'b0, '0, '0});
        end
        6'h20, 6'h21, 6'h23, 6'h24, 6'h25: begin
          a = rr[rs] + se;
          v = ld_ext(mm[a[11:2]], a, (op[1:0] == 2'b11) ? 2 : op[0], !op[2]);
          if (rt != 0) begin
            expq.push_back('{pc, 1'b1, regidx_t'(rt), v});
            rr[rt] = v;
          end else expq.push_back('{pc, 1'b0, '0, '0});
        end
        6'h28, 6'h29, 6'h2B: begin
          a = rr[rs] + se;
          if (op == 6'h28) mm[a[11:2]][8*a[1:0] +: 8] = rr[rt][7:0];
          else if (op == 6'h29) mm[a[11:2]][16*a[1] +: 16] = rr[rt][15:0];
          else mm[a[11:2]] = rr[rt];
          expq.push_back('{pc, 1'b0, '0, '0});
        end
        default: begin
          case (op)
            6'h08, 6'h09: v = rr[rs] + se;
            6'h0A: v = {31'd0, $signed(rr[rs]) < $signed(se)};
            6'h0B: v = {31'd0, rr[rs] < se};
            6'h0C: v = rr[rs] & ze;
            6'h0D: v = rr[rs] | ze;
            6'h0E: v = rr[rs] ^ ze;
            default: v = {ins[15:0], 16'd0};
          endcase
          if (rt != 0) begin
            expq.push_back('{pc, 1'b1, regidx_t'(rt), v});
            rr[rt] = v;
          end else expq.push_back('{pc, 1'b0, '0, '0});
        end
      endcase
      pc = npc;
      npc = nn;
    end
    // the final self-loop jump itself is also committed
    expq.push_back('{word_t'(end_idx * 4), 1'b0, '0, '0});
  endtask

  // ---------------- program ----------------
  int end_idx;
  task automatic build_program();
    int loop_i, br_i, sub_i, skip_i, jal_i, outer_i, b_i, k, n, fw;
    // directed part
    emit(I(6'h09, 0, 1, 10));            // addiu r1, r0, 10
    emit(I(6'h09, 0, 2, 0));             // addiu r2, r0, 0
    emit(I(6'h09, 0, 3, 32'h100));       // addiu r3, r0, 0x100
    loop_i = pn;
    emit(R(6'h21, 2, 1, 2));             // addu r2, r2, r1
    emit(I(6'h2B, 3, 2, 0));             // sw r2, 0(r3)
    emit(I(6'h23, 3, 4, 0));             // lw r4, 0(r3)
    emit(I(6'h09, 3, 3, 4));             // addiu r3, r3, 4
    emit(I(6'h09, 1, 1, -1));            // addiu r1, r1, -1
    br_i = pn;
    emit(I(6'h05, 1, 0, boff(br_i, loop_i)));  // bne r1, r0, loop
    emit(R(6'h21, 4, 2, 5));             // addu r5, r4, r2  (delay slot)
    emit(R(6'h18, 2, 5, 0));             // mult r2, r5
    emit(R(6'h10, 0, 0, 6));             // mfhi r6
    emit(R(6'h12, 0, 0, 7));             // mflo r7
    emit(I(6'h09, 0, 8, -7));            // addiu r8, r0, -7
    emit(R(6'h1A, 7, 8, 0));             // div r7, r8
    emit(R(6'h10, 0, 0, 9));             // mfhi r9
    emit(R(6'h12, 0, 0, 10));            // mflo r10
    emit(R(6'h1B, 8, 7, 0));             // divu r8, r7
    emit(R(6'h12, 0, 0, 11));            // mflo r11
    emit(R(6'h19, 8, 8, 0));             // multu r8, r8
    emit(R(6'h10, 0, 0, 12));            // mfhi r12
    emit(R(6'h11, 5, 0, 0));             // mthi r5
    emit(R(6'h10, 0, 0, 13));            // mfhi r13
    jal_i = pn;
    emit(32'h0);                          // jal sub (patched)
    emit(I(6'h09, 0, 14, 5));            // addiu r14, r0, 5 (delay slot)
    emit(R(6'h21, 20, 21, 15));          // addu r15, r20, r21
    // byte / half accesses
    emit(I(6'h0D, 0, 16, 32'h8081));     // ori r16, r0, 0x8081
    emit(I(6'h28, 0, 16, 32'h201));      // sb r16, 0x201(r0)
    emit(I(6'h29, 0, 16, 32'h206));      // sh r16, 0x206(r0)
    emit(I(6'h20, 0, 17, 32'h201));      // lb r17, 0x201(r0)
    emit(I(6'h24, 0, 18, 32'h201));      // lbu r18
    emit(I(6'h21, 0, 19, 32'h206));      // lh r19
    emit(I(6'h25, 0, 20, 32'h206));      // lhu r20
    emit(I(6'h23, 0, 21, 32'h204));      // lw r21
    // mispredicted branch waiting on a load, with a store on the wrong path
    emit(I(6'h23, 0, 12, 32'h100));      // lw r12, 0x100(r0)
    br_i = pn;
    emit(32'h0);                          // beq r12, r12, skip (patched)
    emit(I(6'h09, 0, 13, 1));            // addiu r13, r0, 1 (delay slot)
    emit(I(6'h2B, 0, 13, 32'h208));      // sw r13, 0x208(r0)   wrong path
    emit(I(6'h09, 0, 14, 99));           // addiu r14, r0, 99   wrong path
    emit(I(6'h2B, 0, 14, 32'h20C));      // sw r14, 0x20C(r0)   wrong path
    skip_i = pn;
    prog[br_i] = I(6'h04, 12, 12, boff(br_i, skip_i));
    // random block, run three times (r22 counts)
    emit(I(6'h09, 0, 22, 3));            // addiu r22, r0, 3
    outer_i = pn;
    n = 0;
    while (n < 260) begin
      k = $urandom_range(0, 99);
      if (k < 55) begin
        int fns[14] = '{6'h21, 6'h23, 6'h24, 6'h25, 6'h26, 6'h27, 6'h2A, 6'h2B,
                        6'h00, 6'h02, 6'h03, 6'h04, 6'h06, 6'h07};
        emit(R(fns[$urandom_range(0, 13)], $urandom_range(0, 15), $urandom_range(0, 15),
               $urandom_range(1, 15), $urandom_range(0, 31)));
        n++;
      end else if (k < 72) begin
        int ops[8] = '{6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E, 6'h0F, 6'h09};
        emit(I(ops[$urandom_range(0, 7)], $urandom_range(0, 15), $urandom_range(1, 15),
               $urandom_range(0, 65535)));
        n++;
      end else if (k < 78) begin
        emit(R(6'h18 + $urandom_range(0, 3), $urandom_range(0, 15), $urandom_range(0, 15), 0));
        emit(R($urandom_range(0, 1) ? 6'h10 : 6'h12, 0, 0, $urandom_range(1, 15)));
        n += 2;
      end else if (k < 80) begin
        emit(R($urandom_range(0, 1) ? 6'h11 : 6'h13, $urandom_range(0, 15), 0, 0));
        n++;
      end else if (k < 90) begin
        int sz, off;
        sz = $urandom_range(0, 2);
        off = 32'h300 + ($urandom_range(0, 15) * 4) + ((sz == 0) ? $urandom_range(0, 3) :
                                                        (sz == 1) ? 2 * $urandom_range(0, 1) : 0);
        if ($urandom_range(0, 1))
          emit(I((sz == 0) ? 6'h28 : (sz == 1) ? 6'h29 : 6'h2B, 0, $urandom_range(0, 15), off));
        else
          emit(I((sz == 2) ? 6'h23 : (sz == 1) ? (6'h21 | ($urandom_range(0, 1) << 2))
                                               : (6'h20 | ($urandom_range(0, 1) << 2)),
                 0, $urandom_range(1, 15), off));
        n++;
      end else begin
        // short forward branch over 1..3 instructions, ALU delay slot
        fw = $urandom_range(1, 3);
        b_i = pn;
        case ($urandom_range(0, 3))
          0: emit(I(6'h04, $urandom_range(0, 15), $urandom_range(0, 15), fw));
          1: emit(I(6'h05, $urandom_range(0, 15), $urandom_range(0, 15), fw));
          2: emit(I(6'h01, $urandom_range(0, 15), $urandom_range(0, 1), fw));
          default: emit(I(6'h06 + $urandom_range(0, 1), $urandom_range(0, 15), 0, fw));
        endcase
        for (int j = 0; j < fw + 1; j++)
          emit(R(6'h21, $urandom_range(0, 15), $urandom_range(0, 15), $urandom_range(1, 15)));
        n += fw + 2;
      end
    end
    emit(I(6'h09, 22, 22, -1));          // addiu r22, r22, -1
    b_i = pn;
    emit(I(6'h05, 22, 0, boff(b_i, outer_i)));  // bne r22, r0, outer
    emit(32'h0);                          // nop (delay slot)
    end_idx = pn;
    emit(Jt(6'h02, end_idx * 4));         // end: j end
    emit(32'h0);
    // subroutine
    sub_i = pn;
    emit(I(6'h09, 0, 20, 42));           // addiu r20, r0, 42
    emit(R(6'h08, 31, 0, 0));            // jr r31
    emit(R(6'h21, 20, 20, 21));          // addu r21, r20, r20 (delay slot)
    prog[jal_i] = Jt(6'h03, sub_i * 4);
  endtask

  // ---------------- run ----------------
  int cyc = 0;
  int n_miss = 0, n_drop = 0, n_full = 0, n_pair = 0, n_ins2 = 0, n_fetch2 = 0,
      n_btb = 0, n_dstall = 0, n_inval = 0, n_lwait = 0, n_commit2 = 0, n_commits = 0;
  bit done = 1'b0;
  int done_cyc = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (ev_miss) n_miss++;
      if (ev_drop) n_drop++;
      if (ev_full) n_full++;
      if (ev_pair) n_pair++;
      if (ev_ins2) n_ins2++;
      if (ev_fetch2) n_fetch2++;
      if (ev_btb_hit) n_btb++;
      if (ev_dec_stall) n_dstall++;
      if (ev_inval) n_inval++;
      if (ev_load_wait) n_lwait++;
      if (&cm_valid) n_commit2++;
      if (halted) begin
        failures++;
        $display("core halted on a faulting instruction");
      end
      for (int l = 0; l < 2; l++) begin
        if (cm_valid[l] && !done) begin
          exp_t e;
          n_commits++;
          if (expq.size() == 0) begin
            done = 1'b1;
          end else begin
            e = expq.pop_front();
            checks++;
            if (cm_ia[l] != e.ia || cm_we[l] != e.we ||
                (e.we && (cm_dest[l] != e.dest || cm_value[l] != e.value))) begin
              failures++;
              if (failures < 10)
                $display("commit mismatch at cycle %0d: got ia=%h we=%b r%0d=%h, expected ia=%h we=%b r%0d=%h",
                         cyc, cm_ia[l], cm_we[l], cm_dest[l], cm_value[l], e.ia, e.we, e.dest, e.value);
            end
            if (expq.size() == 0) begin
              done = 1'b1;
              done_cyc = cyc;
            end
          end
        end
      end
    end
  end

  initial begin
    int nexp;
    for (int i = 0; i < IW; i++) prog[i] = '0;
    begin  // program seed; +seed=N on the command line picks another random block
      int sd = 32'h5eed;
      void'($value$plusargs("seed=%d", sd));
      void'($urandom(sd));
    end
    build_program();
    for (int i = 0; i < DW; i++) mm[i] = i * 32'h01010101 + 32'h1234;
    iss_run(end_idx);
    nexp = expq.size();
    // load program and data memory while in reset
    repeat (2) @(negedge clk);
    for (int i = 0; i < pn; i++) begin
      ld_we = 1'b1; ld_addr = i * 4; ld_data = prog[i];
      @(negedge clk);
    end
    ld_we = 1'b0;
    for (int i = 0; i < DW; i++) begin
      dbg_we = 1'b1; dbg_addr = i * 4; dbg_wdata = i * 32'h01010101 + 32'h1234;
      @(negedge clk);
    end
    dbg_we = 1'b0;
    // reload the reference memory image (iss_run changed mm)
    for (int i = 0; i < DW; i++) mm[i] = i * 32'h01010101 + 32'h1234;
    expq.delete();
    iss_run(end_idx);
    @(negedge clk);
    rst_n = 1'b1;
    wait (done);
    repeat (20) @(posedge clk);
    // compare data memory
    @(negedge clk);
    for (int i = 0; i < DW; i++) begin
      dbg_addr = i * 4;
      #1;
      checks++;
      if (dbg_rdata !== mm[i]) begin
        failures++;
        if (failures < 10) $display("dmem[%0h] = %h, expected %h", i * 4, dbg_rdata, mm[i]);
      end
    end
    $display("program: %0d instructions, %0d expected commits, %0d cycles, IPC %0.3f",
             pn, nexp, done_cyc, real'(nexp) / real'(done_cyc));
    $display("events: miss=%0d btb_hit=%0d fetch2=%0d ins2=%0d commit2=%0d drop=%0d full=%0d dec_stall=%0d pair=%0d inval=%0d load_wait=%0d",
             n_miss, n_btb, n_fetch2, n_ins2, n_commit2, n_drop, n_full, n_dstall, n_pair, n_inval, n_lwait);
    begin
      int ev[11];
      ev = '{n_miss, n_btb, n_fetch2, n_ins2, n_commit2, n_drop, n_full, n_dstall,
             n_pair, n_inval, n_lwait};
      foreach (ev[i]) begin
        checks++;
        if (ev[i] == 0) begin
          failures++;
          $display("mechanism %0d (in the order of the events line) never occurred", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired: %0d expected commits left", expq.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
