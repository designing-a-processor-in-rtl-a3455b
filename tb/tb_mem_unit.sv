// tb_mem_unit: drives the memory unit with a data memory (dmem) behind it. Checks that
// a store is answered at once but reaches memory only when committed, that an
// invalidated store never reaches memory, that a load waits while earlier stores are
// buffered and then sees them, byte/half/word loads with sign and zero extension,
// sub-word stores, misaligned accesses reported as errors, and that the store buffer
// accepts four stores and then refuses a fifth until one leaves.
// The 4-entry store buffer and loads waiting for older stores are the design's; the
// misaligned-access error is this implementation's choice.
module tb_mem_unit;
  import mips_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic req = 1'b0, req_ready, res_valid, res_deq = 1'b0, commit = 1'b0, inval = 1'b0;
  logic sb_empty, ld_wait, dm_req, dm_we, dm_rvalid;
  mem_req_t req_data = '0;
  mem_res_t res_data;
  word_t dm_addr, dm_wdata, dm_rdata, dbg_rdata;
  logic [3:0] dm_mask;
  word_t dbg_addr = '0;
  logic  dbg_we = 1'b0;
  word_t dbg_wdata = '0;
  int checks = 0, failures = 0;

  mem_unit #(.SB_DEPTH(4)) dut (.*);
  dmem #(.WORDS(64)) u_mem (.clk, .rst_n, .req(dm_req), .we(dm_we), .addr(dm_addr),
    .wdata(dm_wdata), .mask(dm_mask), .rvalid(dm_rvalid), .rdata(dm_rdata),
    .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic st, input msize_t sz, input logic sg, input word_t a,
                      input word_t d, input int tag);
    req = 1'b1;
    req_data = '{tag: 8'(tag), store: st, sgn: sg, size: sz, base: a & ~32'h7,
                 offset: a & 32'h7, data: d};
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    req = 1'b0;
  endtask

  task automatic get(input int tag, input logic err, input word_t v, input logic chkv,
                     input string what);
    int n;
    n = 0;
    #1;
    while (!res_valid && n < 20) begin @(negedge clk); #1; n++; end
    chk(res_valid && res_data.tag == 8'(tag) && res_data.err == err &&
        (!chkv || res_data.value == v), what);
    if (res_valid && chkv && res_data.value != v) $display("  value %h expected %h", res_data.value, v);
    res_deq = 1'b1;
    @(negedge clk);
    res_deq = 1'b0;
  endtask

  function automatic word_t memw(input word_t a);
    return u_mem.mem[a[7:2]];
  endfunction

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); dbg_we = 1'b1; dbg_addr = i * 4; dbg_wdata = 32'hC0DE0000 + i;
    end
    @(negedge clk) dbg_we = 1'b0; rst_n = 1'b1;
    // store answered at once, memory unchanged until commit
    send(1'b1, MS_WORD, 1'b0, 32'h10, 32'hDEADBEEF, 1);
    get(1, 1'b0, 0, 1'b0, "store response");
    chk(memw(32'h10) == 32'hC0DE0004, "store not written before commit");
    chk(!sb_empty, "store buffered");
    // load to same address waits for the buffered store
    send(1'b0, MS_WORD, 1'b0, 32'h10, 0, 2);
    repeat (4) @(negedge clk);
    chk(!res_valid && ld_wait, "load held while a store is buffered");
    commit = 1'b1; @(negedge clk); commit = 1'b0;
    chk(memw(32'h10) == 32'hDEADBEEF, "committed store written");
    get(2, 1'b0, 32'hDEADBEEF, 1'b1, "load after committed store");
    // invalidated store never written
    send(1'b1, MS_WORD, 1'b0, 32'h14, 32'h12345678, 3);
    get(3, 1'b0, 0, 1'b0, "store response 2");
    inval = 1'b1; @(negedge clk); inval = 1'b0;
    chk(sb_empty && memw(32'h14) == 32'hC0DE0005, "invalidated store discarded");
    // sub-word stores
    send(1'b1, MS_BYTE, 1'b0, 32'h21, 32'h000000AB, 4); get(4, 1'b0, 0, 1'b0, "sb resp");
    send(1'b1, MS_HALF, 1'b0, 32'h26, 32'h0000F00D, 5); get(5, 1'b0, 0, 1'b0, "sh resp");
    commit = 1'b1; @(negedge clk); @(negedge clk); commit = 1'b0;
    chk(memw(32'h20) == 32'hC0DEAB08, "byte store lane 1");
    chk(memw(32'h24) == 32'hF00D0009, "half store upper");
    // loads with extension
    send(1'b0, MS_BYTE, 1'b1, 32'h21, 0, 6); get(6, 1'b0, 32'hFFFFFFAB, 1'b1, "lb");
    send(1'b0, MS_BYTE, 1'b0, 32'h21, 0, 7); get(7, 1'b0, 32'h000000AB, 1'b1, "lbu");
    send(1'b0, MS_HALF, 1'b1, 32'h26, 0, 8); get(8, 1'b0, 32'hFFFFF00D, 1'b1, "lh");
    send(1'b0, MS_HALF, 1'b0, 32'h26, 0, 9); get(9, 1'b0, 32'h0000F00D, 1'b1, "lhu");
    // misaligned
    send(1'b0, MS_WORD, 1'b0, 32'h22, 0, 10); get(10, 1'b1, 0, 1'b0, "misaligned load");
    send(1'b1, MS_HALF, 1'b0, 32'h23, 0, 11); get(11, 1'b1, 0, 1'b0, "misaligned store");
    chk(sb_empty, "misaligned store not buffered");
    // store buffer capacity
    for (int i = 0; i < 4; i++) begin
      send(1'b1, MS_WORD, 1'b0, 32'h30 + 4 * i, i, 20 + i);
      get(20 + i, 1'b0, 0, 1'b0, "fill");
    end
    req = 1'b1; req_data.store = 1'b1; req_data.size = MS_WORD; req_data.base = 32'h40;
    req_data.offset = 0; #1;
    chk(!req_ready, "fifth store refused");
    req = 1'b0;
    commit = 1'b1; @(negedge clk); commit = 1'b0; #1;
    chk(req_ready, "accepted again after a commit");
    for (int i = 0; i < 3; i++) begin inval = 1'b1; @(negedge clk); end
    inval = 1'b0;
    chk(memw(32'h30) == 0 && memw(32'h34) == 32'hC0DE000D, "only committed store written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
