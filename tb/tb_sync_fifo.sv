// tb_sync_fifo: checks the get/put channel FIFO: an entry becomes visible the cycle
// after it is enqueued, entries leave in order, full is reported, and enqueue while
// full succeeds when a dequeue happens in the same cycle; random traffic against a
// queue model.
// The FIFO is a generic channel buffer; its depth and full/empty timing are this
// implementation's choices.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  logic enq = 1'b0, deq = 1'b0, full, deq_valid;
  logic [15:0] enq_data = '0, deq_data;
  logic [15:0] q [$];
  int checks = 0, failures = 0;

  sync_fifo #(.W(16), .DEPTH(4)) dut (.*);

  initial begin
    @(negedge clk) rst_n = 1'b1;
    enq = 1'b1; enq_data = 16'h1111; #1;
    checks++;
    if (deq_valid) begin failures++; $display("visible in the enqueue cycle"); end
    @(negedge clk); enq = 1'b0; #1;
    checks++;
    if (!deq_valid || deq_data !== 16'h1111) begin failures++; $display("not visible next cycle"); end
    deq = 1'b1; @(negedge clk); deq = 1'b0;
    for (int i = 0; i < 4; i++) begin enq = 1'b1; enq_data = 16'(i); @(negedge clk); end
    enq = 1'b0; #1;
    checks++; if (!full) begin failures++; $display("not full"); end
    enq = 1'b1; deq = 1'b1; enq_data = 16'h00AA; #1;
    checks++; if (full) begin failures++; $display("full while dequeuing"); end
    @(negedge clk); enq = 1'b0;
    for (int i = 1; i < 4; i++) begin
      #1; checks++;
      if (deq_data !== 16'(i)) begin failures++; $display("order %0d: %h", i, deq_data); end
      @(negedge clk);
    end
    #1; checks++; if (deq_data !== 16'h00AA) begin failures++; $display("last"); end
    @(negedge clk); deq = 1'b0;
    for (int i = 0; i < 600; i++) begin
      enq = $urandom_range(0, 1);
      enq_data = 16'($urandom);
      deq = $urandom_range(0, 2) != 0;
      #1;
      if (enq && full) enq = 1'b0;
      if (deq && deq_valid) begin
        checks++;
        if (q.size() == 0 || deq_data !== q[0]) begin failures++; $display("random mismatch"); end
        else void'(q.pop_front());
      end
      if (enq) q.push_back(enq_data);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
