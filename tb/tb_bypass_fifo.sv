// tb_bypass_fifo: checks that a value enqueued into the empty FIFO is visible and can
// be dequeued in the same cycle, that stored values leave in order, the full flag,
// and random enqueue/dequeue traffic against a queue model.
// Same-cycle enqueue-to-dequeue visibility is the design's requirement; the depth is
// this implementation's choice.
module tb_bypass_fifo;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  logic enq = 1'b0, deq = 1'b0, full, deq_valid;
  logic [15:0] enq_data = '0, deq_data;
  logic [15:0] q [$];
  int checks = 0, failures = 0, bypassed = 0;

  bypass_fifo #(.W(16), .DEPTH(2)) dut (.*);

  initial begin
    @(negedge clk) rst_n = 1'b1;
    // same-cycle pass-through
    enq = 1'b1; enq_data = 16'hBEEF; deq = 1'b1;
    #1;
    checks++;
    if (!deq_valid || deq_data !== 16'hBEEF) begin
      failures++; $display("no bypass: valid=%b data=%h", deq_valid, deq_data);
    end
    @(negedge clk);
    enq = 1'b0; deq = 1'b0;
    #1;
    checks++;
    if (deq_valid) begin failures++; $display("bypassed value was also stored"); end
    // fill
    enq = 1'b1; enq_data = 16'h0001; @(negedge clk);
    enq_data = 16'h0002; @(negedge clk);
    enq = 1'b0; #1;
    checks++;
    if (!full) begin failures++; $display("not full after 2"); end
    deq = 1'b1; #1;
    checks++; if (deq_data !== 16'h0001) begin failures++; $display("order 1"); end
    @(negedge clk); #1;
    checks++; if (deq_data !== 16'h0002) begin failures++; $display("order 2"); end
    @(negedge clk); deq = 1'b0;
    // random traffic
    for (int i = 0; i < 500; i++) begin
      enq = $urandom_range(0, 1) && !full;
      enq_data = 16'($urandom);
      deq = $urandom_range(0, 1);
      #1;
      if (enq) q.push_back(enq_data);
      if (deq && deq_valid) begin
        checks++;
        if (q.size() == 1 && enq) bypassed++;
        if (q.size() == 0 || deq_data !== q[0]) begin
          failures++; $display("random: got %h", deq_data);
        end else void'(q.pop_front());
      end
      checks++;
      if (deq_valid !== (q.size() != 0 || (deq && deq_valid))) begin
        failures++; $display("valid flag wrong");
      end
      @(negedge clk);
    end
    checks++;
    if (bypassed == 0) begin failures++; $display("random traffic never bypassed"); end
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
