// tb_sync_fifo: random pushes and pops against a queue reference model;
// checks the head word, empty/full/count, and that data survives filling the
// FIFO to its 128-word depth and draining it.
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [7:0] din = 0, dout;
  logic empty, full;
  logic [7:0] count;
  logic [7:0] q [$];
  sync_fifo #(.WIDTH(8), .DEPTH(128)) dut (.*);
  always #5 clk = ~clk;

  task automatic step(input bit pu, input bit po);
    @(negedge clk);
    checks++;
    if (empty != (q.size() == 0) || full != (q.size() == 128) || int'(count) != q.size()
        || (q.size() > 0 && dout != q[0])) begin
      failures++; $display("FAIL size=%0d count=%0d empty=%0d full=%0d", q.size(), count, empty, full);
    end
    push = pu && (q.size() < 128) && !full;  // never overrun the DUT
    pop  = po && (q.size() > 0);
    din  = 8'($urandom);
    @(posedge clk);
    if (pop)  void'(q.pop_front());
    if (push) q.push_back(din);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) step(1'($urandom), 1'($urandom));
    for (int i = 0; i < 140; i++) step(1, 0);
    checks++; if (!full) begin failures++; $display("FAIL not full"); end
    for (int i = 0; i < 140; i++) step(0, 1);
    checks++; if (!empty) begin failures++; $display("FAIL not empty"); end
    @(negedge clk); push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
