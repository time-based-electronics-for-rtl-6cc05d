// tb_uart_tx: sends random bytes through uart_tx at 16 clocks per bit and
// decodes the serial line independently (start bit, 8 data bits LSB first,
// stop bit, sampled mid-bit); checks each byte, the framing and that one
// byte takes 10 bit times.
module tb_uart_tx;
  localparam int CPB = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid = 0, ready, txd;
  logic [7:0] data = 0;
  logic [7:0] sent [$];
  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);
  always #5 clk = ~clk;

  // receiver
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      checks++; if (txd !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      checks++; if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      checks++;
      if (sent.size() == 0 || b != sent[0]) begin failures++; $display("FAIL byte got %h", b); end
      if (sent.size() > 0) void'(sent.pop_front());
    end
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      valid = 1; data = 8'($urandom);
      sent.push_back(data);
      @(posedge clk); t0 = $time;
      @(negedge clk); valid = 0;
      while (!ready) @(negedge clk);
      t1 = $time;
      checks++;
      if ((t1 - t0) / 10 < 10 * CPB - 1 || (t1 - t0) / 10 > 10 * CPB + 1) begin
        failures++; $display("FAIL byte time %0d clocks", (t1 - t0) / 10);
      end
      if (n % 5 == 0) repeat ($urandom_range(40)) @(posedge clk);
    end
    repeat (CPB * 2) @(posedge clk);
    checks++; if (sent.size() != 0) begin failures++; $display("FAIL %0d bytes not received", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
