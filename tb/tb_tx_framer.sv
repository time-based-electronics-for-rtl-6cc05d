// tb_tx_framer: two sync_fifo instances are filled with random frames and
// marked done; a UART stand-in accepts bytes with random stalls. Checks the
// packet layout [A5][chip][FRAME_BYTES data] for each chip, the serving order
// (lower chip first when both are pending), that tx_data holds during a stall
// and that the FIFOs end empty. FRAME_BYTES is reduced to 16 here.
module tb_tx_framer;
  localparam int FB = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] frame_done = 0, fifo_empty, fifo_pop, push = 0;
  logic [7:0] fifo_dout [2];
  logic [7:0] din = 0;
  logic tx_valid, tx_ready = 0, busy, pkt_evt;
  logic [7:0] tx_data;
  logic [7:0] expect_q [$];
  int npkt = 0;

  for (genvar c = 0; c < 2; c++) begin : g_f
    sync_fifo #(.WIDTH(8), .DEPTH(32)) u_f (.clk, .rst_n, .push(push[c]), .din, .pop(fifo_pop[c]),
      .dout(fifo_dout[c]), .empty(fifo_empty[c]), .full(), .count());
  end
  tx_framer #(.N_CHIPS(2), .FRAME_BYTES(FB)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    tx_ready <= 1'($urandom_range(3) == 0);
    if (pkt_evt) npkt++;
    if (tx_valid && tx_ready) begin
      checks++;
      if (expect_q.size() == 0 || tx_data != expect_q[0]) begin
        failures++; $display("FAIL got %h exp %h", tx_data, expect_q.size() ? expect_q[0] : 8'hxx);
      end
      if (expect_q.size()) void'(expect_q.pop_front());
    end
  end

  task automatic fill(input int c, ref logic [7:0] data [FB]);
    for (int i = 0; i < FB; i++) begin
      @(negedge clk); push = 2'b1 << c; din = data[i];
    end
    @(negedge clk); push = 0;
  endtask

  initial begin
    logic [7:0] d0 [FB], d1 [FB];
    repeat (2) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < FB; i++) begin d0[i] = 8'($urandom); d1[i] = 8'($urandom); end
      // chip 1 fills first, both marked done in the same clock: chip 0 goes first
      fill(1, d1); fill(0, d0);
      expect_q.push_back(8'hA5); expect_q.push_back(8'd0);
      foreach (d0[i]) expect_q.push_back(d0[i]);
      expect_q.push_back(8'hA5); expect_q.push_back(8'd1);
      foreach (d1[i]) expect_q.push_back(d1[i]);
      @(negedge clk); frame_done = 2'b11; @(negedge clk); frame_done = 0;
      while (busy) @(negedge clk);
      checks++;
      if (expect_q.size() != 0 || fifo_empty != 2'b11) begin
        failures++; $display("FAIL round %0d left %0d", round, expect_q.size());
      end
    end
    checks++; if (npkt != 6) begin failures++; $display("FAIL packets %0d", npkt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
