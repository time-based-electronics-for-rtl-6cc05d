// tb_readout_ctrl: exercises the readout sequence with the chips replaced by
// direct stimulus. Checks the readout clock (period BIT_DIV, bit_stb one clock
// after each falling edge), that start_conv follows a trigger within the
// synchroniser delay and lasts exactly 10 clocks (100 ns at 100 MHz), that the
// controller waits for both frames and for the trigger release, the stall when
// the buffers are busy (one bp_evt, no start_conv until buf_ready) and the
// time-out when a chip never answers. TIMEOUT_CYCLES is reduced to 300.
module tb_readout_ctrl;
  localparam int TO = 300;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] trigb = '1, nor32_t = '1, nor32_c = '1, frame_done = '0;
  logic buf_ready = 1;
  logic start_conv, clk_read, bit_stb, busy, conv_evt, bp_evt, timeout_evt;
  int nconv = 0, nbp = 0, nto = 0;
  readout_ctrl #(.N_CHIPS(2), .START_CONV_CYCLES(10), .BIT_DIV(4), .TIMEOUT_CYCLES(TO)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && conv_evt) nconv++;
    if (rst_n && bp_evt) nbp++;
    if (rst_n && timeout_evt) nto++;
  end

  // readout clock checker
  logic clk_read_d = 0;
  int rise_t = -1;
  bit sampled = 0;
  always @(posedge clk) if (rst_n && $time > 100) begin
    clk_read_d <= clk_read;
    sampled <= 1'b1;
    if (sampled && clk_read && !clk_read_d) begin
      if (rise_t >= 0) begin
        checks++; if ($time - rise_t != 40) begin failures++; $display("FAIL clk_read period at %0t", $time); end
      end
      rise_t = $time;
    end
    if (rise_t >= 0) checks++;
    if (rise_t >= 0 && bit_stb != (!clk_read && clk_read_d)) begin failures++; $display("FAIL bit_stb at %0t", $time); end
  end

  task automatic conv_width(output int width, output int lat);
    width = 0; lat = 0;
    while (!start_conv && lat < 50) begin @(negedge clk); lat++; end
    while (start_conv) begin @(negedge clk); width++; end
  endtask

  initial begin
    int w, l;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    // --- normal event, chip 0 hit
    trigb[0] = 0; nor32_t[0] = 0; nor32_c[0] = 0;
    conv_width(w, l);
    checks++; if (w != 10 || l > 4) begin failures++; $display("FAIL conv width %0d lat %0d", w, l); end
    repeat (30) @(negedge clk);
    frame_done = 2'b01; @(negedge clk); frame_done = 0;
    repeat (10) @(negedge clk);
    checks++; if (!busy) begin failures++; $display("FAIL left before second frame"); end
    frame_done = 2'b10; @(negedge clk); frame_done = 0;
    repeat (10) @(negedge clk);
    checks++; if (!busy) begin failures++; $display("FAIL left before trigger release"); end
    trigb = '1; nor32_t = '1; nor32_c = '1;
    repeat (5) @(negedge clk);
    checks++; if (busy) begin failures++; $display("FAIL not idle after release"); end
    // --- stall: buffers busy
    buf_ready = 0;
    trigb[1] = 0;
    repeat (50) @(negedge clk);
    checks++; if (start_conv || busy || nbp != 1) begin failures++; $display("FAIL stall: bp=%0d", nbp); end
    buf_ready = 1;
    conv_width(w, l);
    checks++; if (w != 10) begin failures++; $display("FAIL conv after stall %0d", w); end
    frame_done = 2'b11; @(negedge clk); frame_done = 0;
    trigb = '1;
    repeat (5) @(negedge clk);
    checks++; if (busy) begin failures++; $display("FAIL idle after stall event"); end
    // --- time-out: only one chip answers
    trigb[0] = 0;
    conv_width(w, l);
    frame_done = 2'b01; @(negedge clk); frame_done = 0;
    trigb = '1;
    repeat (TO + 20) @(negedge clk);
    checks++; if (busy || nto != 1) begin failures++; $display("FAIL timeout: busy=%0d nto=%0d", busy, nto); end
    checks++; if (nconv != 3) begin failures++; $display("FAIL conversions %0d", nconv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
