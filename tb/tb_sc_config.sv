// tb_sc_config: two 640-bit shift registers stand in for the daisy-chained
// configuration registers of the two chips. Loads three random patterns and
// checks, after each load, the contents of both chip registers (the last chip
// must hold cfg's upper half), the readback (the previous pattern, or zero
// after the power-up clear), the number of sr_ck pulses (1280) and the load
// time (1280 bits x SC_DIV clocks).
module tb_sc_config;
  localparam int BITS = 640, N = 2, TOTAL = BITS * N, DIV = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [TOTAL-1:0] cfg = '0, readback, prev;
  logic sr_ck, sr_in, sr_rstb, sr_out, busy, done;
  logic [BITS-1:0] chip0 = '1, chip1 = '1;
  int nck = 0;
  sc_config #(.N_CHIPS(N), .BITS_PER_CHIP(BITS), .SC_DIV(DIV)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge sr_ck or negedge sr_rstb)
    if (!sr_rstb) begin chip0 <= '0; chip1 <= '0; end
    else begin
      chip0 <= {chip0[BITS-2:0], sr_in};
      chip1 <= {chip1[BITS-2:0], chip0[BITS-1]};
      nck++;
    end
  assign sr_out = chip1[BITS-1];

  initial begin
    int t0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3 * DIV) @(posedge clk);
    checks++; if (!sr_rstb || chip0 != '0) begin failures++; $display("FAIL power-up clear"); end
    prev = '0;
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < TOTAL / 32; i++) cfg[32*i +: 32] = $urandom;
      nck = 0;
      @(negedge clk); start = 1; t0 = $time; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (chip1 != cfg[TOTAL-1 -: BITS] || chip0 != cfg[BITS-1:0]) begin
        failures++; $display("FAIL load %0d: chip contents", k);
      end
      checks++; if (readback != prev) begin failures++; $display("FAIL load %0d: readback", k); end
      checks++; if (nck != TOTAL) begin failures++; $display("FAIL load %0d: %0d clocks", k, nck); end
      checks++;
      if (($time - t0) / 10 < TOTAL * DIV || ($time - t0) / 10 > TOTAL * DIV + 3) begin
        failures++; $display("FAIL load time %0d", ($time - t0) / 10);
      end
      prev = cfg;
    end
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
