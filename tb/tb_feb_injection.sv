// tb_feb_injection: the board's timing measurements, run on the firmware at its
// default parameters with the UART path off (records captured as by a logic
// analyser). A periodic pulse is injected into one channel, as on the test
// bench: the chip models are given the coarse and fine codes that a hit at the
// true pulse time would produce (coarse = 25 ns periods on a 9-bit counter,
// fine = 37 ps steps back from the end of the period), with a little random
// jitter. Checked:
//   1. neighbour hits on one chip at 10 kHz and 25 kHz, channels 0, 4, 29:
//      every time difference between consecutive decoded hits, taken modulo the
//      12.8 us coarse-counter loop, equals the pulse period modulo 12.8 us
//      (10.40 us and 1.60 us) within the jitter plus one fine step, and no
//      pulse is missed;
//   2. the same pulse into both chips, whose coarse counters are taken to be
//      5.8 us apart: the chip-to-chip difference is the same for every hit.
module tb_feb_injection;
  import feb_pkg::*;
  localparam longint LOOP_PS = 512 * 25000;     // 12.8 us
  localparam longint OFFS_PS = 5_800_000;       // chip 1 counter phase
  localparam int     JIT_PS  = 20;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             cfg_start = 0, cfg_done, cfg_busy;
  logic [1279:0]    cfg_data = '0, cfg_readback;
  logic             sr_ck, sr_in, sr_rstb, sr_mid, sr_out;
  logic [1:0]       trigb, nor32_t, nor32_c, trans_onb, dout;
  logic             start_conv, clk_read, uart_txd, readout_busy;
  logic             uart_enable = 1'b0;
  logic [1:0]       hit_valid;
  hit_rec_t         hit [2];
  logic [15:0]      event_count, stall_count, timeout_count, frame_err_count, packet_count;

  feb_readout_top dut (.*);

  logic [31:0] inject [2];
  logic [8:0]  inj_coarse [2][32];
  logic [9:0]  inj_fine   [2][32];
  logic [9:0]  inj_charge [2][32];
  logic        mute [2];

  petiroc2b_model chip0 (
    .clk_read, .inject(inject[0]), .inj_coarse(inj_coarse[0]), .inj_fine(inj_fine[0]),
    .inj_charge(inj_charge[0]), .mute(mute[0]), .start_conv,
    .trigb(trigb[0]), .nor32_t(nor32_t[0]), .nor32_c(nor32_c[0]), .trans_onb(trans_onb[0]), .dout(dout[0]),
    .sr_ck, .sr_in, .sr_rstb, .sr_out(sr_mid));
  petiroc2b_model chip1 (
    .clk_read, .inject(inject[1]), .inj_coarse(inj_coarse[1]), .inj_fine(inj_fine[1]),
    .inj_charge(inj_charge[1]), .mute(mute[1]), .start_conv,
    .trigb(trigb[1]), .nor32_t(nor32_t[1]), .nor32_c(nor32_c[1]), .trans_onb(trans_onb[1]), .dout(dout[1]),
    .sr_ck, .sr_in(sr_mid), .sr_rstb, .sr_out);

  // capture the decoded time of the channel under test, per chip
  int     tchan = 0;
  longint t_rec [2][$];
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < 2; c++)
      if (hit_valid[c] && hit[c].hit && int'(hit[c].chan) == tchan)
        t_rec[c].push_back(longint'(hit[c].abs_time_ps));

  function automatic longint pmod(input longint a);
    longint r;
    r = a % LOOP_PS;
    return (r < 0) ? r + LOOP_PS : r;
  endfunction

  // codes a hit at chip time t (ps) produces
  task automatic set_codes(input int c, input int ch, input longint t);
    longint tc, co, fi;
    tc = pmod(t);
    co = tc / 25000;
    fi = ((co + 1) * 25000 - tc + 18) / 37;
    inj_coarse[c][ch] = 9'(co);
    inj_fine[c][ch]   = 10'(fi);
    inj_charge[c][ch] = 10'($urandom_range(1023));
  endtask

  // inject npulse pulses with period per_ps into channel ch of the chips in mask
  task automatic run(input longint per_ps, input int ch, input logic [1:0] mask, input int npulse);
    longint t0;
    t0 = longint'($urandom_range(1_000_000));
    tchan = ch;
    t_rec[0].delete(); t_rec[1].delete();
    for (int n = 0; n < npulse; n++) begin
      longint t;
      t = t0 + n * per_ps + longint'($urandom_range(JIT_PS));
      set_codes(0, ch, t);
      set_codes(1, ch, t + OFFS_PS);
      @(negedge clk);
      inject[0][ch] = mask[0]; inject[1][ch] = mask[1];
      repeat (8) @(negedge clk);
      inject[0] = '0; inject[1] = '0;
      repeat (int'(per_ps / 10000) - 9) @(negedge clk);
    end
    repeat (5000) @(negedge clk);
  endtask

  task automatic check_neighbours(input int c, input longint per_ps, input int npulse);
    longint expd, d;
    expd = pmod(per_ps);
    checks++;
    if (t_rec[c].size() != npulse) begin
      failures++; $display("FAIL chip %0d: %0d hits of %0d", c, t_rec[c].size(), npulse);
    end
    for (int i = 1; i < t_rec[c].size(); i++) begin
      d = pmod(t_rec[c][i] - t_rec[c][i-1]);
      checks++;
      if (d < expd - JIT_PS - 37 || d > expd + JIT_PS + 37) begin
        failures++; $display("FAIL chip %0d dt=%0d ps, expected %0d", c, d, expd);
      end
    end
    if (t_rec[c].size() > 1)
      $display("chip %0d channel %0d period %0d ps: dt mod 12.8us = %0d ps", c, tchan, per_ps,
               pmod(t_rec[c][1] - t_rec[c][0]));
  endtask

  initial begin
    int nruns;
    longint d12, d12_0;
    inject[0] = '0; inject[1] = '0; mute[0] = 0; mute[1] = 0;
    for (int c = 0; c < 2; c++) for (int ch = 0; ch < 32; ch++) begin
      inj_coarse[c][ch] = '0; inj_fine[c][ch] = '0; inj_charge[c][ch] = '0;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (20) @(negedge clk);
    nruns = 0;
    // 1. neighbour hits, one chip at a time: 8 hits give 7 differences
    run(100_000_000, 0, 2'b01, 8);  check_neighbours(0, 100_000_000, 8);  nruns++;
    run(40_000_000,  0, 2'b01, 8);  check_neighbours(0, 40_000_000, 8);   nruns++;
    run(40_000_000,  4, 2'b01, 8);  check_neighbours(0, 40_000_000, 8);   nruns++;
    run(40_000_000, 29, 2'b01, 8);  check_neighbours(0, 40_000_000, 8);   nruns++;
    run(100_000_000, 0, 2'b10, 8);  check_neighbours(1, 100_000_000, 8);  nruns++;
    run(40_000_000,  4, 2'b10, 8);  check_neighbours(1, 40_000_000, 8);   nruns++;
    // 2. both chips, same pulse, 20 hits at 25 kHz
    run(40_000_000, 0, 2'b11, 20);
    check_neighbours(0, 40_000_000, 20); check_neighbours(1, 40_000_000, 20);
    nruns++;
    checks++;
    if (t_rec[0].size() != 20 || t_rec[1].size() != 20) begin
      failures++; $display("FAIL two-chip run incomplete");
    end else begin
      d12_0 = pmod(t_rec[1][0] - t_rec[0][0]);
      for (int i = 0; i < 20; i++) begin
        d12 = pmod(t_rec[1][i] - t_rec[0][i]);
        checks++;
        if (d12 < d12_0 - 74 || d12 > d12_0 + 74 || d12 < OFFS_PS - 74 || d12 > OFFS_PS + 74) begin
          failures++; $display("FAIL dt12=%0d", d12);
        end
      end
      $display("two chips: dt12 = %0d ps", d12_0);
    end
    checks++; if (stall_count != 0 || timeout_count != 0 || frame_err_count != 0 || packet_count != 0) begin
      failures++; $display("FAIL status stalls=%0d timeouts=%0d errors=%0d packets=%0d",
                           stall_count, timeout_count, frame_err_count, packet_count);
    end
    $display("runs=%0d conversions=%0d", nruns, event_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
