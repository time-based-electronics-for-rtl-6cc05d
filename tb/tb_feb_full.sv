// tb_feb_full: one complete operation of the board firmware with every
// parameter at its default (100 MHz clock, 115200 baud UART, 640-bit
// configuration per chip, 960-bit frames): both configuration loads, one
// event on one chip and one event on both chips, each with its 64 decoded
// records and its two 122-byte UART packets checked against values worked
// out here. Same chip models and checkers as tb_feb_readout_top.
module tb_feb_full;
  import feb_pkg::*;
  localparam int CPB     = 868;          // UART clocks per bit at 100 MHz / 115200 baud
  localparam int SCB     = 640;
  localparam int TOTAL   = 2 * SCB;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---- DUT
  logic             cfg_start = 0, cfg_done, cfg_busy;
  logic [TOTAL-1:0] cfg_data = '0, cfg_readback;
  logic             sr_ck, sr_in, sr_rstb, sr_mid, sr_out;
  logic [1:0]       trigb, nor32_t, nor32_c, trans_onb, dout;
  logic             start_conv, clk_read, uart_txd, readout_busy;
  logic             uart_enable = 1'b1;
  logic [1:0]       hit_valid;
  hit_rec_t         hit [2];
  logic [15:0]      event_count, stall_count, timeout_count, frame_err_count, packet_count;

  feb_readout_top dut (.*);

  // ---- chips
  logic [31:0] inject [2];
  logic [8:0]  inj_coarse [2][32];
  logic [9:0]  inj_fine   [2][32];
  logic [9:0]  inj_charge [2][32];
  logic        mute [2];

  petiroc2b_model #(.SC_BITS(SCB)) chip0 (
    .clk_read, .inject(inject[0]), .inj_coarse(inj_coarse[0]), .inj_fine(inj_fine[0]),
    .inj_charge(inj_charge[0]), .mute(mute[0]), .start_conv,
    .trigb(trigb[0]), .nor32_t(nor32_t[0]), .nor32_c(nor32_c[0]), .trans_onb(trans_onb[0]), .dout(dout[0]),
    .sr_ck, .sr_in, .sr_rstb, .sr_out(sr_mid));
  petiroc2b_model #(.SC_BITS(SCB)) chip1 (
    .clk_read, .inject(inject[1]), .inj_coarse(inj_coarse[1]), .inj_fine(inj_fine[1]),
    .inj_charge(inj_charge[1]), .mute(mute[1]), .start_conv,
    .trigb(trigb[1]), .nor32_t(nor32_t[1]), .nor32_c(nor32_c[1]), .trans_onb(trans_onb[1]), .dout(dout[1]),
    .sr_ck, .sr_in(sr_mid), .sr_rstb, .sr_out);

  // ---- expectations for the current event
  bit          exp_hit [2][32];
  int          exp_c [2][32], exp_f [2][32], exp_q [2][32];
  int          nrec [2];
  logic [7:0]  exp_bytes [$];          // expected UART byte stream
  int          n_hits_seen = 0;

  function automatic logic [9:0] g(input int b); return 10'(b) ^ (10'(b) >> 1); endfunction

  task automatic expect_packet(input int c);
    logic [959:0] f;
    for (int ch = 0; ch < 32; ch++)
      f[959 - 30*ch -: 30] = exp_hit[c][ch] ? {g(exp_c[c][ch])[8:0], g(exp_f[c][ch]), g(exp_q[c][ch]), 1'b1} : 30'd0;
    exp_bytes.push_back(8'hA5);
    exp_bytes.push_back(8'(c));
    for (int i = 0; i < 120; i++) exp_bytes.push_back(f[959 - 8*i -: 8]);
  endtask

  // record checker
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++) if (hit_valid[c]) begin
      int ch;
      ch = int'(hit[c].chan);
      checks++;
      if (hit[c].chip != 1'(c) || ch != nrec[c] || hit[c].hit != exp_hit[c][ch]) begin
        failures++; $display("FAIL record chip %0d ch %0d (#%0d) hit=%0d", c, ch, nrec[c], hit[c].hit);
      end else if (exp_hit[c][ch]) begin
        n_hits_seen++;
        checks++;
        if (int'(hit[c].coarse) != exp_c[c][ch] || int'(hit[c].fine) != exp_f[c][ch]
            || int'(hit[c].charge) != exp_q[c][ch]
            || int'(hit[c].abs_time_ps) != (exp_c[c][ch] + 1) * 25000 - exp_f[c][ch] * 37) begin
          failures++; $display("FAIL values chip %0d ch %0d", c, ch);
        end
      end
      nrec[c] = (nrec[c] + 1) % 32;
    end
  end

  // UART receiver
  int n_uart = 0;
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      if (!rst_n) continue;
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = uart_txd; end
      repeat (CPB) @(posedge clk);
      checks++;
      if (uart_txd !== 1'b1 || exp_bytes.size() == 0 || b != exp_bytes[0]) begin
        failures++; $display("FAIL uart byte %0d: got %h", n_uart, b);
      end
      if (exp_bytes.size()) void'(exp_bytes.pop_front());
      n_uart++;
    end
  end

  task automatic clear_exp();
    for (int c = 0; c < 2; c++) for (int ch = 0; ch < 32; ch++) exp_hit[c][ch] = 0;
  endtask

  task automatic add_hit(input int c, input int ch);
    exp_hit[c][ch] = 1;
    exp_c[c][ch] = $urandom_range(511);
    exp_f[c][ch] = $urandom_range(1023);
    exp_q[c][ch] = $urandom_range(1023);
    inj_coarse[c][ch] = 9'(exp_c[c][ch]);
    inj_fine[c][ch]   = 10'(exp_f[c][ch]);
    inj_charge[c][ch] = 10'(exp_q[c][ch]);
  endtask

  task automatic fire();
    for (int c = 0; c < 2; c++) for (int ch = 0; ch < 32; ch++) inject[c][ch] = exp_hit[c][ch];
    repeat (8) @(negedge clk);
    inject[0] = '0; inject[1] = '0;
  endtask

  task automatic wait_idle_all();
    int n;
    n = 0;
    do begin @(negedge clk); n++; end
    while ((readout_busy || exp_bytes.size() != 0 || !uart_txd || dut.framer_busy) && n < 5000000);
    repeat (4 * CPB) @(negedge clk);
  endtask

  // ---- scenario
  int n_cfg = 0, n_both = 0;
  initial begin
    logic [TOTAL-1:0] pat_a, pat_b;
    inject[0] = '0; inject[1] = '0; mute[0] = 0; mute[1] = 0;
    for (int c = 0; c < 2; c++) for (int ch = 0; ch < 32; ch++) begin
      inj_coarse[c][ch] = '0; inj_fine[c][ch] = '0; inj_charge[c][ch] = '0;
    end
    nrec[0] = 0; nrec[1] = 0;
    clear_exp();
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (40) @(negedge clk);

    // configuration, twice
    for (int i = 0; i < TOTAL / 32; i++) begin pat_a[32*i +: 32] = $urandom; pat_b[32*i +: 32] = $urandom; end
    for (int k = 0; k < 2; k++) begin
      cfg_data = k ? pat_b : pat_a;
      @(negedge clk); cfg_start = 1; @(negedge clk); cfg_start = 0;
      while (!cfg_done || cfg_busy) @(negedge clk);
      checks++;
      if (chip1.sr != cfg_data[TOTAL-1 -: SCB] || chip0.sr != cfg_data[SCB-1:0]
          || cfg_readback != (k ? pat_a : '0)) begin
        failures++; $display("FAIL configuration load %0d", k);
      end else n_cfg++;
      repeat (5) @(negedge clk);
    end

    // event 1: chip 0, channels 0 and 4 (as in the single-injection tests)
    clear_exp(); add_hit(0, 0); add_hit(0, 4);
    expect_packet(0); expect_packet(1);
    fire();
    wait_idle_all();

    // event 2: both chips
    clear_exp(); add_hit(0, 8); add_hit(1, 29); add_hit(1, 0);
    expect_packet(0); expect_packet(1);
    fire();
    n_both++;
    wait_idle_all();

    // ---- summary checks
    checks++; if (exp_bytes.size() != 0) begin failures++; $display("FAIL %0d UART bytes missing", exp_bytes.size()); end
    checks++; if (event_count != 2) begin failures++; $display("FAIL event_count %0d", event_count); end
    checks++; if (packet_count != 4) begin failures++; $display("FAIL packet_count %0d", packet_count); end
    checks++; if (frame_err_count != 0) begin failures++; $display("FAIL frame errors %0d", frame_err_count); end
    $display("mechanisms: config=%0d conversions=%0d both_chips=%0d stalls=%0d timeouts=%0d packets=%0d hits=%0d uart_bytes=%0d",
             n_cfg, event_count, n_both, stall_count, timeout_count, packet_count, n_hits_seen, n_uart);
    checks++; if (n_cfg == 0)         begin failures++; $display("FAIL no configuration"); end
    checks++; if (event_count == 0)   begin failures++; $display("FAIL no conversion"); end
    checks++; if (n_both == 0)        begin failures++; $display("FAIL no two-chip event"); end
    checks++; if (timeout_count != 0) begin failures++; $display("FAIL unexpected time-out"); end
    checks++; if (packet_count == 0)  begin failures++; $display("FAIL no packet"); end
    checks++; if (n_hits_seen != 5)  begin failures++; $display("FAIL hits decoded %0d", n_hits_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
