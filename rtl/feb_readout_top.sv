// feb_readout_top: FPGA firmware of the T-SDHCAL timing front-end board.
//
// The board carries two 32-channel Petiroc2B ASICs that time-stamp MRPC
// signals (9-bit coarse time on the 40 MHz clock plus a 10-bit, 37 ps TDC
// interpolation) and digitise their charge. This top joins:
//   * sc_config      - loads both chips' configuration through their daisy
//                      chain and reads the old chain contents back;
//   * readout_ctrl   - on a trigger raises start_conv (>= 100 ns), runs the
//                      readout bit clock and waits for both frames and for the
//                      triggers to be released;
//   * frame_deser x2 - receive each chip's 960-bit frame while its trans_onb
//                      is low;
//   * channel_decoder x2 - Gray-decode each 30-bit channel word and compute
//                      abs_time_ps = (coarse+1)*25 ns - fine*37 ps;
//   * sync_fifo x2, tx_framer, uart_tx - keep each raw frame and send it to
//                      the PC as [A5][chip][120 bytes].
// With uart_enable high, a new conversion is started only when both frame
// FIFOs are empty and no packet is waiting, so a hit that comes while the UART
// is still busy is held by the chip (its trigger stays low) until the frames
// have gone out. With uart_enable low the raw frames are not kept, nothing is
// sent, and the readout runs at the full rate of the serial link, the decoded
// records being the only output (for capture by an on-chip logic analyser
// over JTAG). uart_enable should only change while readout_busy is low and no
// packet is in flight.
//
// The decoded channel records (hit_valid/hit) come out one per clock per chip
// as the frame arrives, for an on-chip logic analyser or later processing.
// Chip pins: index 0 is the first chip of the board, index 1 the second.
module feb_readout_top
  import feb_pkg::*;
#(
  parameter int unsigned N_CHIPS           = 2,
  parameter int unsigned CLK_HZ            = 100_000_000,
  parameter int unsigned BAUD              = 115_200,
  parameter int unsigned START_CONV_CYCLES = 10,
  parameter int unsigned BIT_DIV           = 4,
  parameter int unsigned TIMEOUT_CYCLES    = 20000,
  parameter int unsigned SC_BITS_PER_CHIP  = 640,
  parameter int unsigned SC_DIV            = 10,
  parameter int unsigned FIFO_DEPTH        = 128
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // configuration
  input  logic                                cfg_start,
  input  logic [N_CHIPS*SC_BITS_PER_CHIP-1:0] cfg_data,
  output logic                                cfg_done,
  output logic                                cfg_busy,
  output logic [N_CHIPS*SC_BITS_PER_CHIP-1:0] cfg_readback,
  output logic                                sr_ck,
  output logic                                sr_in,
  output logic                                sr_rstb,
  input  logic                                sr_out,
  // trigger and readout pins
  input  logic [N_CHIPS-1:0]                  trigb,
  input  logic [N_CHIPS-1:0]                  nor32_t,
  input  logic [N_CHIPS-1:0]                  nor32_c,
  output logic                                start_conv,
  output logic                                clk_read,
  input  logic [N_CHIPS-1:0]                  trans_onb,
  input  logic [N_CHIPS-1:0]                  dout,
  // to the PC
  input  logic                                uart_enable,
  output logic                                uart_txd,
  // decoded data and status
  output logic [N_CHIPS-1:0]                  hit_valid,
  output hit_rec_t                            hit [N_CHIPS],
  output logic                                readout_busy,
  output logic [15:0]                         event_count,
  output logic [15:0]                         stall_count,
  output logic [15:0]                         timeout_count,
  output logic [15:0]                         frame_err_count,
  output logic [15:0]                         packet_count
);
  localparam int unsigned CLKS_PER_BIT = (CLK_HZ + BAUD / 2) / BAUD;

  // ---- configuration chain
  sc_config #(.N_CHIPS(N_CHIPS), .BITS_PER_CHIP(SC_BITS_PER_CHIP), .SC_DIV(SC_DIV)) u_sc (
    .clk, .rst_n, .start(cfg_start), .cfg(cfg_data),
    .sr_ck, .sr_in, .sr_rstb, .sr_out,
    .busy(cfg_busy), .done(cfg_done), .readback(cfg_readback));

  // ---- readout sequencing
  logic               bit_stb, buf_ready, framer_busy;
  logic               conv_evt, bp_evt, timeout_evt, pkt_evt;
  logic [N_CHIPS-1:0] frame_done, frame_err;
  logic [N_CHIPS-1:0] fifo_empty, fifo_pop;
  logic [7:0]         fifo_dout [N_CHIPS];

  // With the UART path off, frames only feed the decoders and nothing waits.
  logic [N_CHIPS-1:0] frame_to_tx;
  assign frame_to_tx = frame_done & {N_CHIPS{uart_enable}};
  assign buf_ready   = !uart_enable || ((&fifo_empty) && !framer_busy);

  readout_ctrl #(.N_CHIPS(N_CHIPS), .START_CONV_CYCLES(START_CONV_CYCLES),
                 .BIT_DIV(BIT_DIV), .TIMEOUT_CYCLES(TIMEOUT_CYCLES)) u_ctrl (
    .clk, .rst_n, .trigb, .nor32_t, .nor32_c, .buf_ready, .frame_done,
    .start_conv, .clk_read, .bit_stb, .busy(readout_busy),
    .conv_evt, .bp_evt, .timeout_evt);

  // ---- per-chip receive path
  for (genvar c = 0; c < int'(N_CHIPS); c++) begin : g_chip
    logic                 byte_valid, word_valid;
    logic [7:0]           byte_data;
    logic [WORD_BITS-1:0] word_data;
    logic [CHAN_W-1:0]    word_chan;
    logic                 trans_s, dout_s;

    // retime the pad inputs once; bit_stb is mid-bit so one clock of delay is safe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        trans_s <= 1'b1;
        dout_s  <= 1'b0;
      end else begin
        trans_s <= trans_onb[c];
        dout_s  <= dout[c];
      end
    end

    frame_deser u_deser (
      .clk, .rst_n, .bit_stb, .trans_onb(trans_s), .dout(dout_s),
      .byte_valid, .byte_data, .word_valid, .word_data, .word_chan,
      .frame_done(frame_done[c]), .frame_err(frame_err[c]));

    channel_decoder #(.CHIP(c[0])) u_dec (
      .clk, .rst_n, .in_valid(word_valid), .in_word(word_data), .in_chan(word_chan),
      .out_valid(hit_valid[c]), .out_rec(hit[c]));

    sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .push(byte_valid && uart_enable), .din(byte_data),
      .pop(fifo_pop[c]), .dout(fifo_dout[c]), .empty(fifo_empty[c]),
      .full(), .count());
  end

  // ---- UART path
  logic       tx_valid, tx_ready;
  logic [7:0] tx_data;

  tx_framer #(.N_CHIPS(N_CHIPS), .FRAME_BYTES(FRAME_BYTES)) u_framer (
    .clk, .rst_n, .frame_done(frame_to_tx), .fifo_dout, .fifo_empty, .fifo_pop,
    .tx_valid, .tx_data, .tx_ready, .busy(framer_busy), .pkt_evt);

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .valid(tx_valid), .data(tx_data), .ready(tx_ready), .txd(uart_txd));

  // ---- status counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      event_count     <= '0;
      stall_count     <= '0;
      timeout_count   <= '0;
      frame_err_count <= '0;
      packet_count    <= '0;
    end else begin
      event_count     <= event_count   + 16'(conv_evt);
      stall_count     <= stall_count   + 16'(bp_evt);
      timeout_count   <= timeout_count + 16'(timeout_evt);
      frame_err_count <= frame_err_count + 16'(|frame_err);
      packet_count    <= packet_count  + 16'(pkt_evt);
    end
  end
endmodule
