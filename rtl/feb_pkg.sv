// feb_pkg: constants and types shared by the front-end-board readout firmware.
//
// The Petiroc2B readout ASIC sends, after each conversion, a 960-bit Gray-coded
// frame: 32 channels x 30 bits, each channel holding a 9-bit coarse time
// (counted on the 40 MHz clock), a 10-bit fine time (37 ps per code), a 10-bit
// charge and a 1-bit hit flag. Field widths, frame length, clock period and TDC
// step are the ASIC's own numbers; the order of the fields inside a channel word
// and of the channels inside the frame is this design's choice (see
// channel_decoder and frame_deser).
package feb_pkg;

  localparam int unsigned N_CHANNELS  = 32;
  localparam int unsigned COARSE_W    = 9;
  localparam int unsigned FINE_W      = 10;
  localparam int unsigned CHARGE_W    = 10;
  localparam int unsigned WORD_BITS   = COARSE_W + FINE_W + CHARGE_W + 1;   // 30
  localparam int unsigned FRAME_BITS  = N_CHANNELS * WORD_BITS;             // 960
  localparam int unsigned FRAME_BYTES = FRAME_BITS / 8;                      // 120
  localparam int unsigned CHAN_W      = $clog2(N_CHANNELS);

  // Absolute time in ps: (coarse+1)*25000 - fine*37 spans -37851 .. 12.8e6,
  // so a signed 25-bit value holds it.
  localparam int unsigned TIME_W      = 25;

  // One decoded channel of one chip.
  typedef struct packed {
    logic                       chip;       // 0 = first chip of the board, 1 = second
    logic [CHAN_W-1:0]          chan;
    logic [COARSE_W-1:0]        coarse;     // binary, units of the 40 MHz period
    logic [FINE_W-1:0]          fine;       // binary, units of the TDC step
    logic [CHARGE_W-1:0]        charge;     // binary ADC code
    logic                       hit;
    logic signed [TIME_W-1:0]   abs_time_ps;
  } hit_rec_t;

endpackage
