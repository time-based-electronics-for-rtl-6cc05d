// readout_ctrl: sequences one readout of the Petiroc2B chips of the board.
//
// Sequence (one event):
//   1. A hit pulls a chip's trigb low (trigb, nor32_t and nor32_c are all active
//      low). When a trigb is seen low and the frame buffers are free
//      (buf_ready), start_conv is raised for START_CONV_CYCLES clocks; the ASIC
//      needs at least 100 ns, which is 10 clocks at 100 MHz. start_conv is
//      shared by all chips.
//   2. The chips digitise, then each one pulls its trans_onb low and shifts out
//      its frame; frame_deser reports each finished frame on frame_done.
//   3. When every chip has delivered its frame, the controller waits for all
//      trigger lines to return high (the ASIC releases them after its
//      transfer) and goes back to idle.
// If a trigger arrives while the buffers still hold an unsent frame, the chip
// keeps its trigger low and the controller waits: bp_evt pulses once for each
// such stall. If the frames or the trigger release do not come within
// TIMEOUT_CYCLES of the end of start_conv, timeout_evt pulses and the
// controller returns to idle. The sequence follows the ASIC's readout timing;
// the buffer stall and the timeout are this design's choices.
//
// The readout bit clock clk_read runs continuously at clk/BIT_DIV. The ASIC is
// taken to change dout on its rising edge; bit_stb marks the clock in which
// clk_read has just fallen, i.e. mid-bit, when the data is sampled.
// All trigger inputs pass through a two-flop synchroniser (2 clocks latency).
module readout_ctrl #(
  parameter int unsigned N_CHIPS           = 2,
  parameter int unsigned START_CONV_CYCLES = 10,
  parameter int unsigned BIT_DIV           = 4,
  parameter int unsigned TIMEOUT_CYCLES    = 20000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_CHIPS-1:0] trigb,
  input  logic [N_CHIPS-1:0] nor32_t,
  input  logic [N_CHIPS-1:0] nor32_c,
  input  logic               buf_ready,
  input  logic [N_CHIPS-1:0] frame_done,
  output logic               start_conv,
  output logic               clk_read,
  output logic               bit_stb,
  output logic               busy,
  output logic               conv_evt,      // pulse: a conversion was started
  output logic               bp_evt,        // pulse: trigger waited for buffers
  output logic               timeout_evt    // pulse: readout abandoned
);
  localparam int unsigned HALF   = BIT_DIV / 2;
  localparam int unsigned DIV_W  = (BIT_DIV > 1) ? $clog2(BIT_DIV) : 1;
  localparam int unsigned SC_W   = $clog2(START_CONV_CYCLES + 1);
  localparam int unsigned TO_W   = $clog2(TIMEOUT_CYCLES + 1);

  typedef enum logic [1:0] {S_IDLE, S_CONV, S_FRAMES, S_RELEASE} state_t;
  state_t state;

  // ---- trigger synchronisers
  logic [3*N_CHIPS-1:0] trig_m, trig_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_m <= '1;
      trig_s <= '1;
    end else begin
      trig_m <= {nor32_c, nor32_t, trigb};
      trig_s <= trig_m;
    end
  end
  logic trig_any, all_released;
  assign trig_any     = ~&trig_s[N_CHIPS-1:0];
  assign all_released = &trig_s;

  // ---- readout bit clock
  logic [DIV_W-1:0] div_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt  <= '0;
      clk_read <= 1'b0;
      bit_stb  <= 1'b0;
    end else begin
      div_cnt  <= (32'(div_cnt) == BIT_DIV - 1) ? '0 : div_cnt + 1'b1;
      // clk_read is high while the next count is below HALF
      clk_read <= ((32'(div_cnt) == BIT_DIV - 1) ? 32'd0 : 32'(div_cnt) + 1) < HALF;
      bit_stb  <= ((32'(div_cnt) == BIT_DIV - 1) ? 32'd0 : 32'(div_cnt) + 1) == HALF;
    end
  end

  // ---- event sequencer
  logic [SC_W-1:0]    sc_cnt;
  logic [TO_W-1:0]    to_cnt;
  logic [N_CHIPS-1:0] done_mask;
  logic               stalled;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      start_conv  <= 1'b0;
      sc_cnt      <= '0;
      to_cnt      <= '0;
      done_mask   <= '0;
      stalled     <= 1'b0;
      conv_evt    <= 1'b0;
      bp_evt      <= 1'b0;
      timeout_evt <= 1'b0;
    end else begin
      conv_evt    <= 1'b0;
      bp_evt      <= 1'b0;
      timeout_evt <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (trig_any && buf_ready) begin
            state      <= S_CONV;
            start_conv <= 1'b1;
            sc_cnt     <= SC_W'(START_CONV_CYCLES - 1);
            conv_evt   <= 1'b1;
            stalled    <= 1'b0;
          end else if (trig_any && !stalled) begin
            bp_evt  <= 1'b1;
            stalled <= 1'b1;
          end
        end
        S_CONV: begin
          if (sc_cnt == '0) begin
            start_conv <= 1'b0;
            state      <= S_FRAMES;
            to_cnt     <= '0;
            done_mask  <= '0;
          end else begin
            sc_cnt <= sc_cnt - 1'b1;
          end
        end
        S_FRAMES, S_RELEASE: begin
          to_cnt <= to_cnt + 1'b1;
          if (state == S_FRAMES) begin
            done_mask <= done_mask | frame_done;
            if (&(done_mask | frame_done)) state <= S_RELEASE;
          end else if (all_released) begin
            state <= S_IDLE;
          end
          if (32'(to_cnt) == TIMEOUT_CYCLES - 1) begin
            timeout_evt <= 1'b1;
            state       <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // A conversion command always lasts the programmed number of clocks.
  property p_conv_width;
    @(posedge clk) disable iff (!rst_n) $rose(start_conv) |-> start_conv [*START_CONV_CYCLES];
  endproperty
  a_conv_width: assert property (p_conv_width);
endmodule
