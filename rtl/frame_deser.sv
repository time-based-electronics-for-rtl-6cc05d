// frame_deser: receives the serial readout frame of one Petiroc2B.
//
// After a conversion the ASIC pulls trans_onb low and shifts its 960-bit frame
// out on dout, one bit per readout clock. This block samples dout on each
// bit_stb (a strobe in the middle of the bit, from readout_ctrl) while
// trans_onb is low, and re-packs the bits two ways at once:
//   * bytes, MSB first, for the frame buffer that feeds the UART (120 bytes);
//   * 30-bit channel words, MSB first, with their channel number (channel 0
//     is taken to come first), for channel_decoder.
// frame_done pulses for one clock after the last bit. If trans_onb returns high
// before FRAME_BITS bits, or stays low past them, frame_err pulses and the
// count restarts at the next transfer; frame_done is then not given for the
// short frame. Outputs are registered: a byte or word appears the clock after
// the strobe that completed it.
module frame_deser
  import feb_pkg::*;
#(
  parameter int unsigned FRAME_BITS_P = FRAME_BITS,
  parameter int unsigned WORD_BITS_P  = WORD_BITS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    bit_stb,
  input  logic                    trans_onb,
  input  logic                    dout,
  output logic                    byte_valid,
  output logic [7:0]              byte_data,
  output logic                    word_valid,
  output logic [WORD_BITS_P-1:0]  word_data,
  output logic [CHAN_W-1:0]       word_chan,
  output logic                    frame_done,
  output logic                    frame_err
);
  localparam int unsigned CNT_W = $clog2(FRAME_BITS_P + 1);
  localparam int unsigned WB_W  = $clog2(WORD_BITS_P);

  logic [CNT_W-1:0]       bit_cnt;      // bits received in this frame
  logic [2:0]             byte_pos;
  logic [WB_W-1:0]        word_pos;
  logic [6:0]             byte_sh;
  logic [WORD_BITS_P-2:0] word_sh;
  logic [CHAN_W-1:0]      chan_cnt;
  logic                   active;       // inside a transfer
  logic                   overrun;      // trans_onb low after a full frame

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt    <= '0;
      byte_pos   <= '0;
      word_pos   <= '0;
      byte_sh    <= '0;
      word_sh    <= '0;
      chan_cnt   <= '0;
      active     <= 1'b0;
      overrun    <= 1'b0;
      byte_valid <= 1'b0;
      byte_data  <= '0;
      word_valid <= 1'b0;
      word_data  <= '0;
      word_chan  <= '0;
      frame_done <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      word_valid <= 1'b0;
      frame_done <= 1'b0;
      frame_err  <= 1'b0;
      if (bit_stb) begin
        if (!trans_onb && !overrun) begin
          active <= 1'b1;
          // byte packing
          if (byte_pos == 3'd7) begin
            byte_valid <= 1'b1;
            byte_data  <= {byte_sh, dout};
            byte_pos   <= '0;
          end else begin
            byte_sh  <= {byte_sh[5:0], dout};
            byte_pos <= byte_pos + 3'd1;
          end
          // channel-word packing
          if (32'(word_pos) == WORD_BITS_P - 1) begin
            word_valid <= 1'b1;
            word_data  <= {word_sh, dout};
            word_chan  <= chan_cnt;
            chan_cnt   <= chan_cnt + 1'b1;
            word_pos   <= '0;
          end else begin
            word_sh  <= {word_sh[WORD_BITS_P-3:0], dout};
            word_pos <= word_pos + 1'b1;
          end
          // frame length
          if (32'(bit_cnt) == FRAME_BITS_P - 1) begin
            frame_done <= 1'b1;
            overrun    <= 1'b1;
            active     <= 1'b0;
            bit_cnt    <= '0;
            byte_pos   <= '0;
            word_pos   <= '0;
            chan_cnt   <= '0;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
          end
        end else if (!trans_onb && overrun) begin
          // more bits than a frame: report once, ignore the rest
          if (!active) frame_err <= 1'b1;
          active <= 1'b1;
        end else begin
          // trans_onb high: transfer over
          if (active && !overrun) frame_err <= 1'b1;
          active   <= 1'b0;
          overrun  <= 1'b0;
          bit_cnt  <= '0;
          byte_pos <= '0;
          word_pos <= '0;
          chan_cnt <= '0;
        end
      end
    end
  end
endmodule
