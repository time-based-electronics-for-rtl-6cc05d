// sc_config: loads the slow-control (configuration) shift registers of the
// daisy-chained Petiroc2B chips.
//
// The chips' configuration registers are chained: sr_out of the first chip
// feeds sr_in of the second, and the last chip's sr_out comes back to the FPGA.
// On start, the N_CHIPS*BITS_PER_CHIP bits of cfg are shifted in, cfg's MSB
// first, so that cfg's MSB ends in the last stage of the last chip. Each bit
// lasts SC_DIV clocks: sr_in changes while sr_ck is low and sr_ck rises
// half-way through the bit. Just before each rising edge the bit leaving the
// chain on sr_out is captured, so after the load readback holds the chain's
// previous contents in the same layout as cfg; loading the same pattern twice
// and comparing readback with cfg checks the chain. sr_rstb is held low for
// SC_DIV clocks after reset to clear the chips' registers, then stays high.
// The daisy chain follows the board; the register length, bit order and
// shift-clock rate are this design's choices.
module sc_config #(
  parameter int unsigned N_CHIPS       = 2,
  parameter int unsigned BITS_PER_CHIP = 640,
  parameter int unsigned SC_DIV        = 10
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  input  logic [N_CHIPS*BITS_PER_CHIP-1:0] cfg,
  output logic                             sr_ck,
  output logic                             sr_in,
  output logic                             sr_rstb,
  input  logic                             sr_out,
  output logic                             busy,
  output logic                             done,
  output logic [N_CHIPS*BITS_PER_CHIP-1:0] readback
);
  localparam int unsigned TOTAL = N_CHIPS * BITS_PER_CHIP;
  localparam int unsigned BW    = $clog2(TOTAL + 1);
  localparam int unsigned PW    = $clog2(SC_DIV);
  localparam int unsigned HALF  = SC_DIV / 2;

  logic [TOTAL-1:0] sh;
  logic [BW-1:0]    bits_left;
  logic [PW-1:0]    phase;
  logic [PW:0]      rst_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh        <= '0;
      bits_left <= '0;
      phase     <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      readback  <= '0;
      sr_ck     <= 1'b0;
      sr_in     <= 1'b0;
      sr_rstb   <= 1'b0;
      rst_cnt   <= '0;
    end else begin
      if (!sr_rstb) begin
        rst_cnt <= rst_cnt + 1'b1;
        if (32'(rst_cnt) == SC_DIV - 1) sr_rstb <= 1'b1;
      end
      if (!busy) begin
        sr_ck <= 1'b0;
        if (start && sr_rstb) begin
          busy      <= 1'b1;
          done      <= 1'b0;
          sh        <= cfg;
          bits_left <= BW'(TOTAL);
          phase     <= '0;
        end
      end else begin
        phase <= (32'(phase) == SC_DIV - 1) ? '0 : phase + 1'b1;
        if (phase == '0) begin
          if (bits_left == '0) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            sr_in <= sh[TOTAL-1];
            sh    <= {sh[TOTAL-2:0], 1'b0};
          end
        end else if (32'(phase) == HALF) begin
          readback  <= {readback[TOTAL-2:0], sr_out};
          sr_ck     <= 1'b1;
          bits_left <= bits_left - 1'b1;
        end else if (32'(phase) == SC_DIV - 1) begin
          sr_ck <= 1'b0;
        end
      end
    end
  end
endmodule
