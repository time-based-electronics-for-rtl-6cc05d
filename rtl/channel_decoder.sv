// channel_decoder: turns one 30-bit channel word of a Petiroc2B frame into a
// decoded hit record with an absolute time.
//
// The word arrives MSB first from the serial stream and is split as
//   [29:21] coarse time (Gray), [20:11] fine time (Gray),
//   [10:1]  charge (Gray),      [0]     hit flag.
// The field widths and the Gray coding are the ASIC's; their order inside the
// word is this design's choice. Each field is Gray-decoded, then the absolute
// time of the hit is formed as
//   abs_time_ps = (coarse + 1) * CK40_PS - fine * FINE_LSB_PS
// i.e. the end of the 40 MHz period in which the hit fell, minus the TDC
// interpolation (25 ns period and 37 ps step by default). The result is signed
// because a large fine code with coarse = 0 gives a small negative value.
//
// Timing: one register stage; out_valid/out_rec follow in_valid by one clock.
module channel_decoder
  import feb_pkg::*;
#(
  parameter int unsigned CK40_PS     = 25000,
  parameter int unsigned FINE_LSB_PS = 37,
  parameter bit          CHIP        = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [WORD_BITS-1:0]  in_word,
  input  logic [CHAN_W-1:0]     in_chan,
  output logic                  out_valid,
  output hit_rec_t              out_rec
);
  logic [COARSE_W-1:0] coarse_b;
  logic [FINE_W-1:0]   fine_b;
  logic [CHARGE_W-1:0] charge_b;

  gray2bin #(.W(COARSE_W)) u_g_coarse (.gray(in_word[WORD_BITS-1 -: COARSE_W]),          .bin(coarse_b));
  gray2bin #(.W(FINE_W))   u_g_fine   (.gray(in_word[WORD_BITS-1-COARSE_W -: FINE_W]),   .bin(fine_b));
  gray2bin #(.W(CHARGE_W)) u_g_charge (.gray(in_word[CHARGE_W:1]),                       .bin(charge_b));

  logic signed [TIME_W-1:0] t_coarse, t_fine;
  always_comb begin
    t_coarse = TIME_W'((32'(coarse_b) + 32'd1) * CK40_PS);
    t_fine   = TIME_W'(32'(fine_b) * FINE_LSB_PS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_rec   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_rec.chip        <= CHIP;
        out_rec.chan        <= in_chan;
        out_rec.coarse      <= coarse_b;
        out_rec.fine        <= fine_b;
        out_rec.charge      <= charge_b;
        out_rec.hit         <= in_word[0];
        out_rec.abs_time_ps <= t_coarse - t_fine;
      end
    end
  end
endmodule
