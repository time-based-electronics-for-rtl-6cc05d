// petiroc2b_model: behavioural model (not synthesizable logic of the real part)
// of the digital pins of one Petiroc2B readout ASIC, used by the testbenches.
//
// A pulse on inject[ch] (sampled on clk_read) records a hit on channel ch with
// the time and charge values given on inj_coarse/inj_fine/inj_charge (binary)
// and pulls trigb, nor32_t and nor32_c low. When start_conv is seen high the
// model waits CONV_CYCLES readout clocks (the ADC conversion), then pulls
// trans_onb low and shifts out its 960-bit frame on dout, one bit per rising
// edge of clk_read: channel 0 first, each channel as
// {gray(coarse), gray(fine), gray(charge), hit}, MSB first. After the last bit
// trans_onb and all triggers return high and the hits are cleared. A chip that
// saw start_conv with no hit still converts and sends a frame of zero hits.
// With mute high the model never starts a transfer (to test time-outs).
// The slow-control register is a BITS-long shift register clocked on the
// rising edge of sr_ck, cleared by sr_rstb low; sr_out is its last stage.
module petiroc2b_model #(
  parameter int unsigned CONV_CYCLES = 20,
  parameter int unsigned SC_BITS     = 640
) (
  input  logic        clk_read,
  input  logic [31:0] inject,
  input  logic [8:0]  inj_coarse [32],
  input  logic [9:0]  inj_fine   [32],
  input  logic [9:0]  inj_charge [32],
  input  logic        mute,
  input  logic        start_conv,
  output logic        trigb,
  output logic        nor32_t,
  output logic        nor32_c,
  output logic        trans_onb,
  output logic        dout,
  input  logic        sr_ck,
  input  logic        sr_in,
  input  logic        sr_rstb,
  output logic        sr_out
);
  typedef enum logic [1:0] {M_IDLE, M_CONV, M_SEND} mstate_t;
  mstate_t       st = M_IDLE;
  logic [959:0]  frame = '0;
  logic [31:0]   hits = '0;
  logic [29:0]   words [32];
  int            cnt = 0;
  logic [SC_BITS-1:0] sr = '0;

  function automatic logic [9:0] bin2gray(input logic [9:0] b);
    return b ^ (b >> 1);
  endfunction

  initial begin
    trigb = 1'b1; nor32_t = 1'b1; nor32_c = 1'b1; trans_onb = 1'b1; dout = 1'b0;
    for (int i = 0; i < 32; i++) words[i] = '0;
  end

  always @(posedge clk_read) begin
    if (st != M_SEND) begin
      for (int i = 0; i < 32; i++)
        if (inject[i]) begin
          hits[i]  <= 1'b1;
          words[i] <= {bin2gray({1'b0, inj_coarse[i]})[8:0], bin2gray(inj_fine[i]),
                       bin2gray(inj_charge[i]), 1'b1};
        end
      if (inject != 0) begin
        trigb <= 1'b0; nor32_t <= 1'b0; nor32_c <= 1'b0;
      end
    end
    case (st)
      M_IDLE: if (start_conv && !mute) begin
        st  <= M_CONV;
        cnt <= 0;
      end
      M_CONV: begin
        cnt <= cnt + 1;
        if (cnt == int'(CONV_CYCLES) - 1) begin
          logic [959:0] f;
          for (int i = 0; i < 32; i++) f[959-30*i -: 30] = hits[i] ? words[i] : 30'd0;
          frame     <= {f[958:0], 1'b0};
          dout      <= f[959];
          trans_onb <= 1'b0;
          cnt       <= 1;
          st        <= M_SEND;
        end
      end
      M_SEND: begin
        if (cnt == 960) begin
          trans_onb <= 1'b1;
          dout      <= 1'b0;
          trigb <= 1'b1; nor32_t <= 1'b1; nor32_c <= 1'b1;
          hits      <= '0;
          st        <= M_IDLE;
        end else begin
          dout  <= frame[959];
          frame <= {frame[958:0], 1'b0};
          cnt   <= cnt + 1;
        end
      end
      default: st <= M_IDLE;
    endcase
  end

  always @(posedge sr_ck or negedge sr_rstb) begin
    if (!sr_rstb) sr <= '0;
    else          sr <= {sr[SC_BITS-2:0], sr_in};
  end
  assign sr_out = sr[SC_BITS-1];
endmodule
