// quantizer - Stage 2, step 1: per-subband uniform quantisation.
//
// Each DWT coefficient (signed, FRAC fractional bits) is divided by a
// power-of-two step chosen from its subband, its level and the encoder
// configuration mode, truncating towards zero (a dead-zone quantiser):
// q = sign(c) * (|c| >> (FRAC + shift)). The fractional bits are always
// dropped, so mode 0 just rounds the coefficients to integers. Modes 1 and
// 2 quantise the detail subbands harder, the finest level and HH most:
//   shift = 0                                             for LL or mode 0
//   shift = mode * (1 + (level == 0) + (subband == HH))   otherwise
// One register stage: q_valid follows c_valid by one clock.
//
// Quantising every subband on its own and offering three encoder
// configurations follow the document; the step sizes are this design's,
// as the document gives none.
module quantizer
  import dwt_pkg::*;
#(
  parameter int unsigned FRAC = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [1:0]               mode,      // encoder configuration 0..2
  input  logic                     c_valid,
  input  logic signed [COEF_W-1:0] c,
  input  subband_e                 c_band,
  input  logic [1:0]               c_level,
  input  logic                     c_last,
  output logic                     q_valid,
  output logic signed [COEF_W-1:0] q,
  output subband_e                 q_band,
  output logic [1:0]               q_level,
  output logic                     q_last
);

  logic [3:0]        shift;
  logic [COEF_W-1:0] mag, mag_q;

  always_comb begin
    if (c_band == SB_LL || mode == 2'd0) shift = 4'(FRAC);
    else shift = 4'(FRAC) + 4'(mode) * (4'd1 + 4'(c_level == 2'd0) + 4'(c_band == SB_HH));
    mag   = c[COEF_W-1] ? COEF_W'(-c) : COEF_W'(c);
    mag_q = mag >> shift;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q       <= '0;
      q_band  <= SB_LL;
      q_level <= '0;
      q_last  <= 1'b0;
    end else begin
      q_valid <= c_valid;
      if (c_valid) begin
        q       <= c[COEF_W-1] ? -signed'(mag_q) : signed'(mag_q);
        q_band  <= c_band;
        q_level <= c_level;
        q_last  <= c_last;
      end
    end
  end

endmodule
