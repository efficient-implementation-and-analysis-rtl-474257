// zero_threshold - Stage 2, step 2: per-subband zero thresholding.
//
// A quantised coefficient whose magnitude is below the threshold of its
// subband is replaced by zero, which lengthens the zero runs for the
// run-length coder. The threshold depends on the subband and the encoder
// configuration mode: 0 for LL and in mode 0; otherwise mode for HL and
// LH and 2*mode for HH. One register stage.
//
// Thresholding to zero with different thresholds for different subbands
// follows the document; the threshold values are this design's.
module zero_threshold
  import dwt_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [1:0]               mode,
  input  logic                     in_valid,
  input  logic signed [COEF_W-1:0] in_q,
  input  subband_e                 in_band,
  input  logic                     in_last,
  output logic                     out_valid,
  output logic signed [COEF_W-1:0] out_q,
  output logic                     out_last,
  output logic                     zeroed      // this coefficient was cut
);

  logic [COEF_W-1:0] mag, thr;
  logic              cut;

  always_comb begin
    unique case (in_band)
      SB_LL:        thr = '0;
      SB_HH:        thr = COEF_W'(2 * mode);
      default:      thr = COEF_W'(mode);
    endcase
    mag = in_q[COEF_W-1] ? COEF_W'(-in_q) : COEF_W'(in_q);
    cut = (in_q != '0) && (mag < thr);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_q     <= '0;
      out_last  <= 1'b0;
      zeroed    <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_q    <= cut ? '0 : in_q;
        out_last <= in_last;
        zeroed   <= cut;
      end
    end
  end

endmodule
