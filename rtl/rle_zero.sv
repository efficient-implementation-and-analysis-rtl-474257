// rle_zero - Stage 2, step 3: run-length coding of zero coefficients.
//
// The coefficient stream is turned into tokens (run, value): run is the
// number of zeros that preceded a non-zero value. A zero only counts; a
// non-zero value emits a token with has_value set and clears the count. A
// run that reaches RUN_MAX emits a token without a value. The last
// coefficient of the frame always emits a token with eob set; if it is
// zero, the run includes it and has_value is clear. At most one token per
// input, so the coder never stalls. One register stage.
//
// Run-length coding the zeros follows the document; the token format is
// this design's.
module rle_zero
  import dwt_pkg::*;
#(
  parameter int unsigned RUN_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [COEF_W-1:0] in_q,
  input  logic                     in_last,
  output logic                     tok_valid,
  output logic [RUN_W-1:0]         tok_run,
  output logic signed [COEF_W-1:0] tok_value,
  output logic                     tok_has_value,
  output logic                     tok_eob
);

  localparam logic [RUN_W-1:0] RUN_MAX = '1;

  logic [RUN_W-1:0] run;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run           <= '0;
      tok_valid     <= 1'b0;
      tok_run       <= '0;
      tok_value     <= '0;
      tok_has_value <= 1'b0;
      tok_eob       <= 1'b0;
    end else begin
      tok_valid <= 1'b0;
      if (in_valid) begin
        if (in_q != '0) begin
          tok_valid     <= 1'b1;
          tok_run       <= run;
          tok_value     <= in_q;
          tok_has_value <= 1'b1;
          tok_eob       <= in_last;
          run           <= '0;
        end else if (in_last || run + 1'b1 == RUN_MAX) begin
          tok_valid     <= 1'b1;
          tok_run       <= run + 1'b1;
          tok_value     <= '0;
          tok_has_value <= 1'b0;
          tok_eob       <= in_last;
          run           <= '0;
        end else begin
          run <= run + 1'b1;
        end
      end
    end
  end

endmodule
