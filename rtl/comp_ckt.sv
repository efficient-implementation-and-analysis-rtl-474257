// comp_ckt - compensation circuit of the Booth multiplier.
//
// The Booth encoder forms a subtracted partial product as the one's
// complement of the multiple of X; the +1 that turns it into the two's
// complement is owed at bit 2i of row i. This block gathers those owed
// bits into one correction word and folds it into the carry-save pair
// coming out of the CSA tree with one extra row of full adders, so that
// the final adder still sees only two operands. Purely combinational.
//
// The document shows a block of this name between the Booth encoder and
// the final adder without describing it; reading it as the two's
// complement correction, and merging it by one 3:2 row, is this design's
// choice.
module comp_ckt #(
  parameter int unsigned ROWS = 9,
  parameter int unsigned W    = 34
) (
  input  logic [ROWS-1:0] neg,       // from the Booth encoder
  input  logic [W-1:0]    sum_in,    // from the CSA tree
  input  logic [W-1:0]    carry_in,
  output logic [W-1:0]    sum_out,   // to the final adder
  output logic [W-1:0]    carry_out,
  output logic [W-1:0]    corr       // the correction word itself
);

  always_comb begin
    corr = '0;
    for (int i = 0; i < ROWS; i++)
      if (2 * i < W) corr[2*i] = neg[i];
    sum_out   = sum_in ^ carry_in ^ corr;
    carry_out = ((sum_in & carry_in) | (sum_in & corr) | (carry_in & corr)) << 1;
  end

endmodule
