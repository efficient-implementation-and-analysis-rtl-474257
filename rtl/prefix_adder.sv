// prefix_adder - Kogge-Stone parallel-prefix adder.
//
// Computes sum = a + b + cin over W bits and the carry out. Bitwise
// generate/propagate pairs are combined in ceil(log2 W) prefix levels, each
// joining spans twice as long as the level before, so every carry is known
// after log2(W) operator delays instead of W. Purely combinational.
//
// The document asks for a parallel-prefix adder as the multiplier's final
// stage; the Kogge-Stone tree is this design's choice.
module prefix_adder #(
  parameter int unsigned W = 34
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LV = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] g [LV+1];
  logic [W-1:0] p [LV+1];
  logic [W:0]   c;

  assign g[0] = a & b;
  assign p[0] = a ^ b;

  for (genvar l = 0; l < LV; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= D) begin : g_op
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-D]);
        assign p[l+1][i] = p[l][i] & p[l][i-D];
      end else begin : g_keep
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // carry into bit i+1: group (i..0) generates, or propagates cin
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_carry
    assign c[i+1] = g[LV][i] | (p[LV][i] & cin);
  end

  assign sum  = p[0] ^ c[W-1:0];
  assign cout = c[W];

endmodule
