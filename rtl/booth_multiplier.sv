// booth_multiplier - signed N x N radix-4 Booth multiplier (N = 17) with
// a merged addend.
//
// Computes c = a * b + addend over 2N bits. Structure: Booth encoder ->
// carry-save tree over the ceil(N/2) partial products and the addend ->
// compensation circuit that adds the two's-complement +1 bits ->
// Kogge-Stone parallel-prefix adder that turns sum and carry into the
// result. With addend = 0 it is a plain multiplier, exact for all signed
// operands (2N bits hold the largest magnitude, (-2^(N-1))^2). Feeding an
// accumulator into the addend gives a multiply-accumulate with a single
// carry-propagate adder. Purely combinational.
//
// The block order and the 17-bit operands A and B follow the document, as
// does accumulating inside the carry-save stage ahead of the final
// addition; the addend port is how this design exposes that.
module booth_multiplier
  import dwt_pkg::*;
#(
  parameter int unsigned N = OPND_W,
  localparam int unsigned ROWS = (N + 1) / 2,
  localparam int unsigned P    = 2 * N
) (
  input  logic signed [N-1:0] a,   // multiplicand
  input  logic signed [N-1:0] b,   // multiplier (Booth recoded)
  input  logic signed [P-1:0] addend,
  output logic signed [P-1:0] c    // a * b + addend
);

  logic [P-1:0]    pp [ROWS];
  logic [P-1:0]    rows [ROWS+1];
  logic [ROWS-1:0] neg;
  booth_op_e       op [ROWS];
  logic [P-1:0]    s_tree, c_tree, s_fin, c_fin, corr;
  logic [P-1:0]    prod;
  logic            cout;

  booth_encoder #(.N(N), .ROWS(ROWS), .P(P)) u_enc (
    .x(a), .y(b), .pp(pp), .neg(neg), .op(op)
  );

  always_comb begin
    for (int i = 0; i < ROWS; i++) rows[i] = pp[i];
    rows[ROWS] = addend;
  end

  csa_tree #(.ROWS(ROWS + 1), .W(P)) u_tree (
    .rows(rows), .sum(s_tree), .carry(c_tree)
  );

  comp_ckt #(.ROWS(ROWS), .W(P)) u_comp (
    .neg(neg), .sum_in(s_tree), .carry_in(c_tree),
    .sum_out(s_fin), .carry_out(c_fin), .corr(corr)
  );

  prefix_adder #(.W(P)) u_add (
    .a(s_fin), .b(c_fin), .cin(1'b0), .sum(prod), .cout(cout)
  );

  assign c = signed'(prod);

endmodule
