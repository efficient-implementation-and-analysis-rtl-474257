// mac_unit - multiply-accumulate unit built on the Booth multiplier.
//
// On a cycle with en high the unit multiplies x by y and either loads the
// product into the 32-bit accumulator (acc_mode = 0, a "MUL" write) or adds
// it to the accumulator (acc_mode = 1, a "MAC" write). The accumulator is
// thus updated only when operands are written, as in the MAC diagram. The
// accumulator value, sign extended, enters the multiplier's carry-save
// tree as one more row, so partial products and accumulation share one
// final parallel-prefix adder; the result is wrapped to ACC_W bits. clr
// zeroes the accumulator. acc is registered: it shows the result one clock
// after the write.
//
// The 17-bit operands, the 32-bit accumulator and the accumulation inside
// the carry-save stage are the document's; the clear input and the
// synchronous active-low reset are this design's.
module mac_unit
  import dwt_pkg::*;
#(
  parameter int unsigned N = OPND_W,
  parameter int unsigned A = ACC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                en,
  input  logic                acc_mode,   // 0: acc = x*y, 1: acc += x*y
  input  logic signed [N-1:0] x,
  input  logic signed [N-1:0] y,
  output logic signed [A-1:0] acc
);

  logic signed [2*N-1:0] addend, result;
  logic        [A-1:0]   acc_next;

  // the accumulator joins the carry-save tree (sign extended)
  assign addend = acc_mode ? (2*N)'(acc) : '0;

  booth_multiplier #(.N(N)) u_mul (.a(x), .b(y), .addend(addend), .c(result));

  // wrap to the accumulator width
  assign acc_next = A'(result);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) acc <= '0;
    else if (en)       acc <= signed'(acc_next);
  end

endmodule
