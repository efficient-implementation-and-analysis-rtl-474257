// booth_encoder - radix-4 (modified) Booth recoder and partial-product
// generator.
//
// The multiplier Y gets one zero appended below its LSB and is sign
// extended at the top; it is then cut into overlapping 3-bit groups
// starting from the LSB. Each group selects one operation of the radix-4
// table: add 0, add X, add 2X, subtract 2X, subtract X, subtract 0. A
// group of 111 ("subtract 0") is produced as a plain zero row, which has
// the same value. The number of partial products is thereby halved, from
// N to ceil(N/2).
//
// Each row is the selected multiple of X, one's-complemented when the
// operation subtracts, sign extended to the product width P and shifted
// left by two bits per group. The +1 that completes each two's complement
// is not added here: it leaves on neg[i] (weight 2^(2i)) for the
// compensation circuit. Purely combinational.
//
// The recoding rule and the table follow the document; the split of the
// +1 correction into a separate output is this design's choice.
module booth_encoder
  import dwt_pkg::*;
#(
  parameter int unsigned N    = OPND_W,        // operand width
  parameter int unsigned ROWS = (N + 1) / 2,   // partial products
  parameter int unsigned P    = 2 * N          // product width
) (
  input  logic signed [N-1:0] x,               // multiplicand
  input  logic signed [N-1:0] y,               // multiplier (recoded)
  output logic        [P-1:0] pp [ROWS],       // aligned partial products
  output logic     [ROWS-1:0] neg,             // +1 owed at bit 2i of row i
  output booth_op_e           op [ROWS]        // recoded digit per group
);

  localparam int unsigned EXT_W = 2 * ROWS + 1;

  logic [EXT_W-1:0] yext;

  always_comb begin
    yext = {{(EXT_W - N - 1){y[N-1]}}, y, 1'b0};
    for (int i = 0; i < ROWS; i++) begin
      logic [2:0]        grp;
      logic signed [N:0] mult;  // selected multiple of x, N+1 bits
      logic signed [P-1:0] wide;
      grp   = yext[2*i +: 3];
      op[i] = booth_decode(grp);
      unique case (op[i])
        BOOTH_P1, BOOTH_M1: mult = {x[N-1], x};
        BOOTH_P2, BOOTH_M2: mult = {x, 1'b0};
        default:            mult = '0;
      endcase
      neg[i] = (op[i] == BOOTH_M1) || (op[i] == BOOTH_M2);
      if (neg[i]) mult = ~mult;
      wide  = P'(mult);             // sign extension to the product width
      pp[i] = wide << (2 * i);
    end
  end

endmodule
