// csa_tree - carry-save (3:2 compressor) reduction tree.
//
// Reduces ROWS operands of W bits to a sum vector and a carry vector whose
// total equals the total of the operands modulo 2^W. Each level groups the
// rows in threes and replaces every group by a full-adder row (sum) and a
// shifted majority row (carry); rows left over pass to the next level.
// The number of levels is worked out at elaboration, about log1.5(ROWS).
// No carry propagates along a row, so the delay is that of one full adder
// per level. Purely combinational.
//
// The document names a carry-save tree after the Booth encoder; the
// Wallace-style grouping is this design's choice.
module csa_tree #(
  parameter int unsigned ROWS = 9,
  parameter int unsigned W    = 34
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // rows still present after k levels of reduction
  function automatic int unsigned count_at(int unsigned k);
    int unsigned n = ROWS;
    for (int unsigned i = 0; i < k; i++)
      if (n > 2) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n = ROWS;
    int unsigned l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();
  localparam int unsigned MAXR   = (ROWS > 2) ? ROWS : 2;

  logic [W-1:0] lvl0 [MAXR];

  for (genvar r = 0; r < MAXR; r++) begin : g_in
    if (r < ROWS) begin : g_row
      assign lvl0[r] = rows[r];
    end else begin : g_pad
      assign lvl0[r] = '0;
    end
  end

  // each level has its own input and output arrays, so no signal of the
  // tree feeds itself
  for (genvar k = 0; k < LEVELS; k++) begin : g_lvl
    localparam int unsigned NIN  = count_at(k);
    localparam int unsigned NGRP = NIN / 3;
    localparam int unsigned NOUT = count_at(k + 1);
    logic [W-1:0] din  [MAXR];
    logic [W-1:0] dout [MAXR];
    if (k == 0) begin : g_first
      assign din = lvl0;
    end else begin : g_next
      assign din = g_lvl[k-1].dout;
    end
    for (genvar g = 0; g < NGRP; g++) begin : g_fa
      logic [W-1:0] a, b, c;
      assign a = din[3*g];
      assign b = din[3*g+1];
      assign c = din[3*g+2];
      assign dout[2*g]   = a ^ b ^ c;
      assign dout[2*g+1] = ((a & b) | (a & c) | (b & c)) << 1;
    end
    for (genvar r = 0; r < NIN % 3; r++) begin : g_pass
      assign dout[2*NGRP + r] = din[3*NGRP + r];
    end
    for (genvar r = NOUT; r < MAXR; r++) begin : g_zero
      assign dout[r] = '0;
    end
  end

  if (LEVELS == 0) begin : g_short
    assign sum   = lvl0[0];
    assign carry = lvl0[1];
  end else begin : g_tree
    assign sum   = g_lvl[LEVELS-1].dout[0];
    assign carry = g_lvl[LEVELS-1].dout[1];
  end

endmodule
