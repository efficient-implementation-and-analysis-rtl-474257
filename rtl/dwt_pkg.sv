// dwt_pkg - types and constants shared by the 2-D DWT datapath.
//
// The coefficient format is a signed 16-bit fixed-point word (the 16-bit
// DWT coefficient width is the document's); the number of fractional bits
// is this design's choice: two per decomposition level, so that every
// Haar average of the three-level transform is exact and nothing is
// rounded. Booth operands are 17 bits wide, as in the multiplier block
// diagram, and the accumulator is 32 bits, as in the MAC diagram.
package dwt_pkg;

  localparam int unsigned COEF_W   = 16;  // DWT coefficient width
  localparam int unsigned PIX_W    = 8;   // grey pixel width
  localparam int unsigned OPND_W   = 17;  // Booth multiplier operand width (16 downto 0)
  localparam int unsigned ACC_W    = 32;  // MAC accumulator width
  localparam int unsigned TAP_FRAC = 1;   // fractional bits of the filter taps

  // Haar taps in Q1: low pass (a+b)/2, high pass a-b.
  localparam logic signed [OPND_W-1:0] LP_TAP0 = 17'sd1;
  localparam logic signed [OPND_W-1:0] LP_TAP1 = 17'sd1;
  localparam logic signed [OPND_W-1:0] HP_TAP0 = 17'sd2;
  localparam logic signed [OPND_W-1:0] HP_TAP1 = -17'sd2;

  // Radix-4 Booth digit produced from one 3-bit group of the multiplier.
  typedef enum logic [2:0] {
    BOOTH_ZERO  = 3'd0,  // add 0 (000) or subtract 0 (111)
    BOOTH_P1    = 3'd1,  // add multiplicand
    BOOTH_P2    = 3'd2,  // add 2 * multiplicand
    BOOTH_M2    = 3'd3,  // subtract 2 * multiplicand
    BOOTH_M1    = 3'd4   // subtract multiplicand
  } booth_op_e;

  // Subband tag of a coefficient leaving the output writer.
  typedef enum logic [1:0] {
    SB_LL = 2'd0,
    SB_HL = 2'd1,  // horizontally high, vertically low
    SB_LH = 2'd2,  // horizontally low, vertically high
    SB_HH = 2'd3
  } subband_e;

  function automatic booth_op_e booth_decode(input logic [2:0] grp);
    case (grp)
      3'b001, 3'b010: return BOOTH_P1;
      3'b011:         return BOOTH_P2;
      3'b100:         return BOOTH_M2;
      3'b101, 3'b110: return BOOTH_M1;
      default:        return BOOTH_ZERO;  // 000 and 111
    endcase
  endfunction

endpackage
