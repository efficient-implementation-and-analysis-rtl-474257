// output_writer - serial transmitter of the DWT coefficients.
//
// Once the transform is done (frame_done) and while en is high, the writer
// reads the coefficients out of the frame memory subband by subband, in
// the order LL(L), HL(L), LH(L), HH(L), HL(L-1), ... HH(1) for L = LEVELS,
// each subband in raster order, and shifts every 16-bit word out MSB first,
// one bit per clock. A word takes 18 clocks: one to issue the read, one for
// the memory latency, sixteen bit clocks. bit_valid marks the bit clocks,
// word_start the first bit of a word; subband and band_level tag the word.
// last marks the final bit of the frame; on the clock after it the writer
// pulses release_frame to hand the memory back for the next frame. Taking
// en low pauses the stream after the current bit.
//
// The block name, its en input and its bit-stream output follow the
// document; the subband order, the tags and the timing are this design's.
module output_writer
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 512,
  parameter int unsigned LEVELS = 3,
  localparam int unsigned AW    = 2 * $clog2(N),
  localparam int unsigned LW    = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              frame_done,
  output logic              release_frame,
  // coefficient memory read port (one clock latency)
  output logic              rd_en,
  output logic [AW-1:0]     rd_addr,
  input  logic [COEF_W-1:0] rd_data,
  // bit stream
  output logic              bit_out,
  output logic              bit_valid,
  output logic              word_start,
  output logic              last,
  output subband_e          subband,
  output logic [1:0]        band_level   // 0 = first (finest) level
);

  localparam int unsigned NBANDS = 3 * LEVELS + 1;

  typedef enum logic [1:0] { OW_IDLE, OW_FETCH, OW_LOAD, OW_SHIFT } ow_state_e;

  ow_state_e           state;
  logic [$clog2(NBANDS+1)-1:0] band;
  logic [LW-1:0]       r, c;
  logic [COEF_W-1:0]   shreg;
  logic [3:0]          bitn;
  logic                last_word;

  // geometry of the current subband
  subband_e      b_type;
  logic [1:0]    b_lvl;      // 0-based level
  logic [LW:0]   b_size;
  logic [LW-1:0] b_r0, b_c0;

  always_comb begin
    int unsigned lv;
    if (band == 0) begin
      lv     = LEVELS - 1;
      b_type = SB_LL;
    end else begin
      lv     = LEVELS - 1 - (32'(band) - 1) / 3;
      unique case ((32'(band) - 1) % 3)
        0:       b_type = SB_HL;
        1:       b_type = SB_LH;
        default: b_type = SB_HH;
      endcase
    end
    b_lvl  = 2'(lv);
    b_size = (LW+1)'(N >> (lv + 1));
    b_r0   = (b_type == SB_LH || b_type == SB_HH) ? LW'(b_size) : '0;
    b_c0   = (b_type == SB_HL || b_type == SB_HH) ? LW'(b_size) : '0;
  end

  assign rd_en     = (state == OW_FETCH) && en;
  assign rd_addr   = {b_r0 + r, b_c0 + c};
  assign last_word = (32'(band) == NBANDS - 1) &&
                     ((LW+1)'(r) == b_size - 1'b1) && ((LW+1)'(c) == b_size - 1'b1);

  assign bit_out    = shreg[COEF_W-1];
  assign bit_valid  = (state == OW_SHIFT) && en;
  assign word_start = bit_valid && (bitn == 4'd0);
  assign last       = bit_valid && (bitn == 4'(COEF_W - 1)) && last_word;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= OW_IDLE;
      band          <= '0;
      r             <= '0;
      c             <= '0;
      shreg         <= '0;
      bitn          <= '0;
      subband       <= SB_LL;
      band_level    <= '0;
      release_frame <= 1'b0;
    end else begin
      release_frame <= 1'b0;
      unique case (state)
        OW_IDLE: if (frame_done && en && !release_frame) begin
          state <= OW_FETCH;
          band  <= '0;
          r     <= '0;
          c     <= '0;
        end
        OW_FETCH: if (en) state <= OW_LOAD;
        OW_LOAD: begin
          shreg      <= rd_data;
          bitn       <= '0;
          subband    <= b_type;
          band_level <= b_lvl;
          state      <= OW_SHIFT;
        end
        OW_SHIFT: if (en) begin
          shreg <= shreg << 1;
          bitn  <= bitn + 1'b1;
          if (bitn == 4'(COEF_W - 1)) begin
            if (last_word) begin
              state         <= OW_IDLE;
              release_frame <= 1'b1;
            end else begin
              state <= OW_FETCH;
              if ((LW+1)'(c) == b_size - 1'b1) begin
                c <= '0;
                if ((LW+1)'(r) == b_size - 1'b1) begin
                  r    <= '0;
                  band <= band + 1'b1;
                end else begin
                  r <= r + 1'b1;
                end
              end else begin
                c <= c + 1'b1;
              end
            end
          end
        end
        default: state <= OW_IDLE;
      endcase
    end
  end

endmodule
