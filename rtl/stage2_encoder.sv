// stage2_encoder - Stage 2 of the image coder: coefficient receiver,
// quantiser, zero thresholding and zero run-length coder.
//
// The receiver takes the serial stream of the output writer (MSB first,
// word_start on the first bit, subband and level tags held during the
// word) and rebuilds each 16-bit coefficient; the word's last bit also
// carries the end-of-frame flag. The word then passes quantizer ->
// zero_threshold -> rle_zero, one clock each, so a token leaves four
// clocks after the last bit of the coefficient that completes it. mode
// selects one of three encoder configurations (0: lossless apart from
// rounding to integers, 1 and 2: stronger compression).
//
// The document puts quantisation, zero thresholding, run-length coding of
// zeros and entropy coding in a second stage on its own processing element.
// The serial receiver, the streaming organisation without a frame memory
// and the configurations' numbers are this design's; the entropy coder is
// not included, as its code is not specified.
module stage2_encoder
  import dwt_pkg::*;
#(
  parameter int unsigned FRAC  = 6,
  parameter int unsigned RUN_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [1:0]               mode,
  // serial coefficient stream
  input  logic                     bit_in,
  input  logic                     bit_valid,
  input  logic                     word_start,
  input  logic                     last,
  input  subband_e                 subband,
  input  logic [1:0]               band_level,
  // run-length tokens
  output logic                     tok_valid,
  output logic [RUN_W-1:0]         tok_run,
  output logic signed [COEF_W-1:0] tok_value,
  output logic                     tok_has_value,
  output logic                     tok_eob,
  // observation
  output logic                     cut_pulse   // a coefficient was zeroed
);

  // receiver
  logic [COEF_W-1:0] shreg;
  logic [4:0]        nbits;
  logic              w_valid, w_last;
  logic [COEF_W-1:0] w_data;
  subband_e          w_band;
  logic [1:0]        w_level;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg   <= '0;
      nbits   <= '0;
      w_valid <= 1'b0;
      w_last  <= 1'b0;
      w_data  <= '0;
      w_band  <= SB_LL;
      w_level <= '0;
    end else begin
      w_valid <= 1'b0;
      if (bit_valid) begin
        if (word_start) begin
          shreg   <= COEF_W'(bit_in);
          nbits   <= 5'd1;
          w_band  <= subband;
          w_level <= band_level;
        end else begin
          shreg <= {shreg[COEF_W-2:0], bit_in};
          nbits <= nbits + 1'b1;
          if (nbits == 5'(COEF_W - 1)) begin
            w_valid <= 1'b1;
            w_data  <= {shreg[COEF_W-2:0], bit_in};
            w_last  <= last;
            nbits   <= '0;
          end
        end
      end
    end
  end

  logic                     q_valid, q_last, t_valid, t_last;
  logic signed [COEF_W-1:0] q, t_q;
  subband_e                 q_band;
  logic [1:0]               q_level;
  logic                     t_cut;

  quantizer #(.FRAC(FRAC)) u_quant (
    .clk(clk), .rst_n(rst_n), .mode(mode),
    .c_valid(w_valid), .c(signed'(w_data)), .c_band(w_band), .c_level(w_level), .c_last(w_last),
    .q_valid(q_valid), .q(q), .q_band(q_band), .q_level(q_level), .q_last(q_last)
  );

  zero_threshold u_thr (
    .clk(clk), .rst_n(rst_n), .mode(mode),
    .in_valid(q_valid), .in_q(q), .in_band(q_band), .in_last(q_last),
    .out_valid(t_valid), .out_q(t_q), .out_last(t_last), .zeroed(t_cut)
  );

  assign cut_pulse = t_valid && t_cut;

  rle_zero #(.RUN_W(RUN_W)) u_rle (
    .clk(clk), .rst_n(rst_n),
    .in_valid(t_valid), .in_q(t_q), .in_last(t_last),
    .tok_valid(tok_valid), .tok_run(tok_run), .tok_value(tok_value),
    .tok_has_value(tok_has_value), .tok_eob(tok_eob)
  );

endmodule
