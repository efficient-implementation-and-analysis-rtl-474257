// dwt_top - the image coder: RGB pixels in, serial 3-level 2-D DWT
// coefficients and run-length tokens out.
//
// Data flow: rgb2gray turns each 24-bit RGB pixel into an 8-bit grey level;
// dwt_2d stores the frame and, once all N*N pixels are in, transforms it in
// place, level by level, with two Booth MAC units; output_writer then reads
// the coefficients back subband by subband and sends them as a bit stream.
// When the last bit has left, the frame memory is handed back and the next
// frame can be loaded. Stage 2 (stage2_encoder) listens to the same bit
// stream and turns it into quantised, thresholded, zero-run-length tokens;
// mode picks one of its three configurations.
//
// Interface: present exactly N*N pixels per frame in raster order on
// rgb/rgb_valid while rgb_ready is high (rgb2gray adds one clock, so
// rgb_ready falls one clock after the last pixel). en gates the output
// stream. busy and done show the transform state. Tokens leave on tok_*,
// the last one of a frame with tok_eob set; mode should be held for a
// whole frame.
//
// The chain image -> grey -> DWT -> output and the 512 x 512, 3-level
// configuration follow the document; the handshakes are this design's.
module dwt_top
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 512,
  parameter int unsigned LEVELS = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rgb_valid,
  input  logic [23:0] rgb,
  output logic       rgb_ready,
  input  logic       en,
  output logic       busy,
  output logic       done,
  output logic       row_pass,
  output logic [1:0] level,
  output logic       bit_out,
  output logic       bit_valid,
  output logic       word_start,
  output logic       last,
  output subband_e   subband,
  output logic [1:0] band_level,
  input  logic [1:0] mode,
  output logic       tok_valid,
  output logic [15:0] tok_run,
  output logic signed [COEF_W-1:0] tok_value,
  output logic       tok_has_value,
  output logic       tok_eob,
  output logic       cut_pulse
);

  localparam int unsigned AW = 2 * $clog2(N);

  logic              gray_valid;
  logic [PIX_W-1:0]  gray;
  logic              release_frame;
  logic              rd_en;
  logic [AW-1:0]     rd_addr;
  logic [COEF_W-1:0] rd_data;

  rgb2gray u_gray (
    .clk(clk), .rst_n(rst_n), .rgb_valid(rgb_valid), .rgb(rgb),
    .gray_valid(gray_valid), .gray(gray)
  );

  dwt_2d #(.N(N), .LEVELS(LEVELS)) u_dwt (
    .clk(clk), .rst_n(rst_n),
    .pix_valid(gray_valid), .pix(gray), .pix_ready(rgb_ready),
    .busy(busy), .done(done), .row_pass(row_pass), .level(level),
    .release_frame(release_frame),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data)
  );

  output_writer #(.N(N), .LEVELS(LEVELS)) u_out (
    .clk(clk), .rst_n(rst_n), .en(en), .frame_done(done),
    .release_frame(release_frame),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .bit_out(bit_out), .bit_valid(bit_valid), .word_start(word_start),
    .last(last), .subband(subband), .band_level(band_level)
  );

  stage2_encoder #(.FRAC(2 * LEVELS)) u_stage2 (
    .clk(clk), .rst_n(rst_n), .mode(mode),
    .bit_in(bit_out), .bit_valid(bit_valid), .word_start(word_start), .last(last),
    .subband(subband), .band_level(band_level),
    .tok_valid(tok_valid), .tok_run(tok_run), .tok_value(tok_value),
    .tok_has_value(tok_has_value), .tok_eob(tok_eob), .cut_pulse(cut_pulse)
  );

endmodule
