// rgb2gray - 24-bit RGB pixel to 8-bit grey level.
//
// grey = floor((R + G + B) / 3), the channel average. The division by
// three is a multiplication by the constant 683 followed by a right shift
// of 11 bits (683 / 2048 = 1/3 + 1/6144), which gives the exact quotient
// for every sum up to 765. One register stage: gray/gray_valid follow
// rgb/rgb_valid by one clock.
//
// The average of the three channels is the document's conversion; the
// constant-division circuit and the register stage are this design's.
module rgb2gray (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rgb_valid,
  input  logic [23:0] rgb,         // {R, G, B}, 8 bits each
  output logic        gray_valid,
  output logic [7:0]  gray
);

  logic [9:0]  sum;
  logic [20:0] scaled;

  assign sum    = 10'(rgb[23:16]) + 10'(rgb[15:8]) + 10'(rgb[7:0]);
  assign scaled = 21'(sum) * 21'd683;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gray_valid <= 1'b0;
      gray       <= '0;
    end else begin
      gray_valid <= rgb_valid;
      if (rgb_valid) gray <= scaled[18:11];
    end
  end

endmodule
