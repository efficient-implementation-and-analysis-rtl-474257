// tb_rgb2gray - every channel sum 0..765 (with varied splits over R, G, B)
// and random pixels against floor((R+G+B)/3); the result must appear one
// clock after the pixel, and gray_valid must follow rgb_valid.
module tb_rgb2gray;
  logic clk = 0, rst_n = 0, rgb_valid = 0;
  logic [23:0] rgb = '0;
  logic gray_valid;
  logic [7:0] gray;
  int checks = 0, failures = 0, cycles = 0;

  rgb2gray dut (.clk, .rst_n, .rgb_valid, .rgb, .gray_valid, .gray);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic one(input int r, input int g, input int b);
    rgb_valid <= 1;
    rgb <= {8'(r), 8'(g), 8'(b)};
    @(posedge clk);
    #1;
    checks++;
    if (!gray_valid || gray !== 8'((r + g + b) / 3)) begin
      failures++;
      $display("FAIL %0d %0d %0d -> %0d", r, g, b, gray);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s <= 765; s++) begin
      automatic int r = (s > 510) ? 255 : (s > 255 ? s - 255 : 0);
      automatic int g = (s > 510) ? 255 : (s > 255 ? 255 : s);
      automatic int b = s - r - g;
      if (b > 255) begin r += b - 255; b = 255; end
      one(r, g, b);
      one(b, r, g);
    end
    for (int t = 0; t < 3000; t++) one($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
    rgb_valid <= 0;
    @(posedge clk);
    #1;
    checks++;
    if (gray_valid) begin failures++; $display("FAIL valid did not drop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
