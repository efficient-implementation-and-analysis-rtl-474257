// tb_zero_threshold - small random values of every subband and mode
// against the threshold rule, with the zeroed flag and one clock latency.
module tb_zero_threshold;
  import dwt_pkg::*;
  import tb_s2_model_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0;
  logic [1:0] mode = 0;
  logic signed [15:0] in_q = 0;
  subband_e in_band = SB_LL;
  logic out_valid, out_last, zeroed;
  logic signed [15:0] out_q;
  int checks = 0, failures = 0, cycles = 0, cuts = 0;

  zero_threshold dut (.clk, .rst_n, .mode, .in_valid, .in_q, .in_band, .in_last,
                      .out_valid, .out_q, .out_last, .zeroed);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 5000; t++) begin
      automatic int v = $urandom_range(0, 12) - 6;
      automatic int sb = $urandom_range(0, 3), md = $urandom_range(0, 2);
      automatic int e = thresh(v, sb, md);
      in_valid <= 1; in_q <= 16'(v); in_band <= subband_e'(sb); mode <= 2'(md); in_last <= t[1];
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || int'(out_q) != e || zeroed != (e != v) || out_last != t[1]) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d sb=%0d mode=%0d got %0d exp %0d", v, sb, md, out_q, e);
      end
      if (zeroed) cuts++;
    end
    checks++;
    if (cuts == 0) failures++;
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
