// tb_quantizer - random coefficients of every subband, level and mode
// against the quantisation rule; checks the one-clock latency and that
// the tags pass through.
module tb_quantizer;
  import dwt_pkg::*;
  import tb_s2_model_pkg::*;
  logic clk = 0, rst_n = 0, c_valid = 0, c_last = 0;
  logic [1:0] mode = 0, c_level = 0;
  logic signed [15:0] c = 0;
  subband_e c_band = SB_LL;
  logic q_valid, q_last;
  logic signed [15:0] q;
  subband_e q_band;
  logic [1:0] q_level;
  int checks = 0, failures = 0, cycles = 0;

  quantizer dut (.clk, .rst_n, .mode, .c_valid, .c, .c_band, .c_level, .c_last,
                 .q_valid, .q, .q_band, .q_level, .q_last);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 5000; t++) begin
      automatic int cv = $urandom_range(0, 65535) - 32768;
      automatic int sb = $urandom_range(0, 3), lv = $urandom_range(0, 2), md = $urandom_range(0, 2);
      if (t < 4) cv = (t == 0) ? -32767 : (t == 1 ? 32767 : (t == 2 ? -1 : 63));
      c_valid <= 1; c <= 16'(cv); c_band <= subband_e'(sb); c_level <= 2'(lv); mode <= 2'(md);
      c_last <= t[0];
      @(posedge clk);
      #1;
      checks++;
      if (!q_valid || int'(q) != quant(cv, sb, lv, md, 6) || int'(q_band) != sb ||
          int'(q_level) != lv || q_last != t[0]) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d sb=%0d lv=%0d mode=%0d q=%0d exp %0d", cv, sb, lv, md, q, quant(cv, sb, lv, md, 6));
      end
    end
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
