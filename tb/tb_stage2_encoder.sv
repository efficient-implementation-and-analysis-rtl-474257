// tb_stage2_encoder - sends frames of random coefficients as a serial
// stream (MSB first, word_start, tags, last on the final bit, idle clocks
// between bits) in each of the three modes and compares the tokens with
// quantisation, thresholding and run-length models.
module tb_stage2_encoder;
  import dwt_pkg::*;
  import tb_s2_model_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] mode = 0, band_level = 0;
  logic bit_in = 0, bit_valid = 0, word_start = 0, last = 0;
  subband_e subband = SB_LL;
  logic tok_valid, tok_has_value, tok_eob, cut_pulse;
  logic [15:0] tok_run;
  logic signed [15:0] tok_value;
  int checks = 0, failures = 0, cycles = 0, cuts = 0;
  longint got[$];

  stage2_encoder dut (.clk, .rst_n, .mode, .bit_in, .bit_valid, .word_start, .last,
                      .subband, .band_level, .tok_valid, .tok_run, .tok_value,
                      .tok_has_value, .tok_eob, .cut_pulse);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (tok_valid) got.push_back(tok(tok_eob, tok_has_value, int'(tok_run), int'(tok_value)));
    if (cut_pulse) cuts++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 6; f++) begin
      automatic int len = $urandom_range(10, 150);
      automatic int md = f % 3;
      int v[];
      longint expq[$];
      v = new[len];
      got.delete();
      mode <= 2'(md);
      for (int i = 0; i < len; i++) begin
        automatic int cv = ($urandom_range(0, 1) == 0) ? $urandom_range(0, 1000) - 500
                                                        : $urandom_range(0, 65535) - 32768;
        automatic int sb = $urandom_range(0, 3), lv = $urandom_range(0, 2);
        v[i] = thresh(quant(cv, sb, lv, md, 6), sb, md);
        for (int b = 15; b >= 0; b--) begin
          if ($urandom_range(0, 4) == 0) begin bit_valid <= 0; @(posedge clk); end
          bit_valid <= 1; bit_in <= cv[b]; word_start <= (b == 15);
          last <= (b == 0) && (i == len - 1);
          subband <= subband_e'(sb); band_level <= 2'(lv);
          @(posedge clk);
        end
      end
      bit_valid <= 0; last <= 0;
      repeat (6) @(posedge clk);
      rle(v, 65535, expq);
      checks++;
      if (got.size() != expq.size()) begin
        failures++; $display("FAIL frame %0d: %0d tokens, expected %0d", f, got.size(), expq.size());
      end else
        foreach (expq[i]) begin
          checks++;
          if (got[i] != expq[i]) begin failures++; $display("FAIL token %0d: %h vs %h", i, got[i], expq[i]); end
        end
    end
    checks++;
    if (cuts == 0) begin failures++; $display("FAIL nothing thresholded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
