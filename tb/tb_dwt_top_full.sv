// tb_dwt_top_full - one complete 512 x 512 frame through the coder at its
// default parameters (three levels): random RGB pixels in, every one of the
// 262144 output words compared with the reference, and the transform time
// checked against 2*S*(3S+1) clocks per level (S = 512, 256, 128). Stage 2
// runs in mode 1 and its tokens are compared with the model.
module tb_dwt_top_full;
  import dwt_pkg::*;
  import tb_haar_pkg::*;
  import tb_s2_model_pkg::*;

  localparam int N = 512, LEVELS = 3;
  logic clk = 0, rst_n = 0, rgb_valid = 0, en = 1;
  logic [23:0] rgb = '0;
  logic rgb_ready, busy, done, row_pass, bit_out, bit_valid, word_start, last;
  logic [1:0] level, band_level, mode = 2'd1;
  logic tok_valid, tok_has_value, tok_eob, cut_pulse;
  logic [15:0] tok_run;
  logic signed [15:0] tok_value;
  longint got[$];
  subband_e subband;
  int checks = 0, failures = 0, cycles = 0, busy_clk = 0, frames_out = 0;
  int exp_word [];

  dwt_top dut (
    .clk, .rst_n, .rgb_valid, .rgb, .rgb_ready, .en, .busy, .done, .row_pass,
    .level, .bit_out, .bit_valid, .word_start, .last, .subband, .band_level,
    .mode, .tok_valid, .tok_run, .tok_value, .tok_has_value, .tok_eob, .cut_pulse
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (busy && rst_n) busy_clk++;
    if (tok_valid) got.push_back(tok(tok_eob, tok_has_value, int'(tok_run), int'(tok_value)));
  end

  int word_idx = 0, bitcnt = 0;
  logic [15:0] acc_w;
  always @(posedge clk) begin
    if (bit_valid) begin
      acc_w = {acc_w[14:0], bit_out};
      bitcnt++;
      if (bitcnt == 16) begin
        int unsigned a, sb, lv;
        band_addr(N, LEVELS, word_idx, a, sb, lv);
        checks++;
        if ($signed(acc_w) != exp_word[a] || int'(subband) != sb || int'(band_level) != lv) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d got %0d exp %0d", word_idx, $signed(acc_w), exp_word[a]);
        end
        if (last) frames_out++;
        word_idx++;
        bitcnt = 0;
      end
    end
  end

  initial begin
    int gray[];
    int expect_busy = 0;
    gray = new[N * N];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < N * N; i++) begin
      automatic logic [7:0] r = 8'($urandom), g = 8'($urandom), b = 8'($urandom);
      gray[i] = (int'(r) + int'(g) + int'(b)) / 3;
      rgb_valid <= 1;
      rgb <= {r, g, b};
      @(posedge clk);
    end
    rgb_valid <= 0;
    haar_ref(N, LEVELS, gray, exp_word);
    wait (frames_out == 1);
    repeat (6) @(posedge clk);
    begin
      int v[];
      longint expq[$];
      v = new[N * N];
      for (int j = 0; j < N * N; j++) begin
        int unsigned a, sb, lv;
        band_addr(N, LEVELS, j, a, sb, lv);
        v[j] = thresh(quant(exp_word[a], sb, lv, 1, 2 * LEVELS), sb, 1);
      end
      rle(v, 65535, expq);
      checks++;
      if (got.size() != expq.size()) begin
        failures++; $display("FAIL %0d tokens, expected %0d", got.size(), expq.size());
      end else
        foreach (expq[i]) begin
          checks++;
          if (got[i] != expq[i]) failures++;
        end
      $display("tokens %0d", got.size());
    end
    for (int s = N; s > (N >> LEVELS); s /= 2) expect_busy += 2 * s * (3 * s + 1);
    checks += 2;
    if (word_idx != N * N) begin failures++; $display("FAIL words %0d", word_idx); end
    if (busy_clk != expect_busy) begin
      failures++; $display("FAIL transform %0d clocks, expected %0d", busy_clk, expect_busy);
    end
    $display("transform clocks %0d, total clocks %0d", busy_clk, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 10000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
