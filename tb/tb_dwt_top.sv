// tb_dwt_top - end-to-end test of the coder at N = 32, three levels.
// Three random RGB frames are sent with gaps in the pixel stream, one in
// each Stage-2 mode (0, 1, 2); the serial output is reassembled into words
// and every word, its subband tag and its level are compared with a
// reference built from floor((R+G+B)/3) and the Haar model, and every
// Stage-2 token with the quantisation / threshold / run-length model. The
// second frame toggles the output enable. Every mechanism (pixel gaps, row
// and column passes, each level, each subband type, output pauses, reuse
// of the memory for further frames, mode switches, thresholding, zero
// runs) is counted and must occur at least once.
module tb_dwt_top;
  import dwt_pkg::*;
  import tb_haar_pkg::*;
  import tb_s2_model_pkg::*;

  localparam int N = 32, LEVELS = 3, FRAMES = 3;
  logic clk = 0, rst_n = 0, rgb_valid = 0, en = 1;
  logic [23:0] rgb = '0;
  logic rgb_ready, busy, done, row_pass, bit_out, bit_valid, word_start, last;
  logic [1:0] level, band_level, mode = 0;
  logic tok_valid, tok_has_value, tok_eob, cut_pulse;
  logic [15:0] tok_run;
  logic signed [15:0] tok_value;
  longint got[$];
  int cuts = 0, runs = 0, modes_seen = 0;
  subband_e subband;
  int checks = 0, failures = 0, cycles = 0;
  int gaps = 0, pauses = 0, row_clk = 0, col_clk = 0, frames_out = 0;
  int lvl_clk [4] = '{0, 0, 0, 0};
  int sb_seen [4] = '{0, 0, 0, 0};
  bit random_en = 0;
  int exp_word [];

  dwt_top #(.N(N), .LEVELS(LEVELS)) dut (
    .clk, .rst_n, .rgb_valid, .rgb, .rgb_ready, .en, .busy, .done, .row_pass,
    .level, .bit_out, .bit_valid, .word_start, .last, .subband, .band_level,
    .mode, .tok_valid, .tok_run, .tok_value, .tok_has_value, .tok_eob, .cut_pulse
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (tok_valid) begin
      got.push_back(tok(tok_eob, tok_has_value, int'(tok_run), int'(tok_value)));
      if (tok_run != 0) runs++;
    end
    if (cut_pulse) cuts++;
    if (busy && rst_n) begin
      if (row_pass) row_clk++; else col_clk++;
      lvl_clk[level]++;
    end
    if (random_en) begin
      en <= ($urandom_range(0, 3) != 0);
      if (!en && done) pauses++;
    end
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
        sb_seen[subband]++;
        if (last) frames_out++;
        word_idx++;
        bitcnt = 0;
      end
    end
  end

  task automatic send_frame();
    int gray[];
    gray = new[N * N];
    for (int i = 0; i < N * N; i++) begin
      automatic logic [7:0] r = 8'($urandom), g = 8'($urandom), b = 8'($urandom);
      if ($urandom_range(0, 7) == 0) begin
        rgb_valid <= 0; gaps++;
        @(posedge clk);
      end
      gray[i] = (int'(r) + int'(g) + int'(b)) / 3;
      rgb_valid <= 1;
      rgb <= {r, g, b};
      @(posedge clk);
    end
    rgb_valid <= 0;
    haar_ref(N, LEVELS, gray, exp_word);
  endtask

  // expected Stage-2 tokens of the frame in output order
  task automatic check_tokens(input int md);
    int v[];
    longint expq[$];
    v = new[N * N];
    for (int j = 0; j < N * N; j++) begin
      int unsigned a, sb, lv;
      band_addr(N, LEVELS, j, a, sb, lv);
      v[j] = thresh(quant(exp_word[a], sb, lv, md, 2 * LEVELS), sb, md);
    end
    rle(v, 65535, expq);
    checks++;
    if (got.size() != expq.size()) begin
      failures++; $display("FAIL mode %0d: %0d tokens, expected %0d", md, got.size(), expq.size());
    end else
      foreach (expq[i]) begin
        checks++;
        if (got[i] != expq[i]) begin
          failures++;
          if (failures < 10) $display("FAIL token %0d: %h vs %h", i, got[i], expq[i]);
        end
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      wait (rgb_ready);
      @(posedge clk);
      word_idx = 0;
      random_en = (f == 1);
      mode <= 2'(f);
      got.delete();
      send_frame();
      wait (frames_out == f + 1);
      repeat (6) @(posedge clk);
      checks++;
      if (word_idx != N * N) begin failures++; $display("FAIL words %0d", word_idx); end
      check_tokens(f);
      modes_seen++;
    end
    checks += 8;
    if (cuts == 0)   begin failures++; $display("FAIL nothing thresholded"); end
    if (runs == 0)   begin failures++; $display("FAIL no zero run"); end
    if (modes_seen != 3) begin failures++; $display("FAIL modes"); end
    if (gaps == 0)   begin failures++; $display("FAIL no input gap"); end
    if (pauses == 0) begin failures++; $display("FAIL no output pause"); end
    if (row_clk == 0 || col_clk == 0) begin failures++; $display("FAIL passes"); end
    if (lvl_clk[0] == 0 || lvl_clk[1] == 0 || lvl_clk[2] == 0) begin failures++; $display("FAIL levels"); end
    if (sb_seen[0] == 0 || sb_seen[1] == 0 || sb_seen[2] == 0 || sb_seen[3] == 0) begin
      failures++; $display("FAIL subbands");
    end
    $display("tokens: zero runs %0d, thresholded %0d", runs, cuts);
    $display("gaps %0d pauses %0d row %0d col %0d lvl %0d/%0d/%0d LL %0d HL %0d LH %0d HH %0d frames %0d",
             gaps, pauses, row_clk, col_clk, lvl_clk[0], lvl_clk[1], lvl_clk[2],
             sb_seen[0], sb_seen[1], sb_seen[2], sb_seen[3], frames_out);
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
