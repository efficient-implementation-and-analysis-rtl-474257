// tb_output_writer - a memory model in the testbench holds a known word at
// every address. The writer's bit stream is reassembled into words and each
// word, its subband tag and its level are compared with the expected
// subband order. The first frame runs with en held high and must take 18
// clocks per word plus two; the second toggles en at random to exercise pausing.
module tb_output_writer;
  import dwt_pkg::*;
  import tb_haar_pkg::*;

  localparam int N = 16, LEVELS = 3, AW = 8;
  logic clk = 0, rst_n = 0, en = 0, frame_done = 0;
  logic release_frame, rd_en, bit_out, bit_valid, word_start, last;
  logic [AW-1:0] rd_addr;
  logic [15:0] rd_data = '0;
  subband_e subband;
  logic [1:0] band_level;
  int checks = 0, failures = 0, cycles = 0, pauses = 0;
  bit random_en = 0;

  output_writer #(.N(N), .LEVELS(LEVELS)) dut (
    .clk, .rst_n, .en, .frame_done, .release_frame, .rd_en, .rd_addr, .rd_data,
    .bit_out, .bit_valid, .word_start, .last, .subband, .band_level
  );

  function automatic logic [15:0] word_at(input int a);
    return 16'(a * 40503 + 7);
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (rd_en) rd_data <= word_at(int'(rd_addr));
    if (random_en) begin
      en <= ($urandom_range(0, 4) != 0);
      if (!en) pauses++;
    end
  end

  // reassemble and check the stream
  int word_idx = 0, bitcnt = 0, releases = 0, lasts = 0;
  logic [15:0] acc_w;
  always @(posedge clk) begin
    if (release_frame) releases++;
    if (bit_valid) begin
      if (word_start != (bitcnt == 0)) begin failures++; $display("FAIL word_start"); end
      acc_w = {acc_w[14:0], bit_out};
      bitcnt++;
      if (last) lasts++;
      if (bitcnt == 16) begin
        int unsigned a, sb, lv;
        band_addr(N, LEVELS, word_idx, a, sb, lv);
        checks++;
        if (acc_w !== word_at(a) || int'(subband) != sb || int'(band_level) != lv) begin
          failures++;
          if (failures < 10)
            $display("FAIL word %0d: got %h sb %0d lv %0d, exp %h sb %0d lv %0d",
                     word_idx, acc_w, subband, band_level, word_at(a), sb, lv);
        end
        checks++;
        if (last != (word_idx == N * N - 1)) begin failures++; $display("FAIL last"); end
        word_idx++;
        bitcnt = 0;
      end
    end
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    en <= 1;
    frame_done <= 1;
    t0 = cycles;
    wait (release_frame);
    checks++;
    if (cycles - t0 != 18 * N * N + 2) begin
      failures++;
      $display("FAIL frame took %0d clocks, expected %0d", cycles - t0, 18 * N * N + 2);
    end
    checks++;
    if (word_idx != N * N) begin failures++; $display("FAIL words %0d", word_idx); end
    @(posedge clk);
    word_idx = 0;
    random_en = 1;
    wait (!release_frame);
    wait (release_frame);
    repeat (2) @(posedge clk);
    checks += 3;
    if (word_idx != N * N) begin failures++; $display("FAIL words %0d", word_idx); end
    if (releases != 2 || lasts != 2) begin failures++; $display("FAIL releases %0d lasts %0d", releases, lasts); end
    if (pauses == 0) begin failures++; $display("FAIL no pause"); end
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
