// tb_dwt_2d - loads two random 16 x 16 frames (with gaps in the pixel
// stream), lets the engine run three levels, reads every coefficient back
// and compares it with the reference Haar model. Also checks the transform
// time, 2*S*(3S+1) busy clocks per level, and that row passes, column
// passes and every level were seen.
module tb_dwt_2d;
  import tb_haar_pkg::*;

  localparam int N = 16, LEVELS = 3, AW = 8;
  logic clk = 0, rst_n = 0;
  logic pix_valid = 0;
  logic [7:0] pix = '0;
  logic pix_ready, busy, done, row_pass, release_frame = 0, rd_en = 0;
  logic [1:0] level;
  logic [AW-1:0] rd_addr = '0;
  logic [15:0] rd_data;
  int checks = 0, failures = 0, cycles = 0;
  int busy_cycles = 0, seen_row = 0, seen_col = 0;
  int seen_lvl [4] = '{0, 0, 0, 0};

  dwt_2d #(.N(N), .LEVELS(LEVELS)) dut (
    .clk, .rst_n, .pix_valid, .pix, .pix_ready, .busy, .done, .row_pass,
    .level, .release_frame, .rd_en, .rd_addr, .rd_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (busy && rst_n) begin
      busy_cycles++;
      if (row_pass) seen_row++; else seen_col++;
      seen_lvl[level]++;
    end
  end

  task automatic run_frame(input int frame);
    int img[];
    int coef[];
    int expect_busy = 0;
    img = new[N * N];
    foreach (img[i]) img[i] = (frame == 0) ? $urandom_range(0, 255) : ((i % 3 == 0) ? 255 : 0);
    busy_cycles = 0;
    checks++;
    if (!pix_ready) begin failures++; $display("FAIL not ready to load"); end
    for (int i = 0; i < N * N; i++) begin
      if ($urandom_range(0, 3) == 0) begin
        pix_valid <= 0;
        @(posedge clk);
      end
      pix_valid <= 1;
      pix <= 8'(img[i]);
      @(posedge clk);
    end
    pix_valid <= 0;
    wait (done);
    @(posedge clk);
    for (int s = N; s > (N >> LEVELS); s /= 2) expect_busy += 2 * s * (3 * s + 1);
    checks++;
    if (busy_cycles != expect_busy) begin
      failures++;
      $display("FAIL transform took %0d clocks, expected %0d", busy_cycles, expect_busy);
    end
    haar_ref(N, LEVELS, img, coef);
    for (int a = 0; a < N * N; a++) begin
      rd_en <= 1; rd_addr <= AW'(a);
      @(posedge clk);
      rd_en <= 0;
      #1;
      checks++;
      if ($signed(rd_data) != coef[a]) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d addr %0d got %0d exp %0d", frame, a, $signed(rd_data), coef[a]);
      end
    end
    release_frame <= 1;
    @(posedge clk);
    release_frame <= 0;
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_frame(0);
    run_frame(1);
    checks += 2;
    if (seen_row == 0 || seen_col == 0) begin failures++; $display("FAIL passes"); end
    if (seen_lvl[0] == 0 || seen_lvl[1] == 0 || seen_lvl[2] == 0) begin
      failures++; $display("FAIL levels");
    end
    $display("row clocks %0d, column clocks %0d, level clocks %0d %0d %0d",
             seen_row, seen_col, seen_lvl[0], seen_lvl[1], seen_lvl[2]);
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
