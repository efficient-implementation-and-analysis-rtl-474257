// tb_frame_mem - fills a 1024-word memory with random words, reads them
// back in random order (data one clock after the read), and checks that a
// write cycle does not change the read register.
module tb_frame_mem;
  localparam int DEPTH = 1024;
  logic clk = 0, we = 0, re = 0;
  logic [9:0]  addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0, cycles = 0;

  frame_mem #(.WIDTH(16), .DEPTH(DEPTH)) dut (.clk, .we, .re, .addr, .wdata, .rdata);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    @(posedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = 16'($urandom);
      we <= 1; re <= 0; addr <= 10'(i); wdata <= model[i];
      @(posedge clk);
    end
    for (int t = 0; t < 4000; t++) begin
      automatic int a = $urandom_range(0, DEPTH - 1);
      we <= 0; re <= 1; addr <= 10'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL read %0d", a); end
      if (t % 5 == 0) begin
        automatic logic [15:0] held = rdata;
        automatic int b = $urandom_range(0, DEPTH - 1);
        model[b] = 16'($urandom);
        we <= 1; re <= 0; addr <= 10'(b); wdata <= model[b];
        @(posedge clk);
        #1;
        checks++;
        if (rdata !== held) begin failures++; $display("FAIL read changed on write"); end
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
