// tb_mac_unit - random sequences of MUL writes (load), MAC writes
// (accumulate), idle cycles and clears against a 32-bit wrapping model;
// the accumulator must show each result exactly one clock after the write.
module tb_mac_unit;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, acc_mode = 0;
  logic signed [16:0] x = '0, y = '0;
  logic signed [31:0] acc;
  int checks = 0, failures = 0;
  int cycles = 0;
  int n_mul = 0, n_mac = 0;

  mac_unit dut (.clk, .rst_n, .clr, .en, .acc_mode, .x, .y, .acc);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    logic signed [31:0] model;
    model = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    checks++;
    if (acc !== 0) begin failures++; $display("FAIL reset value"); end
    for (int t = 0; t < 4000; t++) begin
      automatic int kind = $urandom_range(0, 9);
      clr <= 0; en <= 0;
      x <= 17'($urandom); y <= 17'($urandom);
      if (kind == 0) clr <= 1;
      else if (kind < 4) begin en <= 1; acc_mode <= 0; end
      else if (kind < 9) begin en <= 1; acc_mode <= 1; end
      @(posedge clk);  // write happens on this edge
      if (kind == 0) model = 0;
      else if (kind < 4) begin model = 32'(longint'(x) * longint'(y)); n_mul++; end
      else if (kind < 9) begin model = model + 32'(longint'(x) * longint'(y)); n_mac++; end
      #1;
      checks++;
      if (acc !== model) begin
        failures++;
        $display("FAIL t=%0d kind=%0d acc=%0d model=%0d", t, kind, acc, model);
      end
    end
    checks++;
    if (n_mul == 0 || n_mac == 0) failures++;
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
