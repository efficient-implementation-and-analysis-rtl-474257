// tb_booth_multiplier - signed 17 x 17 products, with and without an
// addend, against the simulator's own arithmetic (corners and random
// operands) and the 6-bit worked example 17 x -9 = -153.
module tb_booth_multiplier;
  logic signed [16:0] a, b;
  logic signed [33:0] c, addend = '0;
  logic signed [5:0]  a6, b6;
  logic signed [11:0] c6, addend6 = '0;
  int checks = 0, failures = 0;

  booth_multiplier               dut  (.a(a),  .b(b),  .addend(addend),  .c(c));
  booth_multiplier #(.N(6))      dut6 (.a(a6), .b(b6), .addend(addend6), .c(c6));

  task automatic one(input logic signed [16:0] x, input logic signed [16:0] y,
                     input logic signed [33:0] z = '0);
    longint e;
    a = x; b = y; addend = z;
    #1;
    e = longint'(34'(longint'(x) * longint'(y) + longint'(z)));
    if (e >= (longint'(1) << 33)) e -= (longint'(1) << 34);
    checks++;
    if (longint'(c) != e) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, got %0d", x, y, e, c);
    end
  endtask

  initial begin
    one(-17'sd65536, -17'sd65536);
    one(17'sd65535, 17'sd65535);
    one(-17'sd65536, 17'sd65535);
    one(17'sd0, -17'sd1);
    one(-17'sd1, -17'sd1);
    for (int t = 0; t < 5000; t++) one(17'($urandom), 17'($urandom));
    for (int t = 0; t < 5000; t++) one(17'($urandom), 17'($urandom), 34'({$urandom, $urandom}));
    addend = '0;
    a6 = 6'sd17; b6 = -6'sd9;
    #1;
    checks++;
    if (c6 !== -12'sd153) begin failures++; $display("FAIL example %0d", c6); end
    for (int i = -32; i < 32; i++)
      for (int j = -32; j < 32; j++) begin
        a6 = 6'(i); b6 = 6'(j);
        #1;
        checks++;
        if (int'(c6) != i * j) begin failures++; $display("FAIL6 %0d*%0d", i, j); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
