// tb_prefix_adder - exhaustive at 6 bits, random and corner cases at 34
// bits, both carry-in values, sum and carry out.
module tb_prefix_adder;
  logic [33:0] a, b, s;
  logic        cin, cout;
  logic [5:0]  a6, b6, s6;
  logic        cin6, cout6;
  int checks = 0, failures = 0;

  prefix_adder #(.W(34)) dut   (.a(a),  .b(b),  .cin(cin),  .sum(s),  .cout(cout));
  prefix_adder #(.W(6))  dut6  (.a(a6), .b(b6), .cin(cin6), .sum(s6), .cout(cout6));

  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++)
        for (int k = 0; k < 2; k++) begin
          a6 = 6'(i); b6 = 6'(j); cin6 = k[0];
          #1;
          checks++;
          if ({cout6, s6} !== 7'(i + j + k)) begin
            failures++; $display("FAIL6 %0d+%0d+%0d", i, j, k);
          end
        end
    for (int t = 0; t < 5000; t++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; cin = t[0];
      if (t == 0) begin a = '1; b = '0; cin = 1'b1; end
      if (t == 1) begin a = '1; b = '1; cin = 1'b1; end
      #1;
      checks++;
      if ({cout, s} !== 35'(a) + 35'(b) + 35'(cin)) begin
        failures++; $display("FAIL34");
      end
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
