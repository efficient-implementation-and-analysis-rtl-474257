// tb_csa_tree - random operands; sum + carry must equal the plain total of
// the rows modulo 2^W, for 9, 10 and 3 rows.
module tb_csa_tree;
  localparam int W = 34;
  logic [W-1:0] r9 [9];
  logic [W-1:0] r10 [10];
  logic [W-1:0] r3 [3];
  logic [W-1:0] s9, c9, s10, c10, s3, c3;
  int checks = 0, failures = 0;

  csa_tree #(.ROWS(9),  .W(W)) dut9  (.rows(r9),  .sum(s9),  .carry(c9));
  csa_tree #(.ROWS(10), .W(W)) dut10 (.rows(r10), .sum(s10), .carry(c10));
  csa_tree #(.ROWS(3),  .W(W)) dut3  (.rows(r3),  .sum(s3),  .carry(c3));

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [W-1:0] e9, e10, e3;
      e9 = '0; e10 = '0; e3 = '0;
      for (int i = 0; i < 10; i++) begin
        r10[i] = {$urandom, $urandom};
        if (t % 7 == 0) r10[i] = '1;
        e10 += r10[i];
        if (i < 9) begin r9[i] = r10[i] ^ W'(t); e9 += r9[i]; end
        if (i < 3) begin r3[i] = r10[i] + 1'b1; e3 += r3[i]; end
      end
      #1;
      checks += 3;
      if (W'(s9 + c9) !== e9)    begin failures++; $display("FAIL 9 rows");  end
      if (W'(s10 + c10) !== e10) begin failures++; $display("FAIL 10 rows"); end
      if (W'(s3 + c3) !== e3)    begin failures++; $display("FAIL 3 rows");  end
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
