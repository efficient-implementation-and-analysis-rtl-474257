// tb_comp_ckt - the correction word must hold neg[i] at bit 2i, and the
// output pair must add up to sum_in + carry_in + correction.
module tb_comp_ckt;
  localparam int ROWS = 9, W = 34;
  logic [ROWS-1:0] neg;
  logic [W-1:0] si, ci, so, co, corr;
  int checks = 0, failures = 0;

  comp_ckt #(.ROWS(ROWS), .W(W)) dut (
    .neg(neg), .sum_in(si), .carry_in(ci), .sum_out(so), .carry_out(co), .corr(corr)
  );

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [W-1:0] e;
      neg = ROWS'($urandom);
      si  = {$urandom, $urandom};
      ci  = {$urandom, $urandom};
      e = '0;
      for (int i = 0; i < ROWS; i++) e += W'(neg[i]) << (2 * i);
      #1;
      checks += 2;
      if (corr !== e) begin failures++; $display("FAIL corr"); end
      if (W'(so + co) !== W'(si + ci + e)) begin failures++; $display("FAIL total"); end
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
