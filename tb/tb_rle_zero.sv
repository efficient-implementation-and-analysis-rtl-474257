// tb_rle_zero - sparse random streams (with idle clocks between inputs)
// through the run-length coder, compared token by token with the model.
// RUN_W is set to 4 so that runs reaching RUN_MAX also occur; frames end
// both on a zero and on a non-zero value.
module tb_rle_zero;
  import tb_s2_model_pkg::*;
  localparam int RUN_W = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0;
  logic signed [15:0] in_q = 0;
  logic tok_valid, tok_has_value, tok_eob;
  logic [RUN_W-1:0] tok_run;
  logic signed [15:0] tok_value;
  int checks = 0, failures = 0, cycles = 0, maxruns = 0;
  longint got[$];

  rle_zero #(.RUN_W(RUN_W)) dut (.clk, .rst_n, .in_valid, .in_q, .in_last, .tok_valid,
                                 .tok_run, .tok_value, .tok_has_value, .tok_eob);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (tok_valid) begin
      got.push_back(tok(tok_eob, tok_has_value, int'(tok_run), int'(tok_value)));
      if (!tok_has_value && !tok_eob) maxruns++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 20; f++) begin
      automatic int len = $urandom_range(1, 200);
      int v[];
      longint expq[$];
      v = new[len];
      foreach (v[i]) v[i] = ($urandom_range(0, 9) < 7) ? 0 : $urandom_range(0, 200) - 100;
      if (f % 2 == 0) v[len - 1] = 0;
      got.delete();
      foreach (v[i]) begin
        if ($urandom_range(0, 3) == 0) begin in_valid <= 0; @(posedge clk); end
        in_valid <= 1; in_q <= 16'(v[i]); in_last <= (i == len - 1);
        @(posedge clk);
      end
      in_valid <= 0;
      repeat (3) @(posedge clk);
      rle(v, (1 << RUN_W) - 1, expq);
      checks++;
      if (got.size() != expq.size()) begin
        failures++; $display("FAIL frame %0d: %0d tokens, expected %0d", f, got.size(), expq.size());
      end else
        foreach (expq[i]) begin
          checks++;
          if (got[i] != expq[i]) begin failures++; $display("FAIL token %0d: %h vs %h", i, got[i], expq[i]); end
        end
    end
    checks++;
    if (maxruns == 0) begin failures++; $display("FAIL no maximum-length run"); end
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
