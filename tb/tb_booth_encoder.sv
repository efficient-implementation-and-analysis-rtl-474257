// tb_booth_encoder - checks the radix-4 recoding against the digit formula
// d_i = -2*y[2i+1] + y[2i] + y[2i-1] and checks that the rows plus the owed
// +1 bits add up to x*y, for 17-bit operands and for the 6-bit worked
// example 17 x -9 (digits -1, +2, -1; product -153), and the 8-bit
// recoding example 00101110 (groups 100, 111, 101, 001 from the LSB:
// digits -2, -0, -1, +1).
module tb_booth_encoder;
  import dwt_pkg::*;

  localparam int N = 17, ROWS = 9, P = 34;
  localparam int N6 = 6, ROWS6 = 3, P6 = 12;

  logic signed [N-1:0]  x, y;
  logic [P-1:0]         pp [ROWS];
  logic [ROWS-1:0]      neg;
  booth_op_e            op [ROWS];
  logic signed [N6-1:0] x6, y6;
  logic [P6-1:0]        pp6 [ROWS6];
  logic [ROWS6-1:0]     neg6;
  booth_op_e            op6 [ROWS6];

  logic signed [7:0]    x8, y8;
  logic [15:0]          pp8 [4];
  logic [3:0]           neg8;
  booth_op_e            op8 [4];
  int checks = 0, failures = 0;

  booth_encoder #(.N(8))  dut8 (.x(x8), .y(y8), .pp(pp8), .neg(neg8), .op(op8));

  booth_encoder #(.N(N))  dut  (.x(x),  .y(y),  .pp(pp),   .neg(neg),   .op(op));
  booth_encoder #(.N(N6)) dut6 (.x(x6), .y(y6), .pp(pp6),  .neg(neg6),  .op(op6));

  function automatic int digit(input logic [N:0] ye, input int i);  // ye = {y,0}
    int hi, mid, lo;
    hi  = (2*i + 2 <= N) ? ye[2*i+2] : ye[N];
    mid = ye[2*i+1];
    lo  = ye[2*i];
    return -2 * hi + mid + lo;
  endfunction

  function automatic booth_op_e op_of(input int d);
    case (d)
      1: return BOOTH_P1;  2: return BOOTH_P2;
      -1: return BOOTH_M1; -2: return BOOTH_M2;
      default: return BOOTH_ZERO;
    endcase
  endfunction

  task automatic check_one(input logic signed [N-1:0] xa, input logic signed [N-1:0] ya);
    logic [P-1:0] total;
    logic signed [P-1:0] expect_p;
    x = xa; y = ya;
    #1;
    total = '0;
    for (int i = 0; i < ROWS; i++) total += pp[i] + (P'(neg[i]) << (2*i));
    expect_p = P'(xa) * P'(ya);
    checks++;
    if (total !== expect_p) begin
      failures++;
      $display("FAIL sum x=%0d y=%0d got %0d", xa, ya, $signed(total));
    end
    for (int i = 0; i < ROWS; i++) begin
      checks++;
      if (op[i] !== op_of(digit({ya, 1'b0}, i))) begin
        failures++;
        $display("FAIL op y=%0d group %0d", ya, i);
      end
    end
  endtask

  initial begin
    check_one(17'sd17, -17'sd9);
    check_one(-17'sd65536, -17'sd65536);
    check_one(17'sd65535, -17'sd65536);
    check_one(17'sd0, 17'sd12345);
    for (int t = 0; t < 3000; t++) check_one(N'($urandom), N'($urandom));

    // worked example: A = 010001 (17), multiplier 110111 (-9)
    x6 = 6'sb010001; y6 = 6'sb110111;
    #1;
    checks += 4;
    if (op6[0] !== BOOTH_M1) failures++;
    if (op6[1] !== BOOTH_P2) failures++;
    if (op6[2] !== BOOTH_M1) failures++;
    begin
      logic [P6-1:0] t6 = '0;
      for (int i = 0; i < ROWS6; i++) t6 += pp6[i] + (P6'(neg6[i]) << (2*i));
      if ($signed(t6) !== -12'sd153) begin
        failures++;
        $display("FAIL example product %0d", $signed(t6));
      end
    end
    // recoding example
    x8 = 8'sd3; y8 = 8'b00101110;
    #1;
    checks += 2;
    if (op8[0] !== BOOTH_M2 || op8[1] !== BOOTH_ZERO || op8[2] !== BOOTH_M1 || op8[3] !== BOOTH_P1) begin
      failures++;
      $display("FAIL recoding example");
    end
    begin
      logic [15:0] t8 = '0;
      for (int i = 0; i < 4; i++) t8 += pp8[i] + (16'(neg8[i]) << (2*i));
      if ($signed(t8) !== 16'sd138) begin failures++; $display("FAIL 3 x 46 = %0d", $signed(t8)); end
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
