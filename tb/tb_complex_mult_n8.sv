// tb_complex_mult_n8: the same end-to-end test as tb_complex_mult, with the
// multiplier set to 8-bit parts (three 8x8 Vedic multipliers).
// The expected pr = ar br - ai bi and pi = ar bi + ai br are computed with
// 64-bit integer arithmetic, i.e. the four-multiplication textbook formula,
// independent of the three-multiplier arrangement inside the block.
// Stimulus: the worked example (11 + j5)(5 + j2) = 45 + j47, corner values
// (zeros, all ones, one operand maximal) and random operands, some of them
// drawn from restricted ranges so that every path of the block is taken.
// Paths counted, each of which must occur at least once:
//   carry_b  : br + bi overflows N bits (carry correction of ar*(br+bi))
//   carry_a  : ar + ai overflows N bits (carry correction of (ar+ai)*bi)
//   neg_diff : ai < ar, so (ai - ar) br is subtracted from the shared term
//   neg_pr   : the real part of the product is negative
// The block is combinational; outputs are checked 1 time unit after the
// inputs change (zero-cycle latency).
module tb_complex_mult_n8;
  localparam int N = 8;
  localparam int W = 2 * N + 2;

  logic           clk = 1'b0;
  logic [N-1:0]   ar, ai, br, bi;
  logic [W-1:0]   pr, pi;
  int             checks = 0;
  int             failures = 0;
  int             n_carry_b = 0, n_carry_a = 0, n_neg_diff = 0, n_neg_pr = 0;

  always #5 clk = ~clk;

  complex_mult #(.N(N)) dut (.ar(ar), .ai(ai), .br(br), .bi(bi), .pr(pr), .pi(pi));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] xr, input logic [N-1:0] xi,
                       input logic [N-1:0] yr, input logic [N-1:0] yi);
    longint er, ei;
    ar = xr; ai = xi; br = yr; bi = yi;
    #1;
    er = longint'(xr) * longint'(yr) - longint'(xi) * longint'(yi);
    ei = longint'(xr) * longint'(yi) + longint'(xi) * longint'(yr);
    if (longint'(yr) + longint'(yi) >= (64'sd1 <<< N)) n_carry_b++;
    if (longint'(xr) + longint'(xi) >= (64'sd1 <<< N)) n_carry_a++;
    if (xi < xr) n_neg_diff++;
    if (er < 0) n_neg_pr++;
    checks++;
    if (longint'($signed(pr)) != er || longint'($signed(pi)) != ei) begin
      failures++;
      if (failures < 20)
        $display("FAIL (%0d + j%0d)(%0d + j%0d): got %0d + j%0d expected %0d + j%0d",
                 xr, xi, yr, yi, $signed(pr), $signed(pi), er, ei);
    end
  endtask

  initial begin
    logic [N-1:0] mx;
    mx = '1;
    // worked example
    apply(N'(11), N'(5), N'(5), N'(2));
    if (longint'($signed(pr)) == 45 && longint'($signed(pi)) == 47)
      $display("example (11 + j5)(5 + j2) = %0d + j%0d", $signed(pr), $signed(pi));
    // corners
    apply('0, '0, '0, '0);
    apply(mx, mx, mx, mx);
    apply(mx, '0, mx, '0);
    apply('0, mx, '0, mx);
    apply(mx, '0, '0, mx);
    apply('0, mx, mx, '0);
    apply(N'(1), mx, mx, N'(1));
    // random, full range
    for (int n = 0; n < 20000; n++)
      apply(N'($urandom), N'($urandom), N'($urandom), N'($urandom));
    // random, small operands (no pre-adder carries)
    for (int n = 0; n < 2000; n++)
      apply(N'($urandom) >> (N / 2), N'($urandom) >> (N / 2),
            N'($urandom) >> (N / 2), N'($urandom) >> (N / 2));
    $display("paths: carry_b=%0d carry_a=%0d neg_diff=%0d neg_pr=%0d",
             n_carry_b, n_carry_a, n_neg_diff, n_neg_pr);
    if (n_carry_b == 0) begin failures++; $display("carry_b never taken"); end
    if (n_carry_a == 0) begin failures++; $display("carry_a never taken"); end
    if (n_neg_diff == 0) begin failures++; $display("neg_diff never taken"); end
    if (n_neg_pr == 0) begin failures++; $display("neg_pr never taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
