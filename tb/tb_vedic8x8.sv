// tb_vedic8x8: self-checking test of the 8x8 Vedic multiplier;
// all 65536 operand pairs are applied.
// The expected product is computed the Urdhva Tiryakbhyam way, column by
// column: cross product C_k is the number of pairs (i, j) with i + j = k and
// a_i b_j = 1, and the product is the sum of C_k 2^k. This reference shares
// nothing with the adder tree inside the block. The multiplier is
// combinational; each result is checked 1 time unit after its inputs
// change. A watchdog ends the run with a failure if it hangs.
module tb_vedic8x8;
  localparam int N = 8;

  logic           clk = 1'b0;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int             checks = 0;
  int             failures = 0;

  always #5 clk = ~clk;

  vedic8x8 dut (.a(a), .b(b), .p(p));

  // product as the weighted sum of the column cross products
  function automatic longint unsigned ut_ref(input logic [N-1:0] x,
                                             input logic [N-1:0] y);
    longint unsigned acc = 0;
    for (int k = 0; k <= 2 * N - 2; k++) begin
      longint unsigned ck = 0;
      for (int i = 0; i < N; i++)
        if (k - i >= 0 && k - i < N && x[i] && y[k-i]) ck++;
      acc += ck << k;
    end
    return acc;
  endfunction

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    longint unsigned exp;
    a = x; b = y;
    #1;
    exp = ut_ref(x, y);
    checks++;
    if (64'(p) != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0d * %0d: got %0d expected %0d", x, y, p, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] mx;
    mx = '1;
    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++) check(N'(i), N'(j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
