// tb_vedic2x2: exhaustive self-checking test of the 2x2 Vedic multiplier.
// All 16 operand pairs are applied; the expected product is built bit by bit
// from the partial products a_i b_j with integer arithmetic. The cell is
// combinational, so each result is checked 1 time unit after its inputs
// change. A watchdog ends the run with a failure if it hangs.
module tb_vedic2x2;
  logic       clk = 1'b0;
  logic [1:0] a, b;
  logic [3:0] p;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  vedic2x2 dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        exp = 0;
        for (int u = 0; u < 2; u++)
          for (int v = 0; v < 2; v++)
            if (a[u] && b[v]) exp += 1 << (u + v);
        checks++;
        if (int'(p) != exp) begin
          failures++;
          $display("FAIL %0d * %0d: got %0d expected %0d", i, j, p, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
