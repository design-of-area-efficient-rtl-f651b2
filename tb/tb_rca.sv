// tb_rca: self-checking test of the ripple carry adder.
// A 4-bit instance (the default width) is tested exhaustively over a, b and
// cin; a 34-bit instance, the width of the complex multiplier's output
// adders at N = 16, is tested with random operands and with the full carry
// chain (all ones + 1). Expected sums come from integer addition.
module tb_rca;
  logic        clk = 1'b0;
  int          checks = 0;
  int          failures = 0;

  logic [3:0]  a4, b4, s4;
  logic        c4, co4;
  logic [33:0] a34, b34, s34;
  logic        c34, co34;

  always #5 clk = ~clk;

  rca                dut4  (.a(a4),  .b(b4),  .cin(c4),  .s(s4),  .cout(co4));
  rca #(.W(34))      dut34 (.a(a34), .b(b34), .cin(c34), .s(s34), .cout(co34));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check34(input logic [33:0] x, input logic [33:0] y, input logic ci);
    logic [34:0] exp;
    a34 = x; b34 = y; c34 = ci;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 35'(ci);
    checks++;
    if ({co34, s34} != exp) begin
      failures++;
      $display("FAIL W=34 %h + %h + %0d: got %h expected %h", x, y, ci, {co34, s34}, exp);
    end
  endtask

  initial begin
    a34 = '0; b34 = '0; c34 = 1'b0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int k = 0; k < 2; k++) begin
          a4 = 4'(i); b4 = 4'(j); c4 = 1'(k);
          #1;
          checks++;
          if (int'({co4, s4}) != i + j + k) begin
            failures++;
            $display("FAIL W=4 %0d + %0d + %0d: got %0d", i, j, k, {co4, s4});
          end
        end
    check34('1, '0, 1'b1);
    check34('1, '1, 1'b1);
    check34('0, '0, 1'b0);
    for (int n = 0; n < 2000; n++)
      check34({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
