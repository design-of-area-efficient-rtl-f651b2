// rca: W-bit ripple carry adder, {cout, s} = a + b + cin.
// A chain of W full adders; the carry of bit i feeds bit i+1, so the delay
// grows linearly with W. The Vedic multipliers use three of these per level
// of recursion to merge their four sub-products; the complex multiplier uses
// them for its pre-adders, its subtractors (b inverted, cin = 1) and its
// output combination. Combinational, no clock, no latency.
// The ripple-carry structure is the one the design is described with; the
// carry-in port is this implementation's addition so the same cell can
// subtract.
module rca #(
  parameter int unsigned W = 4  // operand width in bits
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
