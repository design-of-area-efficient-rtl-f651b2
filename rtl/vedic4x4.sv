// vedic4x4: 4x4-bit unsigned Vedic multiplier, p = a * b.
// The operands are split into halves aL/aH and bL/bH of 2 bits. Four
// 2x2 multipliers form the vertical products aL*bL and aH*bH and the
// crosswise products aH*bL and aL*bH (Urdhva Tiryakbhyam, "vertically and
// crosswise"), and three ripple carry adders (vedic_merge) add them with
// the proper weights. This is the construction the design uses at every
// level: 4x4 from four 2x2, 8x8 from four 4x4, 16x16 from four 8x8.
// Combinational, no clock, no latency.
module vedic4x4 (
  input  logic [3:0]  a,  // unsigned multiplicand
  input  logic [3:0]  b,  // unsigned multiplier
  output logic [7:0] p   // product
);
  logic [3:0] q0, q1, q2, q3;  // aL*bL, aH*bL, aL*bH, aH*bH

  vedic2x2 u_q0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic2x2 u_q1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic2x2 u_q2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic2x2 u_q3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  vedic_merge #(.N(4)) u_merge (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
