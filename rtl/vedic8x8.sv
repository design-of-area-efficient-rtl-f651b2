// vedic8x8: 8x8-bit unsigned Vedic multiplier, p = a * b.
// The operands are split into halves aL/aH and bL/bH of 4 bits. Four
// 4x4 multipliers form the vertical products aL*bL and aH*bH and the
// crosswise products aH*bL and aL*bH (Urdhva Tiryakbhyam, "vertically and
// crosswise"), and three ripple carry adders (vedic_merge) add them with
// the proper weights. This is the construction the design uses at every
// level: 4x4 from four 2x2, 8x8 from four 4x4, 16x16 from four 8x8.
// Combinational, no clock, no latency.
module vedic8x8 (
  input  logic [7:0]  a,  // unsigned multiplicand
  input  logic [7:0]  b,  // unsigned multiplier
  output logic [15:0] p   // product
);
  logic [7:0] q0, q1, q2, q3;  // aL*bL, aH*bL, aL*bH, aH*bH

  vedic4x4 u_q0 (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic4x4 u_q1 (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic4x4 u_q2 (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic4x4 u_q3 (.a(a[7:4]), .b(b[7:4]), .p(q3));

  vedic_merge #(.N(8)) u_merge (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
