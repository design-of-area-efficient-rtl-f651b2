// vedic16x16: 16x16-bit unsigned Vedic multiplier, p = a * b.
// The operands are split into halves aL/aH and bL/bH of 8 bits. Four
// 8x8 multipliers form the vertical products aL*bL and aH*bH and the
// crosswise products aH*bL and aL*bH (Urdhva Tiryakbhyam, "vertically and
// crosswise"), and three ripple carry adders (vedic_merge) add them with
// the proper weights. This is the construction the design uses at every
// level: 4x4 from four 2x2, 8x8 from four 4x4, 16x16 from four 8x8.
// Combinational, no clock, no latency.
module vedic16x16 (
  input  logic [15:0]  a,  // unsigned multiplicand
  input  logic [15:0]  b,  // unsigned multiplier
  output logic [31:0] p   // product
);
  logic [15:0] q0, q1, q2, q3;  // aL*bL, aH*bL, aL*bH, aH*bH

  vedic8x8 u_q0 (.a(a[7:0]), .b(b[7:0]), .p(q0));
  vedic8x8 u_q1 (.a(a[15:8]), .b(b[7:0]), .p(q1));
  vedic8x8 u_q2 (.a(a[7:0]), .b(b[15:8]), .p(q2));
  vedic8x8 u_q3 (.a(a[15:8]), .b(b[15:8]), .p(q3));

  vedic_merge #(.N(16)) u_merge (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
