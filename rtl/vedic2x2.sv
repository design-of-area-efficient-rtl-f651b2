// vedic2x2: 2x2-bit unsigned multiplier after the Urdhva Tiryakbhyam
// ("vertically and crosswise") sutra.
//   vertical    : s0 = a0 b0
//   crosswise   : a1 b0 + a0 b1 -> sum s1, carry c1   (half adder)
//   vertical    : a1 b1 + c1    -> sum s2, carry c2   (half adder)
// The product is p = {c2, s2, s1, s0}. Four AND gates and two half adders,
// as the design describes; combinational, no clock, no latency.
module vedic2x2 (
  input  logic [1:0] a,  // multiplicand a1 a0
  input  logic [1:0] b,  // multiplier   b1 b0
  output logic [3:0] p   // product      c2 s2 s1 s0
);
  logic pp00, pp10, pp01, pp11;  // partial products a_i b_j
  logic s1, c1, s2, c2;

  always_comb begin
    pp00 = a[0] & b[0];
    pp10 = a[1] & b[0];
    pp01 = a[0] & b[1];
    pp11 = a[1] & b[1];
  end

  half_adder u_ha_cross (.a(pp10), .b(pp01), .s(s1), .c(c1));
  half_adder u_ha_top   (.a(pp11), .b(c1),   .s(s2), .c(c2));

  assign p = {c2, s2, s1, pp00};
endmodule
