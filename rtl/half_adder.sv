// half_adder: one-bit half adder, sum = a ^ b, carry = a & b.
// Purely combinational. It is the adder cell of the 2x2 Vedic multiplier,
// which the 2x2 description builds from two of them.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b;
    c = a & b;
  end
endmodule
