// vedic_merge: the three ripple carry adders that turn the four half-size
// products of an N x N Vedic multiplier into the 2N-bit product.
// With H = N/2 and the sub-products (each N bits)
//   q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH
// the adders compute
//   adder 1 (N bits)   : x = q1 + q2                 (the two cross products,
//                        its carry kept as bit N of x)
//   adder 2 (N+1 bits) : y = x + {0.., q0[N-1:H]}    (upper half of q0)
//   adder 3 (N bits)   : z = q3 + {0.., y[N:H]}      (upper part of y)
// and p = {z, y[H-1:0], q0[H-1:0]}. Adder 2 is one bit wider than the other
// two because x can reach 2(2^H-1)^2. The carries of adders 2 and 3 are
// always zero, since the product fits in 2N bits, and are left unconnected.
// The three-adder arrangement is the one the 4x4 multiplier is described
// with; the exact adder widths follow from the arithmetic.
// Combinational, no clock, no latency. N is even and at least 4.
module vedic_merge #(
  parameter int unsigned N = 4  // width of the multiplier's operands
) (
  input  logic [N-1:0]   q0,  // aL * bL
  input  logic [N-1:0]   q1,  // aH * bL
  input  logic [N-1:0]   q2,  // aL * bH
  input  logic [N-1:0]   q3,  // aH * bH
  output logic [2*N-1:0] p    // a * b
);
  localparam int unsigned H = N / 2;

  logic [N:0]   x;  // adder 1: q1 + q2 with carry
  logic [N:0]   y;  // adder 2: x + upper half of q0
  logic [N-1:0] z;  // adder 3: q3 + upper part of y

  rca #(.W(N)) u_add1 (
    .a(q1), .b(q2), .cin(1'b0), .s(x[N-1:0]), .cout(x[N])
  );
  rca #(.W(N+1)) u_add2 (
    .a(x), .b({{(H+1){1'b0}}, q0[N-1:H]}), .cin(1'b0), .s(y), .cout()
  );
  rca #(.W(N)) u_add3 (
    .a(q3), .b({{(H-1){1'b0}}, y[N:H]}), .cin(1'b0), .s(z), .cout()
  );

  assign p = {z, y[H-1:0], q0[H-1:0]};
endmodule
