// complex_mult: complex multiplier built on three N x N Vedic multipliers.
//
// For a = ar + j ai and b = br + j bi the product p = pr + j pi is
//   pr = ar br - ai bi = ar (br + bi) - (ar + ai) bi
//   pi = ar bi + ai br = ar (br + bi) + (ai - ar) br
// The shared term ar (br + bi) lets three real multiplications replace four.
// The three products are
//   m1 = ar * (br + bi)      m2 = (ar + ai) * bi      m3 = |ai - ar| * br
// each on an N x N vedic_mult, and then pr = m1 - m2, pi = m1 +/- m3.
//
// Operands are unsigned N-bit numbers (the Vedic multiplier is unsigned).
// Three details keep every multiplier N x N:
//  * br + bi and ar + ai are N+1 bits wide. Only their low N bits go to the
//    multiplier; when the carry is set the other operand is added once more,
//    shifted left by N bits (m1 = ar*s[N-1:0] + (cs ? ar << N : 0)), which is
//    one N-bit ripple carry adder on the upper half of the product.
//  * ai - ar may be negative. Its magnitude (at most 2^N - 1) is formed by a
//    subtractor and a conditional two's complement, and the sign decides
//    whether m3 is added to or subtracted from m1.
//  * pr and pi come out as (2N+2)-bit two's complement numbers: pr can be
//    negative and pi can reach 2(2^N-1)^2.
// All adders and subtractors are ripple carry adders (rca), subtraction being
// a + ~b + 1. The three-multiplier formulation and the Vedic multipliers
// follow the design; the unsigned operand format, the carry correction of
// the pre-adders and the sign-magnitude handling of ai - ar are this
// implementation's choices.
//
// Combinational: no clock, no latency. N defaults to 16 (16x16 multipliers)
// and may be 2, 4, 8 or 16.
module complex_mult #(
  parameter int unsigned N = 16  // operand width: 2, 4, 8 or 16
) (
  input  logic [N-1:0]   ar,  // real part of a
  input  logic [N-1:0]   ai,  // imaginary part of a
  input  logic [N-1:0]   br,  // real part of b
  input  logic [N-1:0]   bi,  // imaginary part of b
  output logic [2*N+1:0] pr,  // real part of a*b, two's complement
  output logic [2*N+1:0] pi   // imaginary part of a*b, two's complement
);
  localparam int unsigned W = 2 * N + 2;  // output width

  // ---- pre-adders ---------------------------------------------------------
  logic [N-1:0] sb;   // low N bits of br + bi
  logic         cb;   // carry of br + bi
  logic [N-1:0] sa;   // low N bits of ar + ai
  logic         ca;   // carry of ar + ai
  logic [N-1:0] d;    // ai - ar, modulo 2^N
  logic         nb;   // "no borrow": ai >= ar
  logic [N-1:0] dn;   // -(ai - ar), modulo 2^N
  logic [N-1:0] dmag; // |ai - ar|

  rca #(.W(N)) u_add_b (.a(br), .b(bi),  .cin(1'b0), .s(sb), .cout(cb));
  rca #(.W(N)) u_add_a (.a(ar), .b(ai),  .cin(1'b0), .s(sa), .cout(ca));
  rca #(.W(N)) u_sub_d (.a(ai), .b(~ar), .cin(1'b1), .s(d),  .cout(nb));
  // two's complement of d: 0 + ~d + 1
  rca #(.W(N)) u_neg_d (.a('0), .b(~d),  .cin(1'b1), .s(dn), .cout());

  assign dmag = nb ? d : dn;

  // ---- three real Vedic multipliers ---------------------------------------
  logic [2*N-1:0] r1;  // ar * sb
  logic [2*N-1:0] r2;  // sa * bi
  logic [2*N-1:0] m3;  // |ai - ar| * br

  vedic_mult #(.N(N)) u_mul1 (.a(ar),   .b(sb), .p(r1));
  vedic_mult #(.N(N)) u_mul2 (.a(sa),   .b(bi), .p(r2));
  vedic_mult #(.N(N)) u_mul3 (.a(dmag), .b(br), .p(m3));

  // ---- carry correction of the N+1-bit pre-adder results ------------------
  logic [2*N:0] m1;  // ar * (br + bi), 2N+1 bits
  logic [2*N:0] m2;  // (ar + ai) * bi, 2N+1 bits

  rca #(.W(N)) u_fix1 (
    .a(r1[2*N-1:N]), .b(cb ? ar : '0), .cin(1'b0), .s(m1[2*N-1:N]), .cout(m1[2*N])
  );
  assign m1[N-1:0] = r1[N-1:0];

  rca #(.W(N)) u_fix2 (
    .a(r2[2*N-1:N]), .b(ca ? bi : '0), .cin(1'b0), .s(m2[2*N-1:N]), .cout(m2[2*N])
  );
  assign m2[N-1:0] = r2[N-1:0];

  // ---- output combination -------------------------------------------------
  logic [W-1:0] m1x, m2x, m3x;

  assign m1x = {1'b0, m1};
  assign m2x = {1'b0, m2};
  assign m3x = {2'b00, m3};

  // pr = m1 - m2
  rca #(.W(W)) u_pr (.a(m1x), .b(~m2x), .cin(1'b1), .s(pr), .cout());
  // pi = m1 + m3 when ai >= ar, m1 - m3 otherwise
  rca #(.W(W)) u_pi (
    .a(m1x), .b(nb ? m3x : ~m3x), .cin(~nb), .s(pi), .cout()
  );
endmodule
