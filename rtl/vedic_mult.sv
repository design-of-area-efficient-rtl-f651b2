// vedic_mult: N x N unsigned Vedic multiplier for N = 2, 4, 8 or 16,
// p = a * b. It picks the matching fixed-size multiplier (vedic2x2,
// vedic4x4, vedic8x8 or vedic16x16) so that the complex multiplier can be
// built at any of the sizes the design is described at. Any other N stops
// elaboration with an error. Combinational, no clock, no latency. The
// selector itself is a convenience of this implementation.
module vedic_mult #(
  parameter int unsigned N = 16  // operand width: 2, 4, 8 or 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (N == 16) begin : g_16
    vedic16x16 u_mul (.a(a), .b(b), .p(p));
  end else if (N == 8) begin : g_8
    vedic8x8 u_mul (.a(a), .b(b), .p(p));
  end else if (N == 4) begin : g_4
    vedic4x4 u_mul (.a(a), .b(b), .p(p));
  end else if (N == 2) begin : g_2
    vedic2x2 u_mul (.a(a), .b(b), .p(p));
  end else begin : g_bad
    $error("vedic_mult: N must be 2, 4, 8 or 16");
  end
endmodule
