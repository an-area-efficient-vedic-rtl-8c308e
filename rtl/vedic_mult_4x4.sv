// vedic_mult_4x4: 4-bit by 4-bit unsigned Urdhva-Tiryakbhyam multiplier.
// Both operands are split into 2-bit halves; four 2x2 Vedic multipliers
// form the four cross products aL*bL, aH*bL, aL*bH and aH*bH concurrently, and
// vedic_combine adds them with homogeneous hybrid adders:
//   p = aH*bH * 2^4 + (aH*bL + aL*bH) * 2^2 + aL*bL
// Interface: p = a * b, 8 bits. Purely combinational.
// The recursive four-module structure follows the described method; the adder
// arrangement inside vedic_combine is this design's own reading of it.
module vedic_mult_4x4 #(
  parameter int unsigned SEG = 4   // unit adder width of the hybrid adders
) (
  input  logic [3:0]   a,
  input  logic [3:0]   b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;

  vedic_mult_2x2 u_q0 (.a(a[1:0]),  .b(b[1:0]),  .p(q0));
  vedic_mult_2x2 u_q1 (.a(a[3:2]), .b(b[1:0]),  .p(q1));
  vedic_mult_2x2 u_q2 (.a(a[1:0]),  .b(b[3:2]), .p(q2));
  vedic_mult_2x2 u_q3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  vedic_combine #(.N(4), .SEG(SEG)) u_comb (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );
endmodule
