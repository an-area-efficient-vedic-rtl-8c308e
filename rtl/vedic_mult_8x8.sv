// vedic_mult_8x8: 8-bit by 8-bit unsigned Urdhva-Tiryakbhyam multiplier.
// Both operands are split into 4-bit halves; four 4x4 Vedic multipliers
// form the four cross products aL*bL, aH*bL, aL*bH and aH*bH concurrently, and
// vedic_combine adds them with homogeneous hybrid adders:
//   p = aH*bH * 2^8 + (aH*bL + aL*bH) * 2^4 + aL*bL
// Interface: p = a * b, 16 bits. Purely combinational.
// The recursive four-module structure follows the described method; the adder
// arrangement inside vedic_combine is this design's own reading of it.
module vedic_mult_8x8 #(
  parameter int unsigned SEG = 4   // unit adder width of the hybrid adders
) (
  input  logic [7:0]   a,
  input  logic [7:0]   b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;

  vedic_mult_4x4 #(.SEG(SEG)) u_q0 (.a(a[3:0]),  .b(b[3:0]),  .p(q0));
  vedic_mult_4x4 #(.SEG(SEG)) u_q1 (.a(a[7:4]), .b(b[3:0]),  .p(q1));
  vedic_mult_4x4 #(.SEG(SEG)) u_q2 (.a(a[3:0]),  .b(b[7:4]), .p(q2));
  vedic_mult_4x4 #(.SEG(SEG)) u_q3 (.a(a[7:4]), .b(b[7:4]), .p(q3));

  vedic_combine #(.N(8), .SEG(SEG)) u_comb (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );
endmodule
