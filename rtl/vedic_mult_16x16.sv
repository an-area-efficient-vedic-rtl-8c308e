// vedic_mult_16x16: 16-bit by 16-bit unsigned Urdhva-Tiryakbhyam multiplier.
// Both operands are split into 8-bit halves; four 8x8 Vedic multipliers
// form the four cross products aL*bL, aH*bL, aL*bH and aH*bH concurrently, and
// vedic_combine adds them with homogeneous hybrid adders:
//   p = aH*bH * 2^16 + (aH*bL + aL*bH) * 2^8 + aL*bL
// Interface: p = a * b, 32 bits. Purely combinational.
// The recursive four-module structure follows the described method; the adder
// arrangement inside vedic_combine is this design's own reading of it.
module vedic_mult_16x16 #(
  parameter int unsigned SEG = 4   // unit adder width of the hybrid adders
) (
  input  logic [15:0]   a,
  input  logic [15:0]   b,
  output logic [31:0] p
);
  logic [15:0] q0, q1, q2, q3;

  vedic_mult_8x8 #(.SEG(SEG)) u_q0 (.a(a[7:0]),  .b(b[7:0]),  .p(q0));
  vedic_mult_8x8 #(.SEG(SEG)) u_q1 (.a(a[15:8]), .b(b[7:0]),  .p(q1));
  vedic_mult_8x8 #(.SEG(SEG)) u_q2 (.a(a[7:0]),  .b(b[15:8]), .p(q2));
  vedic_mult_8x8 #(.SEG(SEG)) u_q3 (.a(a[15:8]), .b(b[15:8]), .p(q3));

  vedic_combine #(.N(16), .SEG(SEG)) u_comb (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );
endmodule
