// vedic_combine: the adder stage that joins four half-size Vedic products into
// one full product. For operands split into halves a = {aH, aL} and
// b = {bH, bL} of H = N/2 bits each, with
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH   (each N bits)
// the product is q3*2^N + (q1 + q2)*2^H + q0. Three homogeneous hybrid
// adders form it:
//   1. {c1, m}  = q1 + q2                          (N bits, carry kept)
//   2. t        = {c1, m} + q0[N-1:H]              (N+1 bits)
//   3. u        = q3 + t[N:H]                      (N bits)
//   p = {u, t[H-1:0], q0[H-1:0]}
// The carry outs of adders 2 and 3 are always 0 for valid products; they are
// the unused ("garbage") output bits of the multiplier.
// Purely combinational. The exact adder arrangement is this design's reading
// of the block diagrams; the split into four sub-products and the addition of
// their shifted results follow the described method.
module vedic_combine #(
  parameter int unsigned N   = 4,   // width of each sub-product (2 * half width)
  parameter int unsigned SEG = 4    // unit adder width of the hybrid adders
) (
  input  logic [N-1:0]   q0,
  input  logic [N-1:0]   q1,
  input  logic [N-1:0]   q2,
  input  logic [N-1:0]   q3,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] m;
  logic         c1;
  logic [N:0]   t;
  logic         t_co;   // garbage carry, always 0
  logic [N-1:0] u;
  logic         u_co;   // garbage carry, always 0

  hybrid_adder #(.WIDTH(N), .SEG(SEG)) u_add1 (
    .a(q1), .b(q2), .cin(1'b0), .s(m), .cout(c1)
  );

  hybrid_adder #(.WIDTH(N+1), .SEG(SEG)) u_add2 (
    .a({c1, m}), .b({{(H+1){1'b0}}, q0[N-1:H]}), .cin(1'b0), .s(t), .cout(t_co)
  );

  hybrid_adder #(.WIDTH(N), .SEG(SEG)) u_add3 (
    .a(q3), .b({{(N-H-1){1'b0}}, t[N:H]}), .cin(1'b0), .s(u), .cout(u_co)
  );

  assign p = {u, t[H-1:0], q0[H-1:0]};
endmodule
