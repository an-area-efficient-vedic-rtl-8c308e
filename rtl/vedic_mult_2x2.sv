// vedic_mult_2x2: 2-bit by 2-bit Urdhva-Tiryakbhyam ("vertically and
// crosswise") multiplier, the leaf of the Vedic multiplier tree.
//   p0        = a0 b0                 (vertical, LSBs)
//   {c1, p1}  = a1 b0 + a0 b1         (crosswise, half adder)
//   {p3, p2}  = c1 + a1 b1            (vertical, MSBs, half adder)
// Four AND gates and two half adders, as described. Purely combinational.
module vedic_mult_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;

  assign p[0] = a[0] & b[0];
  half_adder u_ha0 (.a(a[1] & b[0]), .b(a[0] & b[1]), .s(p[1]), .c(c1));
  half_adder u_ha1 (.a(c1),          .b(a[1] & b[1]), .s(p[2]), .c(p[3]));
endmodule
