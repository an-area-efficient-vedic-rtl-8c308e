// full_adder: adds three bits (a, b and an incoming carry). It is built the
// way the design's adders are described: two half adders in series, the first
// adding a and b, the second adding that partial sum to the carry in, and an
// OR gate merging the two half-adder carries into the carry out.
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic s1, c1, c2;

  half_adder u_ha0 (.a(a),  .b(b),   .s(s1), .c(c1));
  half_adder u_ha1 (.a(s1), .b(cin), .s(s),  .c(c2));

  assign cout = c1 | c2;
endmodule
