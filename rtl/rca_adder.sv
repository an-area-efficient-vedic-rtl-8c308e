// rca_adder: W-bit ripple-carry adder, the repeated "n-bit adder module" from
// which the homogeneous hybrid adder is assembled. W full adders are chained
// so that each one's carry out is the next one's carry in.
// Interface: a + b + cin = {cout, s}. Purely combinational.
// The ripple-carry choice for the unit adder is this design's own: only the
// use of identical small adders is prescribed.
module rca_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end

  assign cout = c[W];
endmodule
