// hybrid_adder: homogeneous hybrid adder. A WIDTH-bit adder is assembled from
// identical SEG-bit adder modules (rca_adder) whose carries are chained:
// module 1 adds the lowest SEG bits, its carry feeds module 2, and so on.
// If WIDTH is not a multiple of SEG the last module is narrower.
// Interface: a + b + cin = {cout, s}. Purely combinational.
// Building a wide adder from a number of same-type n-bit adders follows the
// design description; SEG = 4 and the ripple-carry unit are this design's
// own choices.
module hybrid_adder #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned SEG   = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int unsigned NSEG = (WIDTH + SEG - 1) / SEG;

  logic [NSEG:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < NSEG; k++) begin : g_seg
    localparam int unsigned LO = k * SEG;
    localparam int unsigned SW = (WIDTH - LO < SEG) ? (WIDTH - LO) : SEG;
    rca_adder #(.W(SW)) u_seg (
      .a   (a[LO +: SW]),
      .b   (b[LO +: SW]),
      .cin (c[k]),
      .s   (s[LO +: SW]),
      .cout(c[k+1])
    );
  end

  assign cout = c[NSEG];
endmodule
