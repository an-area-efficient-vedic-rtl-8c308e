// vedic_mac: multiply-accumulate unit. A 16x16 Vedic multiplier forms a*b and
// a 32-bit homogeneous hybrid adder adds it to the accumulator register.
//   init   : acc <= a*b            (used by MUL, starts a new sum)
//   acc_en : acc <= acc + a*b      (used by MAC)
// acc_next is the value the accumulator takes at the next rising edge when
// init or acc_en is set, so the result can be written back in the same
// instruction. The accumulator wraps modulo 2^32. Asynchronous active-low
// reset clears it. If both controls are high, init wins.
// A multiplier plus accumulator clocked and reset as a unit follows the
// description of a MAC; the 32-bit accumulator width and the init/accumulate
// controls are this design's own choices.
module vedic_mac
  import risc16_pkg::*;
#(
  parameter int unsigned SEG = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DATA_W-1:0]   a,
  input  logic [DATA_W-1:0]   b,
  input  logic                init,
  input  logic                acc_en,
  output logic [2*DATA_W-1:0] product,
  output logic [2*DATA_W-1:0] acc_next,
  output logic [2*DATA_W-1:0] acc
);
  logic [2*DATA_W-1:0] sum;
  logic                sum_co;   // overflow beyond 32 bits is dropped

  vedic_mult_16x16 #(.SEG(SEG)) u_mul (.a(a), .b(b), .p(product));

  hybrid_adder #(.WIDTH(2*DATA_W), .SEG(SEG)) u_add (
    .a(acc), .b(product), .cin(1'b0), .s(sum), .cout(sum_co)
  );

  assign acc_next = init ? product : sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               acc <= '0;
    else if (init || acc_en)  acc <= acc_next;
  end
endmodule
