// vedic_alu: 16-bit arithmetic and logic unit of the processor.
// Addition and subtraction run on one WIDTH-bit homogeneous hybrid adder
// (subtraction as a + ~b + 1); multiplication runs on the 16x16 Vedic
// multiplier and returns the low WIDTH bits of the product; AND, OR, XOR,
// NOT and a pass-through of a (for MOV) complete the operation set.
// Interface: op selects the operation (risc16_pkg::alu_op_e), y is the result,
// prod is the full 32-bit product. Purely combinational; the result is
// registered outside, in the accumulator.
// Using the Vedic multiplier and hybrid adder inside the ALU follows the
// design description; the operation set is this design's own choice.
module vedic_alu
  import risc16_pkg::*;
#(
  parameter int unsigned SEG = 4   // unit adder width of the hybrid adders
) (
  input  logic [DATA_W-1:0]   a,
  input  logic [DATA_W-1:0]   b,
  input  alu_op_e             op,
  output logic [DATA_W-1:0]   y,
  output logic [2*DATA_W-1:0] prod
);
  logic              sub;
  logic [DATA_W-1:0] b_add;
  logic [DATA_W-1:0] sum;
  logic              sum_co;   // carry out, not used by the ISA

  assign sub   = (op == ALU_SUB);
  assign b_add = sub ? ~b : b;

  hybrid_adder #(.WIDTH(DATA_W), .SEG(SEG)) u_add (
    .a(a), .b(b_add), .cin(sub), .s(sum), .cout(sum_co)
  );

  vedic_mult_16x16 #(.SEG(SEG)) u_mul (.a(a), .b(b), .p(prod));

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB: y = sum;
      ALU_MUL:          y = prod[DATA_W-1:0];
      ALU_AND:          y = a & b;
      ALU_OR:           y = a | b;
      ALU_XOR:          y = a ^ b;
      ALU_NOT:          y = ~a;
      ALU_PASS:         y = a;
      default:          y = a;
    endcase
  end
endmodule
