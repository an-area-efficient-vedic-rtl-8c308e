// half_adder: adds two bits. The sum is the exclusive OR of the inputs and the
// carry is their AND, one XOR gate and one AND gate, exactly as in the
// classic half adder. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,   // a xor b
  output logic c    // a and b
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
