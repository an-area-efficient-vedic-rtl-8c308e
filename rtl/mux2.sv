// mux2: two-input, W-bit multiplexer, the input selector used throughout the
// data path (MAR source, accumulator source, register write-back source,
// memory address and write data). y = sel ? d1 : d0. Combinational.
module mux2 #(
  parameter int unsigned W = 16
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);
  assign y = sel ? d1 : d0;
endmodule
