// z_flag: the one-bit zero status register. When load is high at a rising
// clock edge it records whether result is all zeros; otherwise it keeps its
// value. The control unit loads it for the arithmetic group (ADD, SUB, MUL,
// MAC) and the JZ instruction tests it. Asynchronous active-low reset clears
// it. A single Z flag for the arithmetic group follows the description; the
// reset value is this design's choice.
module z_flag #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] result,
  output logic         z
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    z <= 1'b0;
    else if (load) z <= (result == '0);
  end
endmodule
