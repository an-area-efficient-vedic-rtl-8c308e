// accumulator: the result register that the ALU (or the MAC unit) writes at
// the end of the execute cycle; its value is written to the register bank in
// the following cycle. Loads on load at the rising edge; asynchronous
// active-low reset clears it. Holding the ALU outcome in an accumulator
// before it is stored in a register follows the description.
module accumulator #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] din,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= din;
  end
endmodule
