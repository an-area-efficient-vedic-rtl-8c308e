// program_counter: holds the memory address of the next instruction.
// inc adds one (wrapping at 2^W), load takes a jump target; load has
// priority. Asynchronous active-low reset starts execution at address 0.
// An incrementing PC follows the description; the reset address, width and
// priority are this design's choices.
module program_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  input  logic         load,
  input  logic [W-1:0] din,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= din;
    else if (inc)  q <= q + W'(1);
  end
endmodule
