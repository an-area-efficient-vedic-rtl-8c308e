// mar: memory address register. It holds the word address applied to the
// memory: the PC during an instruction fetch, a register value during a load
// or store. It loads on load at the rising clock edge; asynchronous
// active-low reset clears it. The register itself follows the description;
// its width (8 bits, 256 words) is this design's choice.
module mar #(
  parameter int unsigned W = 8
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
