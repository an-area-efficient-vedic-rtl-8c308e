// memory: the single memory that holds both program and data (a von Neumann
// arrangement). DEPTH words of W bits; the write is synchronous (we at the
// rising edge), the read is combinational from addr. Because the processor
// always drives addr from the memory address register, a read behaves like a
// synchronous RAM read with a registered address. The array is not reset.
// One shared memory follows the description; its size, 256 x 16 bits, and
// the port timing are this design's choices.
module memory #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
