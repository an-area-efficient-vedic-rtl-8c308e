// register_bank: the processor's general purpose registers, NREGS words of
// W bits. Two combinational read ports (ra, rb) feed the ALU and MAC, one
// synchronous write port takes the write-back value, and a third read port
// lets a test or debug host observe any register. A write is seen by the
// read ports from the next clock edge on. Asynchronous active-low reset
// clears every register.
// A small bank of storage registers follows the description; the count of
// 16 registers, the port arrangement and the reset are this design's choices.
module register_bank #(
  parameter int unsigned W     = 16,
  parameter int unsigned NREGS = 16,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr_a,
  output logic [W-1:0]  rdata_a,
  input  logic [AW-1:0] raddr_b,
  output logic [W-1:0]  rdata_b,
  input  logic [AW-1:0] raddr_dbg,
  output logic [W-1:0]  rdata_dbg
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a   = regs[raddr_a];
  assign rdata_b   = regs[raddr_b];
  assign rdata_dbg = regs[raddr_dbg];
endmodule
