// instruction_register: holds the instruction fetched from memory for the
// whole of its execution and splits it into its fields,
//   [15:12] opcode  [11:8] rd  [7:4] ra  [3:0] rb.
// It loads on load at the rising clock edge; asynchronous active-low reset
// clears it. Holding the fetched instruction follows the description; the
// field layout is this design's own encoding (see risc16_pkg).
module instruction_register
  import risc16_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] instr,
  output opcode_e           opcode,
  output logic [REG_AW-1:0] rd,
  output logic [REG_AW-1:0] ra,
  output logic [REG_AW-1:0] rb
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    instr <= '0;
    else if (load) instr <= din;
  end

  assign opcode = opcode_e'(instr[15:12]);
  assign rd     = instr[11:8];
  assign ra     = instr[7:4];
  assign rb     = instr[3:0];
endmodule
