// risc16_pkg: types and constants shared by the 16-bit Vedic RISC processor.
//
// The processor is a small load/store machine with 16-bit words and 14
// instructions that use register addressing only. Every instruction is one
// 16-bit word:
//
//   [15:12] opcode   [11:8] rd   [7:4] ra   [3:0] rb
//
// The instruction count (14), the 16-bit word, register addressing and the
// single Z flag set by the arithmetic group follow the processor description;
// the opcode values, the field layout, the register count and the meaning of
// each instruction are this design's own choices, since no encoding is given.
package risc16_pkg;

  localparam int unsigned DATA_W   = 16;  // data path and instruction width
  localparam int unsigned REG_AW   = 4;   // register field width -> 16 registers
  localparam int unsigned MEM_AW   = 8;   // word address width -> 256 words

  typedef enum logic [3:0] {
    OP_ADD = 4'd0,   // rd <= ra + rb                  sets Z
    OP_SUB = 4'd1,   // rd <= ra - rb                  sets Z
    OP_MUL = 4'd2,   // rd <= (ra * rb)[15:0], MAC accumulator <= ra * rb, sets Z
    OP_MAC = 4'd3,   // acc <= acc + ra * rb, rd <= acc[15:0]            sets Z
    OP_AND = 4'd4,   // rd <= ra & rb
    OP_OR  = 4'd5,   // rd <= ra | rb
    OP_XOR = 4'd6,   // rd <= ra ^ rb
    OP_NOT = 4'd7,   // rd <= ~ra
    OP_MOV = 4'd8,   // rd <= ra
    OP_LD  = 4'd9,   // rd <= mem[ra]
    OP_ST  = 4'd10,  // mem[ra] <= rb
    OP_JMP = 4'd11,  // pc <= ra
    OP_JZ  = 4'd12,  // if (Z) pc <= ra
    OP_HLT = 4'd13   // stop fetching
    // 14 and 15 are unused and execute as no-operations
  } opcode_e;

  // Operation selected inside the ALU.
  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,
    ALU_SUB  = 3'd1,
    ALU_MUL  = 3'd2,
    ALU_AND  = 3'd3,
    ALU_OR   = 3'd4,
    ALU_XOR  = 3'd5,
    ALU_NOT  = 3'd6,
    ALU_PASS = 3'd7   // result = a (MOV)
  } alu_op_e;

  // Control unit states: one instruction takes FETCH, LOAD_IR, EXECUTE,
  // WRITEBACK, i.e. four clock cycles.
  typedef enum logic [2:0] {
    S_IDLE      = 3'd0,
    S_FETCH     = 3'd1,
    S_LOAD_IR   = 3'd2,
    S_EXECUTE   = 3'd3,
    S_WRITEBACK = 3'd4,
    S_HALT      = 3'd5
  } state_e;

  // Source of the register-bank write data.
  typedef enum logic {
    WB_ACC = 1'b0,   // the accumulator (ALU or MAC result)
    WB_MEM = 1'b1    // the memory read data (LD)
  } wb_sel_e;

  // Control signals produced by the control unit for one clock cycle.
  typedef struct packed {
    logic    mar_load;    // load the memory address register
    logic    mar_from_reg;// 1: MAR <= R[ra] (LD/ST), 0: MAR <= PC (fetch)
    logic    ir_load;     // load the instruction register from memory
    logic    pc_inc;      // PC <= PC + 1
    logic    pc_load;     // PC <= R[ra] (jump)
    logic    acc_load;    // load the accumulator with the result
    logic    acc_from_mac;// 1: accumulator <= MAC result, 0: <= ALU result
    alu_op_e alu_op;      // ALU operation
    logic    mac_init;    // MAC accumulator <= product (MUL)
    logic    mac_acc;     // MAC accumulator <= accumulator + product (MAC)
    logic    z_load;      // update the Z flag from the result
    logic    reg_we;      // write the register bank
    wb_sel_e wb_sel;      // register write data source
    logic    mem_we;      // write R[rb] to memory at MAR
  } ctrl_t;

endpackage
