// control_unit: the sequencer of the processor. A Moore-style state machine
// takes every instruction through four clock cycles:
//   FETCH      MAR <= PC
//   LOAD_IR    IR <= mem[MAR], PC <= PC + 1
//   EXECUTE    ALU/MAC result -> accumulator (and Z flag for ADD, SUB, MUL,
//              MAC); MAR <= R[ra] for LD/ST; PC <= R[ra] for JMP and for JZ
//              when Z is set; HLT enters HALT
//   WRITEBACK  R[rd] <= accumulator (ALU, MAC) or mem[MAR] (LD);
//              mem[MAR] <= R[rb] (ST)
// After reset it waits in IDLE until run is high, then fetches from the PC.
// HALT is left only by reset. Outputs are decoded from the state and the
// instruction register's opcode (risc16_pkg::ctrl_t). Unused opcodes 14 and
// 15 pass through the four cycles without effect.
// Generating the timing and control signals from the decoded opcode follows
// the description; the four-state sequence and every encoding are this
// design's own choices.
module control_unit
  import risc16_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    run,      // leave IDLE and start fetching
  input  opcode_e opcode,   // from the instruction register
  input  logic    z,        // zero flag
  output ctrl_t   ctrl,
  output state_e  state,
  output logic    halted
);
  state_e state_q, state_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= S_IDLE;
    else        state_q <= state_d;
  end

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE:      if (run) state_d = S_FETCH;
      S_FETCH:     state_d = S_LOAD_IR;
      S_LOAD_IR:   state_d = S_EXECUTE;
      S_EXECUTE:   state_d = (opcode == OP_HLT) ? S_HALT : S_WRITEBACK;
      S_WRITEBACK: state_d = S_FETCH;
      S_HALT:      state_d = S_HALT;
      default:     state_d = S_IDLE;
    endcase
  end

  always_comb begin
    ctrl        = '0;
    ctrl.alu_op = ALU_PASS;
    ctrl.wb_sel = WB_ACC;
    unique case (state_q)
      S_FETCH: begin
        ctrl.mar_load = 1'b1;
      end
      S_LOAD_IR: begin
        ctrl.ir_load = 1'b1;
        ctrl.pc_inc  = 1'b1;
      end
      S_EXECUTE: begin
        unique case (opcode)
          OP_ADD: begin ctrl.alu_op = ALU_ADD; ctrl.acc_load = 1'b1; ctrl.z_load = 1'b1; end
          OP_SUB: begin ctrl.alu_op = ALU_SUB; ctrl.acc_load = 1'b1; ctrl.z_load = 1'b1; end
          OP_MUL: begin
            ctrl.alu_op   = ALU_MUL;
            ctrl.acc_load = 1'b1;
            ctrl.z_load   = 1'b1;
            ctrl.mac_init = 1'b1;
          end
          OP_MAC: begin
            ctrl.mac_acc      = 1'b1;
            ctrl.acc_load     = 1'b1;
            ctrl.acc_from_mac = 1'b1;
            ctrl.z_load       = 1'b1;
          end
          OP_AND: begin ctrl.alu_op = ALU_AND;  ctrl.acc_load = 1'b1; end
          OP_OR:  begin ctrl.alu_op = ALU_OR;   ctrl.acc_load = 1'b1; end
          OP_XOR: begin ctrl.alu_op = ALU_XOR;  ctrl.acc_load = 1'b1; end
          OP_NOT: begin ctrl.alu_op = ALU_NOT;  ctrl.acc_load = 1'b1; end
          OP_MOV: begin ctrl.alu_op = ALU_PASS; ctrl.acc_load = 1'b1; end
          OP_LD, OP_ST: begin
            ctrl.mar_load     = 1'b1;
            ctrl.mar_from_reg = 1'b1;
          end
          OP_JMP: ctrl.pc_load = 1'b1;
          OP_JZ:  ctrl.pc_load = z;
          default: ;  // HLT and unused opcodes
        endcase
      end
      S_WRITEBACK: begin
        unique case (opcode)
          OP_ADD, OP_SUB, OP_MUL, OP_MAC, OP_AND, OP_OR, OP_XOR, OP_NOT, OP_MOV:
            ctrl.reg_we = 1'b1;
          OP_LD: begin
            ctrl.reg_we = 1'b1;
            ctrl.wb_sel = WB_MEM;
          end
          OP_ST: ctrl.mem_we = 1'b1;
          default: ;
        endcase
      end
      default: ;  // IDLE, HALT: no activity
    endcase
  end

  assign state  = state_q;
  assign halted = (state_q == S_HALT);

  // A cycle never both writes a register and writes memory, and the PC is
  // never incremented and loaded at once.
  a_one_write: assert property (@(posedge clk) disable iff (!rst_n)
                                !(ctrl.reg_we && ctrl.mem_we));
  a_pc_ctrl:   assert property (@(posedge clk) disable iff (!rst_n)
                                !(ctrl.pc_inc && ctrl.pc_load));
endmodule
