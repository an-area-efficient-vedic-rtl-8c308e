// risc16_vedic_cpu: 16-bit, 14-instruction RISC processor whose ALU and MAC
// unit are built on Urdhva-Tiryakbhyam (Vedic) multipliers and homogeneous
// hybrid adders.
//
// Structure: program counter, memory address register, one shared 256 x 16
// program/data memory, instruction register, control unit, 16 x 16-bit
// register bank, Vedic ALU, Vedic MAC unit, accumulator (result register),
// Z flag and the multiplexers that route data between them. Each instruction
// takes four cycles (FETCH, LOAD_IR, EXECUTE, WRITEBACK; see control_unit),
// HLT stops the machine.
//
// Interface:
//   load_en / load_we / load_addr / load_wdata : host access to the memory.
//       While load_en is high the memory is addressed by load_addr and
//       written by the host, and a processor in IDLE stays there. Use it only
//       in reset, in IDLE or after HLT. mem_rdata returns the addressed word.
//   After reset with load_en low the processor runs from address 0.
//   dbg_reg_sel / dbg_reg_data : read any register at any time.
//   pc, z, halted, mac_acc, state : status outputs.
// All state is reset by the asynchronous active-low rst_n except the memory.
// The block set and the Vedic ALU/MAC follow the described processor; the
// memory size, register count, instruction encoding, the host load port and
// the four-cycle sequence are this design's own choices.
module risc16_vedic_cpu
  import risc16_pkg::*;
#(
  parameter int unsigned SEG = 4   // unit adder width of the hybrid adders
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load_en,
  input  logic                load_we,
  input  logic [MEM_AW-1:0]   load_addr,
  input  logic [DATA_W-1:0]   load_wdata,
  output logic [DATA_W-1:0]   mem_rdata,
  input  logic [REG_AW-1:0]   dbg_reg_sel,
  output logic [DATA_W-1:0]   dbg_reg_data,
  output logic [MEM_AW-1:0]   pc,
  output logic                z,
  output logic                halted,
  output logic [2*DATA_W-1:0] mac_acc,
  output state_e              state
);
  ctrl_t               ctrl;
  opcode_e             opcode;
  logic [REG_AW-1:0]   rd, ra, rb;
  logic [DATA_W-1:0]   instr;
  logic [DATA_W-1:0]   ra_data, rb_data;
  logic [DATA_W-1:0]   alu_y, acc_d, acc_q, wb_data;
  logic [2*DATA_W-1:0] alu_prod, mac_prod, mac_next;
  logic [MEM_AW-1:0]   mar_d, mar_q, mem_addr;
  logic [DATA_W-1:0]   mem_wdata;
  logic                mem_we;

  control_unit u_ctrl (
    .clk, .rst_n, .run(!load_en), .opcode, .z, .ctrl, .state, .halted
  );

  program_counter #(.W(MEM_AW)) u_pc (
    .clk, .rst_n, .inc(ctrl.pc_inc), .load(ctrl.pc_load),
    .din(ra_data[MEM_AW-1:0]), .q(pc)
  );

  mux2 #(.W(MEM_AW)) u_mar_mux (
    .sel(ctrl.mar_from_reg), .d0(pc), .d1(ra_data[MEM_AW-1:0]), .y(mar_d)
  );

  mar #(.W(MEM_AW)) u_mar (
    .clk, .rst_n, .load(ctrl.mar_load), .din(mar_d), .q(mar_q)
  );

  mux2 #(.W(MEM_AW)) u_addr_mux (
    .sel(load_en), .d0(mar_q), .d1(load_addr), .y(mem_addr)
  );

  mux2 #(.W(DATA_W)) u_wdata_mux (
    .sel(load_en), .d0(rb_data), .d1(load_wdata), .y(mem_wdata)
  );

  assign mem_we = load_en ? load_we : ctrl.mem_we;

  memory #(.W(DATA_W), .DEPTH(2**MEM_AW)) u_mem (
    .clk, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  instruction_register u_ir (
    .clk, .rst_n, .load(ctrl.ir_load), .din(mem_rdata),
    .instr, .opcode, .rd, .ra, .rb
  );

  mux2 #(.W(DATA_W)) u_wb_mux (
    .sel(ctrl.wb_sel == WB_MEM), .d0(acc_q), .d1(mem_rdata), .y(wb_data)
  );

  register_bank #(.W(DATA_W), .NREGS(2**REG_AW)) u_regs (
    .clk, .rst_n,
    .we(ctrl.reg_we), .waddr(rd), .wdata(wb_data),
    .raddr_a(ra), .rdata_a(ra_data),
    .raddr_b(rb), .rdata_b(rb_data),
    .raddr_dbg(dbg_reg_sel), .rdata_dbg(dbg_reg_data)
  );

  vedic_alu #(.SEG(SEG)) u_alu (
    .a(ra_data), .b(rb_data), .op(ctrl.alu_op), .y(alu_y), .prod(alu_prod)
  );

  vedic_mac #(.SEG(SEG)) u_mac (
    .clk, .rst_n, .a(ra_data), .b(rb_data),
    .init(ctrl.mac_init), .acc_en(ctrl.mac_acc),
    .product(mac_prod), .acc_next(mac_next), .acc(mac_acc)
  );

  mux2 #(.W(DATA_W)) u_acc_mux (
    .sel(ctrl.acc_from_mac), .d0(alu_y), .d1(mac_next[DATA_W-1:0]), .y(acc_d)
  );

  accumulator #(.W(DATA_W)) u_acc (
    .clk, .rst_n, .load(ctrl.acc_load), .din(acc_d), .q(acc_q)
  );

  z_flag #(.W(DATA_W)) u_z (
    .clk, .rst_n, .load(ctrl.z_load), .result(acc_d), .z
  );

  // The processor never writes memory while the host owns it.
  a_no_cpu_write_in_load: assert property (@(posedge clk) disable iff (!rst_n)
                                           load_en |-> !ctrl.mem_we);
endmodule
