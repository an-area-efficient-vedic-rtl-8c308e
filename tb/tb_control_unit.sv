// tb_control_unit: runs every opcode (with Z both 0 and 1) through the
// control unit and checks the state sequence IDLE -> FETCH -> LOAD_IR ->
// EXECUTE -> WRITEBACK -> FETCH (HLT: EXECUTE -> HALT, held until reset),
// the four-cycle instruction time, and the control signals raised in each
// state against an independent table of what each instruction must do.
module tb_control_unit;
  import risc16_pkg::*;
  logic    clk = 0, rst_n = 0, run, z, halted;
  opcode_e opcode;
  ctrl_t   ctrl;
  state_e  state;
  int checks = 0, failures = 0;

  control_unit dut (.clk, .rst_n, .run, .opcode, .z, .ctrl, .state, .halted);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL op=%0d z=%0d %s (state=%0d ctrl=%h)", opcode, z, what, state, ctrl);
    end
  endtask

  function automatic logic is_alu(opcode_e o);
    return o inside {OP_ADD, OP_SUB, OP_MUL, OP_MAC, OP_AND, OP_OR, OP_XOR, OP_NOT, OP_MOV};
  endfunction

  task automatic run_one(input opcode_e o, input logic zf);
    int cycles;
    rst_n = 0; run = 0; opcode = o; z = zf;
    @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    check(state == S_IDLE && !halted, "idle after reset");
    check(!ctrl.mar_load && !ctrl.reg_we && !ctrl.mem_we, "idle is quiet");
    run = 1;
    @(negedge clk);
    check(state == S_FETCH, "fetch");
    check(ctrl.mar_load && !ctrl.mar_from_reg && !ctrl.ir_load, "fetch loads MAR from PC");
    @(negedge clk);
    check(state == S_LOAD_IR, "load_ir");
    check(ctrl.ir_load && ctrl.pc_inc && !ctrl.pc_load, "load_ir loads IR, increments PC");
    @(negedge clk);
    check(state == S_EXECUTE, "execute");
    check(ctrl.acc_load == is_alu(o), "acc_load");
    check(ctrl.z_load == (o inside {OP_ADD, OP_SUB, OP_MUL, OP_MAC}), "z_load for arithmetic group");
    check(ctrl.mac_init == (o == OP_MUL), "mac_init");
    check(ctrl.mac_acc == (o == OP_MAC), "mac_acc");
    check(ctrl.acc_from_mac == (o == OP_MAC), "acc_from_mac");
    check(ctrl.mar_load == (o inside {OP_LD, OP_ST}), "mar_load for LD/ST");
    if (o inside {OP_LD, OP_ST}) check(ctrl.mar_from_reg, "MAR from register");
    check(ctrl.pc_load == ((o == OP_JMP) || (o == OP_JZ && zf)), "pc_load");
    check(!ctrl.reg_we && !ctrl.mem_we && !ctrl.pc_inc, "no writes in execute");
    case (o)
      OP_ADD: check(ctrl.alu_op == ALU_ADD, "alu add");
      OP_SUB: check(ctrl.alu_op == ALU_SUB, "alu sub");
      OP_MUL: check(ctrl.alu_op == ALU_MUL, "alu mul");
      OP_AND: check(ctrl.alu_op == ALU_AND, "alu and");
      OP_OR:  check(ctrl.alu_op == ALU_OR,  "alu or");
      OP_XOR: check(ctrl.alu_op == ALU_XOR, "alu xor");
      OP_NOT: check(ctrl.alu_op == ALU_NOT, "alu not");
      OP_MOV: check(ctrl.alu_op == ALU_PASS, "alu pass");
      default: ;
    endcase
    @(negedge clk);
    if (o == OP_HLT) begin
      check(state == S_HALT && halted, "halt");
      repeat (5) @(negedge clk);
      check(state == S_HALT && halted && ctrl.mar_load == 0, "halt holds");
    end else begin
      check(state == S_WRITEBACK && !halted, "writeback");
      check(ctrl.reg_we == (is_alu(o) || o == OP_LD), "reg_we");
      check(ctrl.mem_we == (o == OP_ST), "mem_we");
      if (o == OP_LD) check(ctrl.wb_sel == WB_MEM, "wb from memory");
      if (is_alu(o))  check(ctrl.wb_sel == WB_ACC, "wb from accumulator");
      // four cycles per instruction: the next fetch starts now
      cycles = 0;
      do begin @(negedge clk); cycles++; end while (state != S_FETCH && cycles < 10);
      check(cycles == 1, "next fetch after writeback");
      cycles = 0;
      do begin @(negedge clk); cycles++; end while (state != S_FETCH && cycles < 10);
      check(cycles == 4, "instruction takes four cycles");
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run = 0; z = 0; opcode = OP_ADD;
    for (int o = 0; o < 16; o++) begin
      run_one(opcode_e'(o), 1'b0);
      run_one(opcode_e'(o), 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
