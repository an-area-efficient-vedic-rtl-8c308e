// tb_risc16_vedic_cpu: end-to-end test of the processor at its default size.
// The host port loads a program and data into memory; the processor then
// computes the dot product of two random N-element vectors with the MAC
// instruction in a counted loop, stores the result and the outcome of the
// logic instructions, and halts. The test checks:
//   - every stored word, the registers and the 32-bit MAC accumulator,
//     against values computed here from the same data;
//   - that every instruction takes four clock cycles;
//   - that each mechanism happened at least once: all 14 instructions, an
//     unused opcode passing as a no-operation, Z set and cleared, JZ taken
//     and not taken, MAC accumulation on a non-zero accumulator, host load
//     and halt.
// The processor is instantiated with no parameter overrides.
module tb_risc16_vedic_cpu;
  import risc16_pkg::*;

  localparam int N = 8;                 // vector length
  localparam logic [7:0] A_BASE = 8'h90;
  localparam logic [7:0] B_BASE = 8'hA0;
  localparam logic [7:0] R_BASE = 8'hC0;

  logic        clk = 0, rst_n = 0;
  logic        load_en, load_we;
  logic [7:0]  load_addr, pc;
  logic [15:0] load_wdata, mem_rdata, dbg_reg_data;
  logic [3:0]  dbg_reg_sel;
  logic        z, halted;
  logic [31:0] mac_acc;
  state_e      state;

  int checks = 0, failures = 0;
  int cycles = 0;

  risc16_vedic_cpu dut (
    .clk, .rst_n, .load_en, .load_we, .load_addr, .load_wdata, .mem_rdata,
    .dbg_reg_sel, .dbg_reg_data, .pc, .z, .halted, .mac_acc, .state
  );

  always #5 clk = ~clk;

  function automatic logic [15:0] enc(opcode_e op, int rd, int ra, int rb);
    return {4'(op), 4'(rd), 4'(ra), 4'(rb)};
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic host_write(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk);
    load_we = 1; load_addr = a; load_wdata = d;
    @(negedge clk);
    load_we = 0;
  endtask

  task automatic host_read(input logic [7:0] a, output logic [15:0] d);
    @(negedge clk);
    load_addr = a;
    #1 d = mem_rdata;
  endtask

  // ---------------------------------------------------------------- program
  logic [15:0] prog [];
  int loop_addr, done_addr;

  task automatic build_program();
    prog = new[0];
    // constant table at the top of memory, reached by counting down from FFFF
    prog = {prog, enc(OP_NOT, 1, 0, 0)};     // R1 = FFFF -> address FF
    prog = {prog, enc(OP_SUB, 2, 0, 1)};     // R2 = 1
    prog = {prog, enc(OP_LD,  3, 1, 0)};     // R3 = N
    prog = {prog, enc(OP_SUB, 1, 1, 2)};
    prog = {prog, enc(OP_LD,  4, 1, 0)};     // R4 = A_BASE
    prog = {prog, enc(OP_SUB, 1, 1, 2)};
    prog = {prog, enc(OP_LD,  5, 1, 0)};     // R5 = B_BASE
    prog = {prog, enc(OP_SUB, 1, 1, 2)};
    prog = {prog, enc(OP_LD,  6, 1, 0)};     // R6 = loop address
    prog = {prog, enc(OP_SUB, 1, 1, 2)};
    prog = {prog, enc(OP_LD,  7, 1, 0)};     // R7 = done address
    prog = {prog, enc(OP_SUB, 1, 1, 2)};
    prog = {prog, enc(OP_LD,  8, 1, 0)};     // R8 = R_BASE
    prog = {prog, enc(OP_MUL, 9, 0, 0)};     // acc = 0, R9 = 0, Z = 1
    loop_addr = prog.size();
    prog = {prog, enc(OP_LD,  10, 4, 0)};    // a[i]
    prog = {prog, enc(OP_LD,  11, 5, 0)};    // b[i]
    prog = {prog, enc(OP_MAC, 12, 10, 11)};  // acc += a[i]*b[i]
    prog = {prog, enc(OP_ADD, 4, 4, 2)};
    prog = {prog, enc(OP_ADD, 5, 5, 2)};
    prog = {prog, enc(OP_SUB, 3, 3, 2)};     // count down, Z at the end
    done_addr = prog.size() + 3;
    prog = {prog, enc(OP_JZ,  0, 7, 0)};
    prog = {prog, enc(OP_JMP, 0, 6, 0)};
    prog = {prog, enc(OP_HLT, 0, 0, 0)};     // skipped by the jumps
    prog = {prog, enc(OP_ST,  0, 8, 12)};    // done: store dot product
    prog = {prog, enc(OP_ADD, 8, 8, 2)};
    prog = {prog, enc(OP_AND, 13, 10, 11)};
    prog = {prog, enc(OP_ST,  0, 8, 13)};
    prog = {prog, enc(OP_ADD, 8, 8, 2)};
    prog = {prog, enc(OP_OR,  13, 10, 11)};
    prog = {prog, enc(OP_ST,  0, 8, 13)};
    prog = {prog, enc(OP_ADD, 8, 8, 2)};
    prog = {prog, enc(OP_XOR, 13, 10, 11)};
    prog = {prog, enc(OP_ST,  0, 8, 13)};
    prog = {prog, enc(OP_ADD, 8, 8, 2)};
    prog = {prog, 16'hE0FF};                 // unused opcode 14: no effect
    prog = {prog, enc(OP_MOV, 14, 10, 0)};
    prog = {prog, enc(OP_ST,  0, 8, 14)};
    prog = {prog, enc(OP_ADD, 8, 8, 2)};
    prog = {prog, enc(OP_MUL, 15, 10, 11)};  // low half of the last product
    prog = {prog, enc(OP_ST,  0, 8, 15)};
    prog = {prog, enc(OP_HLT, 0, 0, 0)};
  endtask

  // ------------------------------------------------------ mechanism counters
  int n_op [16];
  int n_z_set = 0, n_z_clear = 0, n_jz_taken = 0, n_jz_not_taken = 0;
  int n_mac_nonzero = 0, n_halt = 0, n_host_load = 0, n_bad_timing = 0;
  int last_fetch = -1;
  logic prev_halted = 0;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (rst_n && !load_en) begin
      if (state == S_FETCH) begin
        if (last_fetch >= 0 && cycles - last_fetch != 4) n_bad_timing++;
        last_fetch = cycles;
      end
      if (state == S_EXECUTE) begin
        n_op[dut.opcode]++;
        if (dut.opcode == OP_JZ) begin
          if (z) n_jz_taken++; else n_jz_not_taken++;
        end
        if (dut.opcode == OP_MAC && mac_acc != 0) n_mac_nonzero++;
      end
    end
    if (load_en && load_we) n_host_load++;
    if (halted && !prev_halted) n_halt++;
    prev_halted <= halted;
  end

  always @(z) if (rst_n) begin
    if (z) n_z_set++; else n_z_clear++;
  end

  // -------------------------------------------------------------- watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ test
  logic [15:0] va [N], vb [N];
  logic [31:0] ref_acc;
  logic [15:0] d;
  int start_cycle, run_cycles, exec_count;

  initial begin
    load_en = 1; load_we = 0; load_addr = 0; load_wdata = 0; dbg_reg_sel = 0;
    foreach (n_op[i]) n_op[i] = 0;
    build_program();
    repeat (2) @(posedge clk);
    foreach (prog[i]) host_write(8'(i), prog[i]);
    host_write(8'hFF, 16'(N));
    host_write(8'hFE, 16'(A_BASE));
    host_write(8'hFD, 16'(B_BASE));
    host_write(8'hFC, 16'(loop_addr));
    host_write(8'hFB, 16'(done_addr));
    host_write(8'hFA, 16'(R_BASE));
    ref_acc = 0;
    for (int i = 0; i < N; i++) begin
      va[i] = 16'($urandom);
      vb[i] = 16'($urandom);
      if (i == 0) vb[i] = 16'hFFFF;
      host_write(A_BASE + 8'(i), va[i]);
      host_write(B_BASE + 8'(i), vb[i]);
      ref_acc = ref_acc + 32'(va[i]) * 32'(vb[i]);
    end
    // read back a few words through the host port
    host_read(8'h00, d); check(d, prog[0], "host read of program word 0");
    host_read(8'hFF, d); check(d, 16'(N), "host read of N");

    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    load_en = 0;
    start_cycle = cycles;
    wait (halted);
    run_cycles = cycles - start_cycle;
    repeat (3) @(posedge clk);
    load_en = 1;

    // results in memory
    host_read(R_BASE + 0, d); check(d, ref_acc[15:0], "dot product (low half) stored");
    host_read(R_BASE + 1, d); check(d, va[N-1] & vb[N-1], "AND result");
    host_read(R_BASE + 2, d); check(d, va[N-1] | vb[N-1], "OR result");
    host_read(R_BASE + 3, d); check(d, va[N-1] ^ vb[N-1], "XOR result");
    host_read(R_BASE + 4, d); check(d, va[N-1], "MOV result");
    host_read(R_BASE + 5, d); check(d, 16'(32'(va[N-1]) * 32'(vb[N-1])), "MUL result");
    // the MAC accumulator was restarted by the final MUL
    check(mac_acc, 32'(va[N-1]) * 32'(vb[N-1]), "MAC accumulator after MUL");
    // registers
    dbg_reg_sel = 4'd3; #1 check(dbg_reg_data, 16'h0, "loop counter R3");
    dbg_reg_sel = 4'd4; #1 check(dbg_reg_data, 16'(A_BASE) + 16'(N), "pointer R4");
    dbg_reg_sel = 4'd12; #1 check(dbg_reg_data, ref_acc[15:0], "R12 MAC result");
    dbg_reg_sel = 4'd1; #1 check(dbg_reg_data, 16'hFFFA, "pointer R1");
    // PC stops after the final HLT
    check(pc, 8'(prog.size()), "PC after halt");
    check(32'(state), 32'(S_HALT), "state is HALT");

    // timing: four cycles per executed instruction, HLT ends in EXECUTE
    exec_count = 0;
    foreach (n_op[i]) exec_count += n_op[i];
    check(n_bad_timing, 0, "instructions taking other than four cycles");
    check(run_cycles, 4 * (exec_count - 1) + 3 + 1, "total cycle count");
    // instruction count from the program structure
    check(exec_count, 14 + 8 * N - 1 + 18, "instructions executed");

    // mechanisms
    for (int o = 0; o < 14; o++) begin
      checks++;
      if (n_op[o] == 0) begin failures++; $display("FAIL opcode %0d never executed", o); end
    end
    checks++; if (n_op[14] == 0) begin failures++; $display("FAIL unused opcode never seen"); end
    checks++; if (n_z_set == 0)        begin failures++; $display("FAIL Z never set"); end
    checks++; if (n_z_clear == 0)      begin failures++; $display("FAIL Z never cleared"); end
    checks++; if (n_jz_taken == 0)     begin failures++; $display("FAIL JZ never taken"); end
    checks++; if (n_jz_not_taken == 0) begin failures++; $display("FAIL JZ never fell through"); end
    checks++; if (n_mac_nonzero == 0)  begin failures++; $display("FAIL MAC never accumulated"); end
    checks++; if (n_halt != 1)         begin failures++; $display("FAIL halt count %0d", n_halt); end
    checks++; if (n_host_load == 0)    begin failures++; $display("FAIL host load never used"); end
    $display("run: %0d instructions in %0d cycles; JZ taken %0d, not taken %0d; Z set %0d, cleared %0d",
             exec_count, run_cycles, n_jz_taken, n_jz_not_taken, n_z_set, n_z_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
