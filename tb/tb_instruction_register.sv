// tb_instruction_register: loads random instruction words, checks that the
// opcode and register fields are decoded from the right bit positions and
// that the register holds its value while load is low and clears on reset.
module tb_instruction_register;
  import risc16_pkg::*;
  logic        clk = 0, rst_n = 0, load;
  logic [15:0] din, instr, held;
  opcode_e     opcode;
  logic [3:0]  rd, ra, rb;
  int checks = 0, failures = 0;

  instruction_register dut (.clk, .rst_n, .load, .din, .instr, .opcode, .rd, .ra, .rb);

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; din = 0; held = 0;
    #12 check(instr, 16'h0, "reset");
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      load = 1'($urandom); din = 16'($urandom);
      @(posedge clk);
      if (load) held = din;
      #1;
      check(instr, held, "instr");
      check(16'(opcode), 16'(held[15:12]), "opcode");
      check(16'(rd), 16'(held[11:8]), "rd");
      check(16'(ra), 16'(held[7:4]), "ra");
      check(16'(rb), 16'(held[3:0]), "rb");
    end
    rst_n = 0;
    #1 check(instr, 16'h0, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
