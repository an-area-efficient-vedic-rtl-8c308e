// tb_vedic_alu: applies every ALU operation to corner and random operands and
// compares y (and the full 32-bit product) with results computed by the
// simulator: wrapping add and subtract, low half of the product, bitwise
// logic and pass-through.
module tb_vedic_alu;
  import risc16_pkg::*;
  logic [15:0] a, b, y;
  logic [31:0] prod;
  alu_op_e     op;
  int checks = 0, failures = 0;

  vedic_alu dut (.a, .b, .op, .y, .prod);

  function automatic logic [15:0] model(alu_op_e o, logic [15:0] x, logic [15:0] z);
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_MUL:  return 16'(32'(x) * 32'(z));
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOT:  return ~x;
      default:  return x;
    endcase
  endfunction

  task automatic apply(input alu_op_e o, input logic [15:0] x, input logic [15:0] z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y != model(o, x, z)) begin
      failures++;
      if (failures < 10) $display("FAIL op=%0d a=%h b=%h y=%h", o, x, z, y);
    end
    checks++;
    if (prod != 32'(x) * 32'(z)) begin
      failures++;
      if (failures < 10) $display("FAIL prod a=%h b=%h p=%h", x, z, prod);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 8; o++) begin
      apply(alu_op_e'(o), 16'h0000, 16'h0000);
      apply(alu_op_e'(o), 16'hFFFF, 16'h0001);
      apply(alu_op_e'(o), 16'h0001, 16'hFFFF);
      apply(alu_op_e'(o), 16'h1234, 16'h1234);
      for (int i = 0; i < 500; i++) apply(alu_op_e'(o), 16'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
