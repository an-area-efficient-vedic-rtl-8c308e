// tb_hybrid_adder: checks the homogeneous hybrid adder at its default size
// (16 bits from 4-bit units) and at an odd size (13 bits, last unit 1 bit
// wide). Carry-chain corner cases (all ones + 1, alternating patterns) are
// followed by random operands; results are compared with the integer sum.
module tb_hybrid_adder;
  logic [15:0] a16, b16, s16;
  logic        c16, co16;
  logic [12:0] a13, b13, s13;
  logic        c13, co13;
  int checks = 0, failures = 0;

  hybrid_adder dut16 (.a(a16), .b(b16), .cin(c16), .s(s16), .cout(co16));
  hybrid_adder #(.WIDTH(13), .SEG(4)) dut13 (.a(a13), .b(b13), .cin(c13), .s(s13), .cout(co13));

  task automatic apply16(input logic [15:0] x, input logic [15:0] y, input logic ci);
    a16 = x; b16 = y; c16 = ci;
    #1;
    checks++;
    if ({co16, s16} != 17'(x) + 17'(y) + 17'(ci)) begin
      failures++;
      $display("FAIL16 %h + %h + %0d = %h", x, y, ci, {co16, s16});
    end
  endtask

  task automatic apply13(input logic [12:0] x, input logic [12:0] y, input logic ci);
    a13 = x; b13 = y; c13 = ci;
    #1;
    checks++;
    if ({co13, s13} != 14'(x) + 14'(y) + 14'(ci)) begin
      failures++;
      $display("FAIL13 %h + %h + %0d = %h", x, y, ci, {co13, s13});
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply16(16'hFFFF, 16'h0000, 1'b1);
    apply16(16'hFFFF, 16'hFFFF, 1'b1);
    apply16(16'h0FFF, 16'h0001, 1'b0);
    apply16(16'hAAAA, 16'h5555, 1'b1);
    apply16(16'h0000, 16'h0000, 1'b0);
    apply13(13'h1FFF, 13'h0001, 1'b0);
    apply13(13'h0FFF, 13'h0000, 1'b1);
    for (int i = 0; i < 2000; i++) begin
      apply16(16'($urandom), 16'($urandom), 1'($urandom));
      apply13(13'($urandom), 13'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
