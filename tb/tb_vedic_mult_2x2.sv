// tb_vedic_mult_2x2: exhaustive test of the 2x2 Vedic multiplier. Every
// operand pair is applied and the product is compared with a * b computed by
// the simulator's own arithmetic.
module tb_vedic_mult_2x2;
  logic [1:0]   a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  vedic_mult_2x2 dut (.a, .b, .p);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 2); i++) begin
      for (int j = 0; j < (1 << 2); j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (p != 4'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
