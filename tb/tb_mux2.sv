// tb_mux2: drives random data on both inputs of a 16-bit multiplexer and
// checks that the output follows d0 when sel is 0 and d1 when sel is 1.
module tb_mux2;
  logic        sel;
  logic [15:0] d0, d1, y;
  int checks = 0, failures = 0;

  mux2 dut (.sel, .d0, .d1, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      sel = 1'(k); d0 = 16'($urandom); d1 = 16'($urandom);
      #1;
      checks++;
      if (y != (sel ? d1 : d0)) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0d y=%h", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
