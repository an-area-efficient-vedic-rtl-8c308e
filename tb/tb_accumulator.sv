// tb_accumulator: checks that the result register clears on reset, loads on
// load and holds otherwise, against a reference copy.
module tb_accumulator;
  logic        clk = 0, rst_n = 0, load;
  logic [15:0] din, q, ref_q;
  int checks = 0, failures = 0;

  accumulator dut (.clk, .rst_n, .load, .din, .q);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; din = 0; ref_q = 0;
    #12 checks++; if (q != 0) failures++;
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      load = 1'($urandom); din = 16'($urandom);
      @(posedge clk);
      if (load) ref_q = din;
      #1;
      checks++;
      if (q != ref_q) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h exp %h", q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
