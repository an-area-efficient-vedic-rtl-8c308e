// tb_program_counter: checks reset to 0, increment by one per cycle with
// wrap-around at 255, hold when idle, and that a load takes the new address
// (with priority over increment).
module tb_program_counter;
  logic       clk = 0, rst_n = 0, inc, load;
  logic [7:0] din, q, ref_q;
  int checks = 0, failures = 0;

  program_counter dut (.clk, .rst_n, .inc, .load, .din, .q);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = 0; load = 0; din = 0; ref_q = 0;
    #12 checks++; if (q != 0) failures++;
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      inc = 1'($urandom); load = (($urandom % 10) == 0); din = 8'($urandom);
      if (k > 290 && k < 300) begin inc = 1; load = 0; end
      @(posedge clk);
      if (load) ref_q = din; else if (inc) ref_q = ref_q + 8'd1;
      #1;
      checks++;
      if (q != ref_q) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d q=%0d exp %0d", k, q, ref_q);
      end
    end
    // wrap-around
    @(negedge clk) load = 1; inc = 0; din = 8'hFF;
    @(negedge clk) load = 0; inc = 1;
    @(negedge clk) inc = 0;
    checks++; if (q != 8'h00) begin failures++; $display("FAIL wrap q=%h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
