// tb_z_flag: loads zero and non-zero results (including single-bit values
// that differ from zero in one position) and checks that the flag records
// "result == 0" on load, holds otherwise and clears on reset.
module tb_z_flag;
  logic        clk = 0, rst_n = 0, load, z, ref_z;
  logic [15:0] result;
  int checks = 0, failures = 0;

  z_flag dut (.clk, .rst_n, .load, .result, .z);

  always #5 clk = ~clk;

  task automatic step(input logic ld, input logic [15:0] r);
    @(negedge clk);
    load = ld; result = r;
    @(posedge clk);
    if (ld) ref_z = (r == 16'h0);
    #1;
    checks++;
    if (z != ref_z) begin
      failures++;
      if (failures < 10) $display("FAIL load=%0d result=%h z=%0d exp %0d", ld, r, z, ref_z);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; result = 0; ref_z = 0;
    #12 checks++; if (z != 0) failures++;
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      step(1, 16'h0);
      step(1, 16'(1) << i);
    end
    step(1, 16'h0);
    step(0, 16'h1234);
    step(1, 16'h1234);
    step(0, 16'h0);
    for (int k = 0; k < 200; k++) step(1'($urandom), ($urandom % 3 == 0) ? 16'h0 : 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
