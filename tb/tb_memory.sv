// tb_memory: fills all 256 words with a pattern, reads them back, then runs
// random writes and reads against a reference array, and checks that a word
// is not changed when we is low.
module tb_memory;
  logic        clk = 0, we;
  logic [7:0]  addr;
  logic [15:0] wdata, rdata;
  logic [15:0] ref_mem [256];
  int checks = 0, failures = 0;

  memory dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic write(input logic [7:0] ad, input logic [15:0] d, input logic en);
    @(negedge clk);
    we = en; addr = ad; wdata = d;
    @(posedge clk);
    if (en) ref_mem[ad] = d;
    #1 we = 0;
  endtask

  task automatic read_check(input logic [7:0] ad);
    addr = ad;
    #1;
    checks++;
    if (rdata != ref_mem[ad]) begin
      failures++;
      if (failures < 10) $display("FAIL mem[%0d]=%h exp %h", ad, rdata, ref_mem[ad]);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) write(8'(i), 16'(i * 16'h0101 + 16'h3C5A), 1'b1);
    for (int i = 0; i < 256; i++) read_check(8'(i));
    for (int k = 0; k < 1000; k++) begin
      write(8'($urandom), 16'($urandom), 1'($urandom));
      read_check(8'($urandom));
      read_check(addr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
