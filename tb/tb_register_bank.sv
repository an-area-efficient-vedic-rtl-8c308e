// tb_register_bank: writes random values to random registers, keeping a
// reference copy, and checks all three read ports against it after each
// write; also checks that reset clears the bank and that a write with we low
// changes nothing.
module tb_register_bank;
  logic        clk = 0, rst_n = 0;
  logic        we;
  logic [3:0]  waddr, raddr_a, raddr_b, raddr_dbg;
  logic [15:0] wdata, rdata_a, rdata_b, rdata_dbg;
  logic [15:0] ref_regs [16];
  int checks = 0, failures = 0;

  register_bank dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr_a, .rdata_a,
                     .raddr_b, .rdata_b, .raddr_dbg, .rdata_dbg);

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic read_all();
    for (int r = 0; r < 16; r++) begin
      raddr_a = 4'(r); raddr_b = 4'(15 - r); raddr_dbg = 4'(r);
      #1;
      check(rdata_a, ref_regs[r], "port a");
      check(rdata_b, ref_regs[15 - r], "port b");
      check(rdata_dbg, ref_regs[r], "debug port");
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr_a = 0; raddr_b = 0; raddr_dbg = 0;
    foreach (ref_regs[i]) ref_regs[i] = '0;
    #12 read_all();
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 4'($urandom); wdata = 16'($urandom);
      @(posedge clk);
      if (we) ref_regs[waddr] = wdata;
      #1 we = 0;
      if (k % 20 == 0) read_all();
      else begin
        raddr_a = waddr; #1 check(rdata_a, ref_regs[waddr], "written register");
      end
    end
    read_all();
    rst_n = 0;
    foreach (ref_regs[i]) ref_regs[i] = '0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
