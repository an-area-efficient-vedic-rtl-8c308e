// tb_vedic_mac: drives the MAC unit through sequences of init (acc <= a*b)
// and accumulate (acc <= acc + a*b) operations, idle cycles and a reset, and
// compares product, acc_next and acc with a 32-bit reference accumulator.
// Each operation must be visible in acc one clock edge later.
module tb_vedic_mac;
  logic        clk = 0, rst_n = 0;
  logic [15:0] a, b;
  logic        init, acc_en;
  logic [31:0] product, acc_next, acc;
  logic [31:0] ref_acc;
  int checks = 0, failures = 0;

  vedic_mac dut (.clk, .rst_n, .a, .b, .init, .acc_en, .product, .acc_next, .acc);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic step(input logic i, input logic e, input logic [15:0] x, input logic [15:0] y);
    logic [31:0] p, nxt;
    @(negedge clk);
    init = i; acc_en = e; a = x; b = y;
    p   = 32'(x) * 32'(y);
    nxt = i ? p : ref_acc + p;
    #1;
    check(product, p, "product");
    if (i || e) check(acc_next, nxt, "acc_next");
    @(posedge clk);
    if (i || e) ref_acc = nxt;
    #1;
    check(acc, ref_acc, "acc");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 0; acc_en = 0; a = 0; b = 0; ref_acc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check(acc, 32'h0, "acc after reset");
    // a dot product started with init, then accumulated
    step(1, 0, 16'd3, 16'd4);
    step(0, 1, 16'd5, 16'd6);
    step(0, 1, 16'd7, 16'd8);
    check(acc, 32'd98, "dot product 3*4+5*6+7*8");
    step(0, 0, 16'hFFFF, 16'hFFFF);   // idle: acc holds
    // wrap-around of the 32-bit accumulator
    step(1, 0, 16'hFFFF, 16'hFFFF);
    step(0, 1, 16'hFFFF, 16'hFFFF);
    step(0, 1, 16'hFFFF, 16'hFFFF);
    for (int k = 0; k < 300; k++)
      step(($urandom % 8) == 0, 1'($urandom), 16'($urandom), 16'($urandom));
    @(negedge clk) rst_n = 0;
    #1 check(acc, 32'h0, "acc after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
