// tb_vedic_mult_16x16: test of the 16x16 Vedic multiplier. Corner operands
// (0, 1, all ones, single bits, half-word boundaries) are crossed with each
// other, then 20000 random pairs follow; every product is compared with the
// 32-bit product computed by the simulator.
module tb_vedic_mult_16x16;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;
  logic [15:0] corner [10] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h00FF,
                               16'hFF00, 16'h0100, 16'h7FFF, 16'hAAAA, 16'h5555};

  vedic_mult_16x16 dut (.a, .b, .p);

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (p != 32'(x) * 32'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h", x, y, p);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j]);
    for (int i = 0; i < 20000; i++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
