// tb_rca_adder: exhaustive test of the 4-bit ripple-carry adder unit (all
// 512 combinations of a, b and cin) against the integer sum.
module tb_rca_adder;
  localparam int W = 4;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  rca_adder #(.W(W)) dut (.a, .b, .cin, .s, .cout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2*W+1)); i++) begin
      {cin, a, b} = (2*W+1)'(i);
      #1;
      checks++;
      if ({cout, s} != (W+1)'(a) + (W+1)'(b) + (W+1)'(cin)) begin
        failures++;
        $display("FAIL %0d + %0d + %0d = %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
