// ripple_carry_adder_tb: exhaustive check of the 4-bit ripple carry adder
// (all operands and both carry-in values) against a + b + cin.
module ripple_carry_adder_tb;

  localparam int N = 4;

  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.N(N)) dut (.a, .b, .cin, .sum, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * N + 1)); i++) begin
      {cin, a, b} = (2 * N + 1)'(i);
      #1;
      checks++;
      if (int'({cout, sum}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL %0d + %0d + %0d = %0d", a, b, cin, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
