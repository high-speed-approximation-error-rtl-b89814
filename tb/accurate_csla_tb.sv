// accurate_csla_tb: exhaustive check of the 4-bit carry select block. For
// every operand pair and both values of the select carry, {cout, sum} must
// equal a + b + sel.
module accurate_csla_tb;

  localparam int N = 4;

  logic [N-1:0] a, b, sum;
  logic         sel, cout;
  int checks = 0, failures = 0;

  accurate_csla #(.N(N)) dut (.a, .b, .sel, .sum, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * N + 1)); i++) begin
      {sel, a, b} = (2 * N + 1)'(i);
      #1;
      checks++;
      if (int'({cout, sum}) != int'(a) + int'(b) + int'(sel)) begin
        failures++;
        $display("FAIL %0d + %0d + %0d = %0d", a, b, sel, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
