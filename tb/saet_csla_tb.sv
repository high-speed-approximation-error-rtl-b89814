// saet_csla_tb: exhaustive check of the 8-bit SAET-CSLA over all 65536
// operand pairs.
//  - {cout, sum} must match the reference model (exact upper half and carry,
//    approximate lower half);
//  - cout and the upper four bits must equal the exact result and the error
//    must stay below 16.
// It also prints the error statistics of the adder over all inputs: error
// count, largest and mean error, mean relative error, the lowest accuracy
// ACC = (1 - |error| / exact) * 100 % over non-zero exact sums, and the
// acceptance probability (share of inputs with ACC of at least 90 %).
module saet_csla_tb;

  import saet_ref_pkg::*;

  logic [7:0] a, b, sum;
  logic       cout;
  int checks = 0, failures = 0;
  int n_err = 0, max_err = 0;
  real sum_err = 0.0, sum_rel = 0.0;
  real min_acc = 100.0, acc;
  int  n_accept = 0;

  saet_csla dut (.a, .b, .sum, .cout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exact, got, err;
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      exact = int'(a) + int'(b);
      got   = int'({cout, sum});
      checks++;
      if (got != int'(saet_add(a, b))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d = %0d expected %0d", a, b, got, saet_add(a, b));
      end
      checks++;
      if ((got >> 4) != (exact >> 4)) failures++;
      err = (got > exact) ? got - exact : exact - got;
      checks++;
      if (err > 15) failures++;
      if (err != 0) n_err++;
      if (err > max_err) max_err = err;
      sum_err += real'(err);
      if (exact != 0) begin
        sum_rel += real'(err) / real'(exact);
        acc = 100.0 * (1.0 - real'(err) / real'(exact));
        if (acc < min_acc) min_acc = acc;
        if (acc >= 90.0) n_accept++;
      end
    end
    $display("inputs with an error: %0d of 65536, max error %0d, mean error %f, mean relative error %f %%",
             n_err, max_err, sum_err / 65536.0, 100.0 * sum_rel / 65535.0);
    $display("lowest accuracy %f %%, acceptance probability at 90 %% accuracy: %f",
             min_acc, real'(n_accept) / 65535.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
