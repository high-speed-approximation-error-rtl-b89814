// blend_datapath_tb: checks G = (1 - alpha) F1 + alpha F2 with the
// approximate adder against the reference model, at alpha = 0, 0.2, 0.6,
// 0.8, 1 and random values, and that G never differs from the exactly added
// result by more than 15 and the carry out stays 0.
module blend_datapath_tb;

  import saet_ref_pkg::*;

  logic [7:0] f1, f2, g;
  logic [8:0] alpha;
  logic       cout;
  int checks = 0, failures = 0;
  int n_approx = 0;

  blend_datapath dut (.f1, .f2, .alpha, .g, .cout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int exp_g, ex, err;
    #1;
    exp_g = blend(f1, f2, alpha);
    ex    = blend_exact(f1, f2, alpha);
    checks++;
    if (int'(g) != exp_g) begin
      failures++;
      if (failures < 10) $display("FAIL f1=%0d f2=%0d alpha=%0d g=%0d expected %0d", f1, f2, alpha, g, exp_g);
    end
    err = (int'(g) > ex) ? int'(g) - ex : ex - int'(g);
    checks++;
    if (err > 15 || ex > 255 || cout !== 1'b0) failures++;
    if (err != 0) n_approx++;
  endtask

  initial begin
    int alphas [5] = '{0, 51, 154, 205, 256};   // 0, 0.2, 0.6, 0.8, 1.0
    foreach (alphas[k]) begin
      for (int i = 0; i < 2000; i++) begin
        f1 = 8'($urandom);
        f2 = 8'($urandom);
        alpha = 9'(alphas[k]);
        check();
      end
    end
    // alpha 0 passes F1 through the adder alone, alpha 1 passes F2
    f1 = 8'd200; f2 = 8'd17; alpha = 9'd0; #1;
    checks++; if (int'(g) != saet_add(200, 0)) failures++;
    alpha = 9'd256; #1;
    checks++; if (int'(g) != saet_add(0, 17)) failures++;
    // above 1.0 behaves as 1.0
    alpha = 9'd400; #1;
    checks++; if (int'(g) != saet_add(0, 17)) failures++;
    for (int i = 0; i < 20000; i++) begin
      f1 = 8'($urandom);
      f2 = 8'($urandom);
      alpha = 9'($urandom_range(0, 256));
      check();
    end
    checks++;
    if (n_approx == 0) begin
      failures++;
      $display("FAIL no approximation error was ever seen");
    end
    $display("pixels that differ from exact blending: %0d", n_approx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
