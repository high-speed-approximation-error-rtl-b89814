// pixel_scaler_tb: checks pix * w / 256 (truncated) for all pixels at the
// weights 0, 1, 128, 255 and 256 (1.0), for weights above 1.0 (treated as
// 1.0), and for 20000 random pixel/weight pairs.
module pixel_scaler_tb;

  import saet_ref_pkg::*;

  logic [7:0] pix, out;
  logic [8:0] w;
  int checks = 0, failures = 0;

  pixel_scaler dut (.pix, .w, .out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks++;
    if (int'(out) != scale(pix, w)) begin
      failures++;
      if (failures < 10) $display("FAIL pix=%0d w=%0d out=%0d expected %0d", pix, w, out, scale(pix, w));
    end
  endtask

  initial begin
    int ws [7] = '{0, 1, 128, 255, 256, 300, 511};
    foreach (ws[k]) begin
      for (int p = 0; p < 256; p++) begin
        pix = 8'(p);
        w   = 9'(ws[k]);
        check();
      end
    end
    // weight 1.0 passes the pixel unchanged, weight 0 gives 0
    pix = 8'd201; w = 9'd256; #1;
    checks++; if (out !== 8'd201) failures++;
    w = 9'd0; #1;
    checks++; if (out !== 8'd0) failures++;
    for (int i = 0; i < 20000; i++) begin
      pix = 8'($urandom);
      w   = 9'($urandom_range(0, 256));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
