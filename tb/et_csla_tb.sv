// et_csla_tb: checks the approximate ripple chain.
//  - 4-bit chain, exhaustive: {cout, sum} against the reference model; the
//    carry out must always be exact.
//  - 8-bit chain: 1 + 1 with carry in 0 gives sum 11111110 and carry 0, the
//    value a fully approximate 8-bit adder is known to produce.
module et_csla_tb;

  import saet_ref_pkg::*;

  localparam int N = 4;

  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  logic [7:0]   a8, b8, sum8;
  logic         cout8;
  int checks = 0, failures = 0;

  et_csla #(.N(N)) dut (.a, .b, .cin, .sum, .cout);
  et_csla #(.N(8)) dut8 (.a(a8), .b(b8), .cin(1'b0), .sum(sum8), .cout(cout8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = 8'd1;
    b8 = 8'd1;
    for (int i = 0; i < (1 << (2 * N + 1)); i++) begin
      {cin, a, b} = (2 * N + 1)'(i);
      #1;
      checks++;
      if (int'({cout, sum}) != approx_chain(a, b, cin, N)) begin
        failures++;
        $display("FAIL %0d + %0d + %0d = %05b expected %05b", a, b, cin, {cout, sum},
                 5'(approx_chain(a, b, cin, N)));
      end
      checks++;
      if (int'(cout) != (int'(a) + int'(b) + int'(cin)) >> N) failures++;
    end
    checks++;
    if (sum8 !== 8'b1111_1110 || cout8 !== 1'b0) begin
      failures++;
      $display("FAIL 8-bit chain 1+1 = %b carry %b", sum8, cout8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
