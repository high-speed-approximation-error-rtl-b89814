// approx_full_adder_tb: checks the approximate full adder against its truth
// table: the carry is always exact, the sum is wrong only for 000 and 111.
module approx_full_adder_tb;

  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;
  int sum_errors = 0;

  // truth table rows {A,B,C} -> {SUM,CARRY}
  localparam logic [1:0] TABLE [8] = '{2'b10, 2'b10, 2'b10, 2'b01,
                                       2'b10, 2'b01, 2'b01, 2'b01};

  approx_full_adder dut (.a, .b, .c, .sum, .carry);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({sum, carry} !== TABLE[i]) begin
        failures++;
        $display("FAIL abc=%03b sum=%b carry=%b expected %02b", 3'(i), sum, carry, TABLE[i]);
      end
      // carry must equal the exact carry
      checks++;
      if (carry !== 1'((int'(a) + int'(b) + int'(c)) >> 1)) failures++;
      if (sum !== (a ^ b ^ c)) sum_errors++;
    end
    // exactly two wrong sums: inputs 000 and 111
    checks++;
    if (sum_errors != 2) begin
      failures++;
      $display("FAIL %0d wrong sums, expected 2", sum_errors);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
