// full_adder_tb: checks the conventional full adder against its truth table
// (all eight input patterns) and against a + b + c.
module full_adder_tb;

  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  // truth table rows {A,B,C} -> {SUM,CARRY}
  localparam logic [1:0] TABLE [8] = '{2'b00, 2'b10, 2'b10, 2'b01,
                                       2'b10, 2'b01, 2'b01, 2'b11};

  full_adder dut (.a, .b, .c, .sum, .carry);

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
      checks++;
      if ({carry, sum} !== 2'(int'(a) + int'(b) + int'(c))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
