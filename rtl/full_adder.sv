// full_adder: conventional one-bit full adder.
//
// SUM = A xor B xor C and CARRY = AB + BC + AC, built as in the classic gate
// diagram: one XOR forms A xor B, a second XOR adds the carry in, and the
// carry out is (A xor B)C OR AB. Purely combinational, no timing of its own.
//
// Ports: a, b (operand bits), c (carry in); sum (weight 2^i), carry (2^(i+1)).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic p;  // propagate: A xor B

  always_comb begin
    p     = a ^ b;
    sum   = p ^ c;
    carry = (p & c) | (a & b);
  end

endmodule
