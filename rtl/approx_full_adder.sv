// approx_full_adder: approximate one-bit full adder (AFA).
//
// The carry out is the exact majority AB + BC + AC, made from three AND gates
// and two OR gates. The sum is simply the inverted carry. This is right for
// six of the eight input patterns and wrong only when all three inputs are
// equal: 000 gives sum 1 (should be 0) and 111 gives sum 0 (should be 1).
// Dropping the two XORs of a full adder leaves six gates and a shorter path.
//
// Ports: a, b (operand bits), c (carry in); sum (approximate), carry (exact).
// Purely combinational.
module approx_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic ab, bc, ac;

  always_comb begin
    ab    = a & b;
    bc    = b & c;
    ac    = a & c;
    carry = (ab | bc) | ac;
    sum   = ~carry;
  end

endmodule
