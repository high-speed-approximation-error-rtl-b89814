// et_csla: approximate (error tolerant) lower part of the SAET-CSLA.
//
// A single ripple chain of N approximate full adders. Because each cell's
// carry is the exact majority function, the carry chain, and so the carry
// out of the top bit, is exact; only the sum bits can be wrong. A sum bit is
// wrong exactly where both operand bits equal the incoming carry. One chain
// replaces the two chains of a carry select block, which saves area and the
// sum XORs.
//
// Ports: a, b (N-bit lower operand bits), cin; sum (N approximate bits),
// cout (carry out of the top bit, called C3 for N = 4). Purely combinational.
module et_csla #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    approx_full_adder u_afa (
      .a    (a[i]),
      .b    (b[i]),
      .c    (c[i]),
      .sum  (sum[i]),
      .carry(c[i+1])
    );
  end

  assign cout = c[N];

endmodule
