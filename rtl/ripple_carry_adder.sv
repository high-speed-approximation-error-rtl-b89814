// ripple_carry_adder: N-bit ripple carry adder of conventional full adders.
//
// Bit i takes the carry out of bit i-1; the carry in enters bit 0 and the
// carry out leaves bit N-1. Exact and purely combinational; the delay grows
// with N. Two of these, with carry in tied to 0 and to 1, form the
// accurate part of the carry select adder.
//
// Ports: a, b (N-bit operands), cin; sum (N bits), cout.
module ripple_carry_adder #(
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
    full_adder u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .c    (c[i]),
      .sum  (sum[i]),
      .carry(c[i+1])
    );
  end

  assign cout = c[N];

endmodule
