// accurate_csla: accurate upper part of the SAET-CSLA, an N-bit carry select
// adder block.
//
// Two ripple carry adders add the same operands in parallel, one with carry
// in 0 and one with carry in 1. When the carry from the lower part arrives on
// sel, multiplexers pick the matching sum and carry out, so the upper result
// is ready one multiplexer delay after the lower carry. The result is exact.
//
// Ports: a, b (N-bit upper operand bits), sel (carry from the lower part);
// sum (N bits), cout. Purely combinational.
module accurate_csla #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sel,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N-1:0] sum0, sum1;
  logic         cout0, cout1;

  ripple_carry_adder #(.N(N)) u_rca0 (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (sum0),
    .cout(cout0)
  );

  ripple_carry_adder #(.N(N)) u_rca1 (
    .a   (a),
    .b   (b),
    .cin (1'b1),
    .sum (sum1),
    .cout(cout1)
  );

  always_comb begin
    sum  = sel ? sum1  : sum0;
    cout = sel ? cout1 : cout0;
  end

endmodule
