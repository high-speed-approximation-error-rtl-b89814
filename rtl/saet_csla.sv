// saet_csla: significance approximation error tolerant carry select adder.
//
// The WIDTH-bit operands are split in two. The low WIDTH-ACC_BITS bits go to
// an approximate ripple chain (et_csla) whose carry out, C3 for the 8-bit
// adder, is exact. The high ACC_BITS bits go to an accurate carry select
// block (accurate_csla) that has both possible upper results ready and lets
// C3 choose between them. So COUT and the upper sum bits are always exact and
// every error sits in the low bits: the result is never off by more than
// 2**(WIDTH-ACC_BITS) - 1 (15 for the 8-bit adder).
//
// The split (4 accurate, 4 approximate bits of 8) follows the source design.
// The adder has no carry input: the lower chain starts from carry 0, which
// is this implementation's reading of the block diagram.
//
// Ports: a, b (WIDTH-bit operands); sum (WIDTH bits), cout. Combinational.
module saet_csla #(
  parameter int unsigned WIDTH    = saet_pkg::ADD_WIDTH,
  parameter int unsigned ACC_BITS = saet_pkg::ACC_BITS
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LO = WIDTH - ACC_BITS;  // approximate bits

  logic c_lo;  // carry out of the approximate part (C3)

  et_csla #(.N(LO)) u_inaccurate (
    .a   (a[LO-1:0]),
    .b   (b[LO-1:0]),
    .cin (1'b0),
    .sum (sum[LO-1:0]),
    .cout(c_lo)
  );

  accurate_csla #(.N(ACC_BITS)) u_accurate (
    .a   (a[WIDTH-1:LO]),
    .b   (b[WIDTH-1:LO]),
    .sel (c_lo),
    .sum (sum[WIDTH-1:LO]),
    .cout(cout)
  );

endmodule
