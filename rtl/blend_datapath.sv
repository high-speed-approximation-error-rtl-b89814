// blend_datapath: one pixel of alpha blending, G = (1 - alpha) F1 + alpha F2.
//
// A subtractor forms 1 - alpha, two pixel_scaler multipliers weight F1 by
// 1 - alpha and F2 by alpha, and the 8-bit SAET-CSLA approximate adder sums
// the two weighted pixels. Because the two weights add up to one, the exact
// sum never exceeds the largest pixel value; the adder's upper bits and
// carry are exact, so its carry out stays 0 and only the low four bits of G
// can be off (by at most 15). The carry out is still brought out.
//
// Ports: f1, f2 (pixels), alpha (fraction of 2**FRAC, 0 .. 2**FRAC; larger
// values count as 1.0); g (blended pixel), cout (adder carry out).
// Combinational.
//
// The structure (subtract from 1, two multipliers, proposed adder) follows
// the source design's blending architecture; the number format is this
// implementation's choice.
module blend_datapath #(
  parameter int unsigned PIX_W = saet_pkg::PIX_W,
  parameter int unsigned FRAC  = saet_pkg::ALPHA_FRAC
) (
  input  logic [PIX_W-1:0] f1,
  input  logic [PIX_W-1:0] f2,
  input  logic [FRAC:0]    alpha,
  output logic [PIX_W-1:0] g,
  output logic             cout
);

  localparam logic [FRAC:0] ONE = (FRAC+1)'(1) << FRAC;

  logic [FRAC:0]    a_sat;     // alpha limited to 1.0
  logic [FRAC:0]    one_m_a;   // 1 - alpha
  logic [PIX_W-1:0] f1_w, f2_w;

  always_comb begin
    a_sat   = (alpha > ONE) ? ONE : alpha;
    one_m_a = ONE - a_sat;
  end

  pixel_scaler #(.PIX_W(PIX_W), .FRAC(FRAC)) u_scale1 (
    .pix(f1),
    .w  (one_m_a),
    .out(f1_w)
  );

  pixel_scaler #(.PIX_W(PIX_W), .FRAC(FRAC)) u_scale2 (
    .pix(f2),
    .w  (a_sat),
    .out(f2_w)
  );

  saet_csla #(.WIDTH(PIX_W), .ACC_BITS(PIX_W / 2)) u_add (
    .a   (f1_w),
    .b   (f2_w),
    .sum (g),
    .cout(cout)
  );

endmodule
