// pixel_scaler: weights one pixel by a blending factor.
//
// out = floor(pix * w / 2**FRAC), with the weight w a fraction of 2**FRAC in
// the range 0 .. 2**FRAC (0.0 .. 1.0 inclusive). Since w <= 1 the result
// never exceeds the input, so it fits back into PIX_W bits; the fraction
// bits of the product are dropped (truncation).
//
// Ports: pix (PIX_W bits), w (FRAC+1 bits, values above 2**FRAC are treated
// as 1.0); out (PIX_W bits). Combinational.
//
// The source design only says that each partitioned image is multiplied by
// its factor; the fixed-point format and the truncation are this
// implementation's choice.
module pixel_scaler #(
  parameter int unsigned PIX_W = saet_pkg::PIX_W,
  parameter int unsigned FRAC  = saet_pkg::ALPHA_FRAC
) (
  input  logic [PIX_W-1:0] pix,
  input  logic [FRAC:0]    w,
  output logic [PIX_W-1:0] out
);

  localparam logic [FRAC:0] ONE = (FRAC+1)'(1) << FRAC;

  logic [FRAC:0]         w_sat;
  logic [PIX_W+FRAC:0]   prod;

  always_comb begin
    w_sat = (w > ONE) ? ONE : w;
    prod  = (PIX_W+FRAC+1)'(pix) * (PIX_W+FRAC+1)'(w_sat);
    out   = prod[FRAC +: PIX_W];
  end

endmodule
