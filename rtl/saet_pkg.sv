// saet_pkg: constants and types shared by the approximate adder and the
// image blending engine built around it.
//
// The adder is 8 bits wide and split into a 4-bit accurate upper part and a
// 4-bit approximate lower part. The blending engine works on 8-bit grey
// pixels of 255 x 255 images, read in 8 x 8 blocks. Those numbers follow the
// source design. The blending weight format (9-bit fraction of 256, so that
// both 0 and 1 are exact) is this implementation's own choice.
package saet_pkg;

  // Adder geometry
  localparam int unsigned ADD_WIDTH = 8;   // operand width of the SAET-CSLA
  localparam int unsigned ACC_BITS  = 4;   // bits in the accurate (upper) part

  // Image geometry
  localparam int unsigned PIX_W = 8;       // grey-level pixel width
  localparam int unsigned IMG_W = 255;     // image width in pixels
  localparam int unsigned IMG_H = 255;     // image height in pixels
  localparam int unsigned TILE  = 8;       // partition block edge (8 x 8)

  // Blending weight: alpha = value / 2**ALPHA_FRAC, value in 0 .. 2**ALPHA_FRAC
  localparam int unsigned ALPHA_FRAC = 8;
  localparam int unsigned ALPHA_W    = ALPHA_FRAC + 1;

  typedef logic [PIX_W-1:0]   pixel_t;
  typedef logic [ALPHA_W-1:0] alpha_t;

  // Where alpha comes from: one value for the whole frame, or a per-pixel mask
  typedef enum logic {
    ALPHA_CONST = 1'b0,
    ALPHA_MASK  = 1'b1
  } alpha_mode_e;

  // Which image store a load-port write goes to
  typedef enum logic [1:0] {
    LD_F1   = 2'd0,   // first input image
    LD_F2   = 2'd1,   // second input image
    LD_MASK = 2'd2    // per-pixel alpha mask
  } load_sel_e;

endpackage
