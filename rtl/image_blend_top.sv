// image_blend_top: alpha blending of two grey-level images with the
// approximate SAET-CSLA adder.
//
// G(x,y) = (1 - alpha) F1(x,y) + alpha F2(x,y)
//
// Structure: F1 and F2 each sit in a partition_buffer that reads them out in
// 8 x 8 blocks. A third partition_buffer holds an optional alpha mask of the
// same size. The blend_datapath forms 1 - alpha, weights the two pixels and
// adds them with the SAET-CSLA. alpha is either one value for the whole
// frame (alpha_mode = ALPHA_CONST, value alpha_const) or read per pixel from
// the mask (ALPHA_MASK).
//
// Use: load F1, F2 and, if needed, the mask through the load port (ld_sel
// picks the store; pixels use the low PIX_W bits of ld_data, mask words all
// ALPHA_W bits). Then pulse start; alpha_mode and alpha_const are sampled
// at that edge. The three stores scan in lockstep and blended pixels leave
// on out_* in block order, one per cycle, with their coordinates.
//
// Timing: the first pixel appears 2 cycles after start (1 cycle memory read,
// 1 cycle output register); a 255 x 255 frame streams 65025 pixels on
// consecutive cycles, the last flagged with out_frame_end. busy stays high
// from the cycle after start until that last pixel has left. There is no
// back-pressure: the consumer must take one pixel per cycle.
//
// Image size, 8 x 8 partitioning, the blending equation, the constant-or-mask
// choice of alpha and the 8-bit SAET-CSLA follow the source design. The load
// port, the scan order, the alpha format (ALPHA_W-bit fraction of 256) and
// the timing are this implementation's choices.
module image_blend_top #(
  parameter int unsigned IMG_W = saet_pkg::IMG_W,
  parameter int unsigned IMG_H = saet_pkg::IMG_H,
  parameter int unsigned TILE  = saet_pkg::TILE,
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // load port
  input  logic                  ld_en,
  input  saet_pkg::load_sel_e   ld_sel,
  input  logic [XW-1:0]         ld_x,
  input  logic [YW-1:0]         ld_y,
  input  saet_pkg::alpha_t      ld_data,
  // frame control
  input  saet_pkg::alpha_mode_e alpha_mode,
  input  saet_pkg::alpha_t      alpha_const,
  input  logic                  start,
  output logic                  busy,
  // blended pixel stream
  output logic                  out_valid,
  output saet_pkg::pixel_t      out_pix,
  output logic [XW-1:0]         out_x,
  output logic [YW-1:0]         out_y,
  output logic                  out_tile_end,
  output logic                  out_frame_end,
  output logic                  out_cout
);

  import saet_pkg::*;

  // frame settings, held for the whole scan
  alpha_mode_e mode_q;
  alpha_t      alpha_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q  <= ALPHA_CONST;
      alpha_q <= '0;
    end else if (start && !busy) begin
      mode_q  <= alpha_mode;
      alpha_q <= alpha_const;
    end
  end

  // the three image stores
  logic   v1, v2, vm;
  logic   busy1, busy2, busym;
  pixel_t p1, p2;
  alpha_t pm;
  logic [XW-1:0] x1, x2, xm;
  logic [YW-1:0] y1, y2, ym;
  logic   te1, te2, tem, fe1, fe2, fem;
  logic   scan_go;

  assign scan_go = start && !busy;

  partition_buffer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .TILE(TILE), .DATA_W(PIX_W)) u_part_f1 (
    .clk, .rst_n,
    .wr_en       (ld_en && ld_sel == LD_F1),
    .wr_x        (ld_x),
    .wr_y        (ld_y),
    .wr_data     (ld_data[PIX_W-1:0]),
    .start       (scan_go),
    .busy        (busy1),
    .rd_valid    (v1),
    .rd_data     (p1),
    .rd_x        (x1),
    .rd_y        (y1),
    .rd_tile_end (te1),
    .rd_frame_end(fe1)
  );

  partition_buffer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .TILE(TILE), .DATA_W(PIX_W)) u_part_f2 (
    .clk, .rst_n,
    .wr_en       (ld_en && ld_sel == LD_F2),
    .wr_x        (ld_x),
    .wr_y        (ld_y),
    .wr_data     (ld_data[PIX_W-1:0]),
    .start       (scan_go),
    .busy        (busy2),
    .rd_valid    (v2),
    .rd_data     (p2),
    .rd_x        (x2),
    .rd_y        (y2),
    .rd_tile_end (te2),
    .rd_frame_end(fe2)
  );

  partition_buffer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .TILE(TILE), .DATA_W(ALPHA_W)) u_part_mask (
    .clk, .rst_n,
    .wr_en       (ld_en && ld_sel == LD_MASK),
    .wr_x        (ld_x),
    .wr_y        (ld_y),
    .wr_data     (ld_data),
    .start       (scan_go),
    .busy        (busym),
    .rd_valid    (vm),
    .rd_data     (pm),
    .rd_x        (xm),
    .rd_y        (ym),
    .rd_tile_end (tem),
    .rd_frame_end(fem)
  );

  // blending
  alpha_t alpha_px;
  pixel_t g;
  logic   g_cout;

  assign alpha_px = (mode_q == ALPHA_MASK) ? pm : alpha_q;

  blend_datapath #(.PIX_W(PIX_W), .FRAC(ALPHA_FRAC)) u_blend (
    .f1   (p1),
    .f2   (p2),
    .alpha(alpha_px),
    .g    (g),
    .cout (g_cout)
  );

  // output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_pix       <= '0;
      out_x         <= '0;
      out_y         <= '0;
      out_tile_end  <= 1'b0;
      out_frame_end <= 1'b0;
      out_cout      <= 1'b0;
    end else begin
      out_valid     <= v1;
      out_pix       <= g;
      out_x         <= x1;
      out_y         <= y1;
      out_tile_end  <= te1;
      out_frame_end <= fe1;
      out_cout      <= g_cout;
    end
  end

  // busy from the scan start until the last pixel has left the output register
  always_comb busy = busy1 | v1 | out_valid & ~out_frame_end;

  // The three stores run in lockstep
  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
    v1 |-> (v2 && vm && x1 == x2 && x1 == xm && y1 == y2 && y1 == ym
            && te1 == te2 && te1 == tem && fe1 == fe2 && fe1 == fem
            && busy1 == busy2 && busy1 == busym));

endmodule
