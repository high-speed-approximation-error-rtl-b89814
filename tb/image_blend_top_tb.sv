// image_blend_top_tb: end-to-end test of the blending engine at its full
// size (255 x 255 images, 8 x 8 blocks, no parameter overrides).
//
// It loads two generated images and an alpha mask, then blends four frames:
// constant alpha 0.2, 0.6 and 0.8 (51, 154 and 205 of 256), then alpha from
// the mask. For every output pixel it checks the value against the reference
// model of the approximate adder, that the coordinates cover the image
// exactly once, and the flags. It checks the timing: first pixel two cycles
// after the start edge, one pixel per cycle, frame end on the last one.
// It counts how often each mechanism happened and fails if one never did:
// block ends, narrow edge blocks, constant and mask alpha, a start ignored
// while busy, pixels where the approximate adder differs from exact
// addition, and additions where the low part's carry selected the upper
// carry-select result.
module image_blend_top_tb;

  import saet_pkg::*;
  import saet_ref_pkg::*;

  localparam int W = saet_pkg::IMG_W, H = saet_pkg::IMG_H, T = saet_pkg::TILE;
  localparam int XW = $clog2(W), YW = $clog2(H);
  localparam int NPIX = W * H;

  logic          clk = 0, rst_n = 0;
  logic          ld_en = 0;
  load_sel_e     ld_sel = LD_F1;
  logic [XW-1:0] ld_x = '0;
  logic [YW-1:0] ld_y = '0;
  alpha_t        ld_data = '0;
  alpha_mode_e   alpha_mode = ALPHA_CONST;
  alpha_t        alpha_const = '0;
  logic          start = 0;
  logic          busy, out_valid, out_tile_end, out_frame_end, out_cout;
  pixel_t        out_pix;
  logic [XW-1:0] out_x;
  logic [YW-1:0] out_y;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_tile_end = 0, n_edge_tile = 0, n_const_frames = 0, n_mask_frames = 0;
  int n_start_ignored = 0, n_approx = 0, n_carry_select = 0;

  byte unsigned f1 [NPIX];
  byte unsigned f2 [NPIX];
  int  unsigned mask [NPIX];
  bit           seen [NPIX];

  image_blend_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input load_sel_e sel);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        ld_en  = 1;
        ld_sel = sel;
        ld_x   = XW'(x);
        ld_y   = YW'(y);
        case (sel)
          LD_F1:   ld_data = alpha_t'(f1[y * W + x]);
          LD_F2:   ld_data = alpha_t'(f2[y * W + x]);
          default: ld_data = alpha_t'(mask[y * W + x]);
        endcase
      end
    @(negedge clk);
    ld_en = 0;
  endtask

  // one frame; poke: raise start again in the middle with another alpha
  task automatic frame(input alpha_mode_e mode, input int alpha, input bit poke);
    int n = 0, idx, a, exp_g, ex, s1, s2;
    bit frame_end_seen = 0;
    foreach (seen[i]) seen[i] = 0;
    @(negedge clk);
    alpha_mode  = mode;
    alpha_const = alpha_t'(alpha);
    start = 1;
    @(negedge clk);
    start = 0;
    alpha_const = alpha_t'(256 - alpha);   // must not matter after start
    alpha_mode  = (mode == ALPHA_CONST) ? ALPHA_MASK : ALPHA_CONST;
    // start was taken at the last edge: nothing out yet one cycle later
    checks++;
    if (out_valid || !busy) begin failures++; $display("FAIL timing at start+0"); end
    @(negedge clk);
    checks++;
    if (out_valid || !busy) begin failures++; $display("FAIL timing at start+1"); end
    @(negedge clk);
    checks++;
    if (!out_valid) begin failures++; $display("FAIL first pixel not at start+2"); end
    while (out_valid && n <= NPIX) begin
      idx = int'(out_y) * W + int'(out_x);
      checks++;
      if (int'(out_x) >= W || int'(out_y) >= H || seen[idx]) begin
        failures++;
        $display("FAIL pixel (%0d,%0d) out of range or repeated", out_x, out_y);
      end else begin
        seen[idx] = 1;
        a = (mode == ALPHA_MASK) ? int'(mask[idx]) : alpha;
        exp_g = blend(f1[idx], f2[idx], a);
        ex    = blend_exact(f1[idx], f2[idx], a);
        checks++;
        if (int'(out_pix) != exp_g || out_cout !== 1'b0) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) alpha %0d: %0d expected %0d",
                                      out_x, out_y, a, out_pix, exp_g);
        end
        if (exp_g != ex) n_approx++;
        s1 = scale(f1[idx], 256 - a);
        s2 = scale(f2[idx], a);
        if (((s1 & 15) + (s2 & 15)) >= 16) n_carry_select++;
      end
      checks++;
      if (out_tile_end !== (((int'(out_x) % T) == T - 1 || int'(out_x) == W - 1) &&
                            ((int'(out_y) % T) == T - 1 || int'(out_y) == H - 1))) failures++;
      if (out_tile_end) begin
        n_tile_end++;
        if (int'(out_x) % T != T - 1 || int'(out_y) % T != T - 1) n_edge_tile++;
      end
      checks++;
      if (out_frame_end !== (n == NPIX - 1)) failures++;
      if (out_frame_end) frame_end_seen = 1;
      if (poke && n == 1000) start = 1;
      if (poke && n == 1001) start = 0;
      if (poke && n == 1001) n_start_ignored++;
      n++;
      @(negedge clk);
    end
    checks++;
    if (n != NPIX || !frame_end_seen) begin
      failures++;
      $display("FAIL frame gave %0d pixels in a row, expected %0d", n, NPIX);
    end
    checks++;
    if (busy || out_valid) begin failures++; $display("FAIL still busy after the frame"); end
    if (mode == ALPHA_MASK) n_mask_frames++;
    else n_const_frames++;
    $display("frame mode=%s alpha=%0d: %0d pixels in %0d cycles", mode.name(), alpha, n, n);
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else begin
      $display("  %-28s %0d", what, count);
    end
  endtask

  initial begin
    // test images: a smooth gradient with a pattern, and a pseudo-random
    // texture; mask: alpha rising from 0 at the top-left to 1 at the
    // bottom-right corner
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        f1[y * W + x]   = byte'((x + 2 * y + ((x ^ y) & 31)) & 8'hff);
        f2[y * W + x]   = byte'($urandom);
        mask[y * W + x] = ((x + y) * 256) / (W + H - 2);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(LD_F1);
    load(LD_F2);
    load(LD_MASK);
    frame(ALPHA_CONST, 51, 1'b0);
    frame(ALPHA_CONST, 154, 1'b1);
    frame(ALPHA_CONST, 205, 1'b0);
    frame(ALPHA_MASK, 0, 1'b0);
    $display("mechanisms:");
    need("block ends", n_tile_end);
    need("narrow edge blocks", n_edge_tile);
    need("constant-alpha frames", n_const_frames);
    need("mask-alpha frames", n_mask_frames);
    need("start ignored while busy", n_start_ignored);
    need("approximate pixels", n_approx);
    need("low carry selects upper", n_carry_select);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
