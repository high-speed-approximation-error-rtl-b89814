// partition_buffer_tb: loads a 19 x 13 image (blocks of 8, so the right and
// bottom blocks are 3 wide and 5 high), scans it twice and checks:
//  - every word comes out once, in block order, with its own coordinates and
//    the value written there;
//  - block-end and frame-end flags sit on the right words;
//  - the first word appears one cycle after start, the words follow on
//    consecutive cycles and busy drops after the last address;
//  - start is ignored while a scan runs.
module partition_buffer_tb;

  localparam int W = 19, H = 13, T = 8, DW = 8;
  localparam int XW = $clog2(W), YW = $clog2(H);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, start = 0;
  logic [XW-1:0] wr_x = '0;
  logic [YW-1:0] wr_y = '0;
  logic [DW-1:0] wr_data = '0;
  logic busy, rd_valid, rd_tile_end, rd_frame_end;
  logic [DW-1:0] rd_data;
  logic [XW-1:0] rd_x;
  logic [YW-1:0] rd_y;

  int checks = 0, failures = 0;
  int exp_x [W*H];
  int exp_y [W*H];
  logic [DW-1:0] img [W*H];

  partition_buffer #(.IMG_W(W), .IMG_H(H), .TILE(T), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected scan order, worked out block by block
  initial begin
    int n = 0;
    for (int ty = 0; ty < H; ty += T)
      for (int tx = 0; tx < W; tx += T)
        for (int y = ty; y < ty + T && y < H; y++)
          for (int x = tx; x < tx + T && x < W; x++) begin
            exp_x[n] = x;
            exp_y[n] = y;
            n++;
          end
  end

  task automatic scan(input bit poke_start);
    int n = 0, tiles = 0, cyc = 0;
    bit seen_frame_end = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // start was taken at the last edge; the first word follows one cycle later
    checks++;
    if (rd_valid || !busy) failures++;
    @(negedge clk);
    checks++;
    if (!rd_valid) begin failures++; $display("FAIL first word late"); end
    while (rd_valid && n <= W * H) begin
      checks++;
      if (int'(rd_x) != exp_x[n] || int'(rd_y) != exp_y[n] ||
          rd_data !== img[exp_y[n] * W + exp_x[n]]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d at (%0d,%0d) = %0d expected (%0d,%0d)",
                                    n, rd_x, rd_y, rd_data, exp_x[n], exp_y[n]);
      end
      // block end: last column and row of the block
      checks++;
      if (rd_tile_end !== (((int'(rd_x) % T) == T - 1 || int'(rd_x) == W - 1) &&
                           ((int'(rd_y) % T) == T - 1 || int'(rd_y) == H - 1))) failures++;
      if (rd_tile_end) tiles++;
      checks++;
      if (rd_frame_end !== (n == W * H - 1)) failures++;
      if (rd_frame_end) seen_frame_end = 1;
      if (poke_start && n == 10) start = 1;
      if (poke_start && n == 11) start = 0;
      n++;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (n != W * H || !seen_frame_end) begin
      failures++;
      $display("FAIL scan gave %0d words", n);
    end
    checks++;
    if (tiles != ((W + T - 1) / T) * ((H + T - 1) / T)) failures++;
    checks++;
    if (busy) failures++;
    @(negedge clk);
    checks++;
    if (rd_valid) failures++;   // a start during the scan must not restart it
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        wr_en = 1;
        wr_x = XW'(x);
        wr_y = YW'(y);
        wr_data = DW'($urandom);
        img[y * W + x] = wr_data;
      end
    @(negedge clk); wr_en = 0;
    scan(1'b0);
    scan(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
