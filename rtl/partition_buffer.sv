// partition_buffer: image store that reads an image back in TILE x TILE
// blocks (the "partitioning" stage in front of each blending multiplier).
//
// Writing: an image of IMG_W x IMG_H words is loaded through a simple write
// port, one word per cycle at (wr_x, wr_y), in any order.
//
// Reading: a pulse on start makes the block scan the whole image once, one
// word per cycle, block by block. Blocks are visited left to right, top to
// bottom, and the words inside a block also left to right, top to bottom.
// When the image size is not a multiple of TILE (255 = 31 * 8 + 7), the
// blocks on the right and bottom edges are narrower or shorter, and the scan
// skips the missing positions, so no cycle is wasted. The memory has a
// registered read port: rd_data, with its coordinates and flags, appears one
// cycle after the address, and a scan of N words ends N + 1 cycles after
// start with rd_frame_end. start is ignored while a scan is running (busy).
// Several buffers started in the same cycle stay in lockstep.
//
// The image size and the 8 x 8 blocks follow the source design; the scan
// order, the write port and the timing are this implementation's choice.
module partition_buffer #(
  parameter int unsigned IMG_W  = saet_pkg::IMG_W,
  parameter int unsigned IMG_H  = saet_pkg::IMG_H,
  parameter int unsigned TILE   = saet_pkg::TILE,
  parameter int unsigned DATA_W = saet_pkg::PIX_W,
  localparam int unsigned XW    = $clog2(IMG_W),
  localparam int unsigned YW    = $clog2(IMG_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  // load port
  input  logic              wr_en,
  input  logic [XW-1:0]     wr_x,
  input  logic [YW-1:0]     wr_y,
  input  logic [DATA_W-1:0] wr_data,
  // block scan
  input  logic              start,
  output logic              busy,
  output logic              rd_valid,
  output logic [DATA_W-1:0] rd_data,
  output logic [XW-1:0]     rd_x,
  output logic [YW-1:0]     rd_y,
  output logic              rd_tile_end,   // last word of a block
  output logic              rd_frame_end   // last word of the image
);

  localparam int unsigned DEPTH  = IMG_W * IMG_H;
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned NTX    = (IMG_W + TILE - 1) / TILE;  // blocks per row
  localparam int unsigned NTY    = (IMG_H + TILE - 1) / TILE;  // block rows
  localparam int unsigned LAST_W = IMG_W - (NTX - 1) * TILE;   // edge block width
  localparam int unsigned LAST_H = IMG_H - (NTY - 1) * TILE;   // edge block height
  localparam int unsigned TW     = $clog2(TILE);
  localparam int unsigned TXW    = (NTX > 1) ? $clog2(NTX) : 1;
  localparam int unsigned TYW    = (NTY > 1) ? $clog2(NTY) : 1;

  logic [DATA_W-1:0] mem [DEPTH];

  // scan state
  logic [TXW-1:0] tx;     // block column
  logic [TYW-1:0] ty;     // block row
  logic [TW-1:0]  ix;     // column inside the block
  logic [TW-1:0]  iy;     // row inside the block
  logic           scan;

  logic [TW-1:0]  ix_max, iy_max;
  logic           last_x, last_y, last_tx, last_ty;
  logic [XW-1:0]  cur_x;
  logic [YW-1:0]  cur_y;

  always_comb begin
    ix_max  = (32'(tx) == NTX - 1) ? TW'(LAST_W - 1) : TW'(TILE - 1);
    iy_max  = (32'(ty) == NTY - 1) ? TW'(LAST_H - 1) : TW'(TILE - 1);
    last_x  = (ix == ix_max);
    last_y  = (iy == iy_max);
    last_tx = (32'(tx) == NTX - 1);
    last_ty = (32'(ty) == NTY - 1);
    cur_x   = XW'(32'(tx) * TILE + 32'(ix));
    cur_y   = YW'(32'(ty) * TILE + 32'(iy));
  end

  assign busy = scan;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan <= 1'b0;
      tx   <= '0;
      ty   <= '0;
      ix   <= '0;
      iy   <= '0;
    end else if (!scan) begin
      if (start) begin
        scan <= 1'b1;
        tx   <= '0;
        ty   <= '0;
        ix   <= '0;
        iy   <= '0;
      end
    end else if (!last_x) begin
      ix <= ix + 1'b1;
    end else begin
      ix <= '0;
      if (!last_y) begin
        iy <= iy + 1'b1;
      end else begin
        iy <= '0;
        if (!last_tx) begin
          tx <= tx + 1'b1;
        end else begin
          tx <= '0;
          if (!last_ty) ty <= ty + 1'b1;
          else          scan <= 1'b0;   // whole image visited
        end
      end
    end
  end

  // memory: one write port, one registered read port
  logic [AW-1:0] wr_addr, rd_addr;

  always_comb begin
    wr_addr = AW'(32'(wr_y) * IMG_W + 32'(wr_x));
    rd_addr = AW'(32'(cur_y) * IMG_W + 32'(cur_x));
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (scan)  rd_data      <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid     <= 1'b0;
      rd_x         <= '0;
      rd_y         <= '0;
      rd_tile_end  <= 1'b0;
      rd_frame_end <= 1'b0;
    end else begin
      rd_valid     <= scan;
      rd_x         <= cur_x;
      rd_y         <= cur_y;
      rd_tile_end  <= scan & last_x & last_y;
      rd_frame_end <= scan & last_x & last_y & last_tx & last_ty;
    end
  end

  // A write must stay inside the image
  a_wr_in_range : assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (32'(wr_x) < IMG_W && 32'(wr_y) < IMG_H));

endmodule
