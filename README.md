# SAET-CSLA: an 8-bit approximate adder and an image blender built on it

Image and video pipelines tolerate small arithmetic errors in the least
significant bits of a pixel, because the eye cannot see them. The
significance approximation error tolerant carry select adder (SAET-CSLA)
uses that: it adds the four high bits of two 8-bit operands exactly, with a
carry select block, and the four low bits with a cheap chain of approximate
full adders. The low half costs about a quarter of the gates of an exact
carry select block and the result is never more than 15 away from the true
sum.

The adder is wrapped in an alpha-blending engine that computes

    G(x,y) = (1 - alpha) * F1(x,y) + alpha * F2(x,y)

for two 255 x 255 grey-level images, read through 8 x 8 block partitioning,
with alpha either constant for a frame or taken per pixel from a mask.

All RTL is SystemVerilog (IEEE 1800-2017), synthesizable, in `rtl/`; one
self-checking testbench per module is in `tb/`.

## The approximate full adder

A conventional full adder (`full_adder`) computes SUM = A xor B xor C and
CARRY = AB + BC + AC with two XORs, two ANDs and an OR.

The approximate full adder (`approx_full_adder`) keeps the carry exactly
(the majority of its three inputs, three ANDs and two ORs) and drops the
XORs: its sum is just the inverted carry.

| A B C | exact SUM | approx SUM | CARRY (both) |
|-------|-----------|------------|--------------|
| 0 0 0 | 0         | **1**      | 0            |
| 0 0 1 | 1         | 1          | 0            |
| 0 1 0 | 1         | 1          | 0            |
| 0 1 1 | 0         | 0          | 1            |
| 1 0 0 | 1         | 1          | 0            |
| 1 0 1 | 0         | 0          | 1            |
| 1 1 0 | 0         | 0          | 1            |
| 1 1 1 | 1         | **0**      | 1            |

Only the two rows where all inputs are equal give a wrong sum. This is the
property the whole design rests on: **a chain of these cells has an exact
carry chain**. Every carry, including the carry out of the chain, is what
an exact adder would produce; only sum bits are wrong, and a sum bit is
wrong exactly where both operand bits equal the carry coming into that bit.

## The SAET-CSLA

```
   A7..A4  B7..B4                 A3..A0  B3..B0
      |      |                       |      |
  +---v------v-----------+      +----v------v----------+
  | accurate part        |      | inaccurate part      |
  | accurate_csla        | C3   | et_csla              |
  |  RCA, carry in 0 --+ |<-----|  4 x approx_full_adder|<-- carry in 0
  |  RCA, carry in 1 --+-mux    |  (one ripple chain)   |
  +---+-----------+------+      +----------+-----------+
      |           |                        |
     COUT      S7..S4                    S3..S0
```

* `et_csla` (the low, inaccurate part) is one ripple chain of four
  approximate full adders starting from carry 0. Its carry out, C3, is
  exact.
* `accurate_csla` (the high, accurate part) is a 4-bit carry select block:
  two `ripple_carry_adder`s of exact full adders work in parallel, one with
  carry in 0 and one with carry in 1, and C3 selects both the sum and the
  carry out. The high half is therefore ready one multiplexer delay after
  C3.
* `saet_csla` joins them. Since C3 is exact, COUT and S7..S4 are always
  exact. All error sits in S3..S0 and is at most 15.

Measured over all 65,536 operand pairs (`saet_csla_tb` prints this):
44,800 pairs give a result that differs from a + b; the largest error is
15, the mean absolute error 3.62, and the mean relative error 2.09 %.
97.8 % of the pairs reach an accuracy, 1 - |error| / (a + b), of at least
90 %. Because the error does not shrink with the operands, very small sums
are badly off: 0 + 1 gives 15.

Both widths are parameters (`WIDTH` = 8, `ACC_BITS` = 4 accurate bits). The
adder has no carry input; the low chain always starts from 0.

## The blending engine

```
 F1 store (partition_buffer) --p1--> pixel_scaler x (1-alpha) --+
                                                                +--> saet_csla --> G
 F2 store (partition_buffer) --p2--> pixel_scaler x alpha ------+
 mask store (partition_buffer) --alpha per pixel--+
 alpha_const (sampled at start) ------------------+-- mode mux --> alpha
```

`image_blend_top` holds three `partition_buffer`s of 255 x 255 words: F1,
F2 (8-bit pixels) and an alpha mask (9-bit). `blend_datapath` forms
1 - alpha, scales each pixel with a `pixel_scaler` and adds the two results
with the SAET-CSLA.

**Alpha format.** alpha is a 9-bit number `a` meaning a / 256, valid from
0 to 256, so that both 0.0 and 1.0 are exact. Values above 256 count as 256.
Each weighted pixel is `floor(pixel * weight / 256)`. The two weights add up
to one, so the exactly added result never exceeds 255. The adder's upper
bits and carry are exact, so its carry out (`out_cout`) stays 0 and no
saturation is needed. A blended pixel differs from exact blending by at
most 15 grey levels, all in its low four bits. The blending ratios
0.2, 0.6 and 0.8 are 51, 154 and 205.

**Partitioning.** Each store is read out in 8 x 8 blocks: blocks left to
right and top to bottom, pixels inside a block in the same order. 255 is
not a multiple of 8, so the last block column is 7 pixels wide and the last
block row 7 high. The scan skips the missing positions, so a frame takes
exactly 65,025 cycles. Blending is pixel by pixel, so the block order
changes only the order of the output stream, not its values. Every output
pixel carries its (x, y) coordinates.

**Alpha source.** `alpha_mode = ALPHA_CONST` uses `alpha_const` for the
whole frame. `ALPHA_MASK` takes alpha for each pixel from the mask store.
Adding a constant offset to one image is done by loading F2 with a constant
image.

### Interface and timing of `image_blend_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `ld_en`, `ld_sel` | in | 1, 2 | write one word into store `ld_sel` (`LD_F1`, `LD_F2`, `LD_MASK`) |
| `ld_x`, `ld_y` | in | 8, 8 | where to write it |
| `ld_data` | in | 9 | pixel in bits 7..0, or a mask alpha in all 9 bits |
| `alpha_mode`, `alpha_const` | in | 1, 9 | alpha source and constant alpha; sampled at `start` |
| `start` | in | 1 | blend one frame; ignored while `busy` |
| `busy` | out | 1 | high from the cycle after `start` until the last pixel has left |
| `out_valid`, `out_pix` | out | 1, 8 | blended pixel G |
| `out_x`, `out_y` | out | 8, 8 | its coordinates |
| `out_tile_end`, `out_frame_end` | out | 1, 1 | last pixel of a block / of the frame |
| `out_cout` | out | 1 | carry out of the adder (always 0) |

* Loading: one word per cycle, in any order. Images stay stored, so any
  number of frames can be blended from one load.
* Frame: the first pixel is on `out_*` two clock edges after the edge that
  took `start`. One memory-read cycle is followed by one output-register
  cycle. Then 65,025 pixels follow on consecutive cycles, and the last has
  `out_frame_end`.
* There is no back-pressure: the receiver must take one pixel per cycle.

### Memory

The three stores are plain arrays with one write port and one registered
read port: 2 x 65,025 x 8 + 65,025 x 9 = 1,625,625 bits. An ASIC would map
them to SRAM macros; an FPGA to block RAM.

## Where the design makes its own choices

These parts are not fixed by the adder's original description and were
chosen here:

* the adder has no carry input, and C3 is read as the carry-select signal of
  the upper block;
* the alpha number format, the truncation and the clamping of alpha;
* what the partitioning stage does (store and 8 x 8 block read-out), its
  scan order, and the handling of the 7-pixel edge blocks;
* the per-pixel mask as a third store with a mode input;
* the load port, reset style, 2-cycle latency and lack of back-pressure.

Gate counts, delays and FPGA resource figures reported for this adder
family depend on the target technology and are not reproduced by this RTL.
Conventional and fully approximate RCA/CLA/CSA adders used as comparison
points are not included. The static segment adder with accuracy adjustment
logic (segment selection plus a forced low carry) is a separate technique
and is not part of this design.

## Files

| file | content |
|------|---------|
| `rtl/saet_pkg.sv` | widths, image size, alpha format, `alpha_mode_e`, `load_sel_e` |
| `rtl/full_adder.sv` | exact one-bit full adder |
| `rtl/approx_full_adder.sv` | approximate full adder (sum = not carry) |
| `rtl/ripple_carry_adder.sv` | N-bit exact ripple adder |
| `rtl/accurate_csla.sv` | accurate carry select block (upper part) |
| `rtl/et_csla.sv` | approximate ripple chain (lower part) |
| `rtl/saet_csla.sv` | the 8-bit SAET-CSLA |
| `rtl/pixel_scaler.sv` | pixel x weight / 256 |
| `rtl/blend_datapath.sv` | 1 - alpha, two scalers, SAET-CSLA |
| `rtl/partition_buffer.sv` | image store with 8 x 8 block read-out |
| `rtl/image_blend_top.sv` | the blending engine |
| `tb/saet_ref_pkg.sv` | reference models, written from the arithmetic rather than the gates |
| `tb/<module>_tb.sv` | one testbench per module |

## Verification

Every testbench compares against values computed independently: truth
tables for the cells, and `a + b` for the exact adders. For the approximate
parts it uses a model that flips a sum bit wherever the three inputs of its
cell are equal. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* Cells, 4-bit adders and the SAET-CSLA are checked exhaustively. The
  SAET-CSLA testbench also checks that the upper half and carry are always
  exact and that the error stays below 16.
* `et_csla_tb` also checks an 8-bit all-approximate chain on 1 + 1, which
  must give 11111110 with carry 0.
* `partition_buffer_tb` uses a 19 x 13 image so that both edge cases (3-wide
  and 5-high blocks) occur. It checks order, data, flags, latency, and that a
  `start` during a scan is ignored.
* `image_blend_top_tb` runs the engine at its full default size with no
  parameter overrides. It loads two 255 x 255 images and a mask, then blends
  frames at alpha 0.2, 0.6 and 0.8 and one frame with the mask. Every pixel
  is checked, along with coverage, flags and cycle timing. It also counts
  and requires block ends, edge blocks, both alpha modes, an ignored
  `start`, approximate pixels, and additions where C3 selected the
  carry-in-1 result. It takes a few seconds.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/saet_pkg.sv tb/saet_ref_pkg.sv tb/image_blend_top_tb.sv \
    --top-module image_blend_top_tb
./obj_dir/Vimage_blend_top_tb
```

Other testbenches are run the same way with their own file and top-module
name; Verilator finds the modules they use in `rtl/` through `-Irtl`.
