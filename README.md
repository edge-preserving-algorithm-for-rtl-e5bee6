# Edge-preserving deblocking filter: pipelined RTL

Block-DCT video coders (MPEG-2, MPEG-4, H.264) leave three kinds of artifact at low bit rates: a visible 8x8 grid, staircase steps along diagonal edges, and isolated corner outliers. This core removes them in real time for frames up to 1920x1080, without blurring real detail.

Older filters decide per 8x8 block whether the block is smooth or detailed. This one decides **per pixel**. A 3x3 Prewitt detector marks every pixel as smooth or edge in three binary maps:

- `Ex`: `|Gx| >= 10`
- `Ey`: `|Gy| >= 10`
- `Ez`: `|Gx|+|Gy| >= 20`

Two filters then use the maps:

1. **Offset filter.** It reduces grid noise. Across each block boundary, smooth pixels are pulled towards each other by 1/16 ... 1/2 of the step. Edge pixels stay put, except the two pixels right at the boundary, which always move by 1/4 of the step. The filter runs along rows with `Ex` first, then along columns with `Ey`.
2. **Edge-preserving filter.** It fixes staircase and corner noise. Each pixel marked in `Ez` is replaced by a 3x3 weighted average. The weights are `(255 - |x_i - x_centre|)^8`, so neighbours of similar brightness dominate and smoothing runs along an edge, not across it.

The architecture follows the paper by Truong Quang Vinh and Young-Chul Kim, "Edge-Preserving Algorithm for Block Artifact Reduction and Its Pipelined Architecture". The RTL here is an independent implementation. The places where the paper says nothing, and choices had to be made, are listed under "Departures and choices" below.

## Arithmetic

All pixels are 8-bit unsigned values.

**Pixel classifier** (3 pipeline stages):

- `Gx` = right column minus left column of the 3x3 window.
- `Gy` = bottom row minus top row.
- Thresholds: T = 20, Td = 10. Both are parameters.

**Offset filter.** It works on one line `p0..p7` of an 8x8 *deblocking block*. That is an 8x8 square centred on a corner of the coding grid, so `p3|p4` straddles a block boundary.

```
off = p3 - p4                          (signed; off/2^k is an arithmetic shift)
smooth (e=0): p0-off/16 p1-off/8 p2-off/4 p3-off/2 | p4+off/2 p5+off/4 p6+off/8 p7+off/16
edge   (e=1): p0 p1 p2 p3-off/4 | p4+off/4 p5 p6 p7
```

Results are clipped to 0..255. One unit filters 8 pixels per clock, so it needs 8 clocks for the rows of a block and 8 more for its columns.

**Edge-preserving filter** (12 pipeline stages). Every multiplier is 8x8 bits, and only the high 8 bits of a squaring go on. So the power 8 is computed as `t -> t^2 -> t^4 -> t^8`, truncating at each step. For example, the centre weight (d = 0) comes out as 248, not 255^8.

| stage | work |
|---|---|
| 1 | `t_i = 255 - abs(x_i - x5)` |
| 2-4 | three truncating squarings: `c_i` |
| 5 | products `c_i * x_i` (16 bits) |
| 6-7 | adder trees: `A = sum(c_i x_i)`, `B = sum(c_i)` |
| 8-11 | `A / B`: restoring divider, 2 quotient bits per stage, floor |
| 12 | `Ez ? A/B : x5`, output register |

## Vertical-raster stripes and the small block buffers

This part takes the most explaining.

A sliding 8x8 window over a frame read row by row would need 7 line buffers: 7x1920+8 = 13,448 bytes at 1080p. Instead, the core reads the frame in **stripes 16 rows high**, and inside a stripe **column by column, top to bottom**. An 8x8 window then needs only 8 column shift registers of 8 words, chained through FIFOs of 16-8 = 8 words: 7x16+8 = **120 bytes**. A 3x3 window needs 3 registers per column and FIFOs of 13 words: 35 bytes.

`raster_to_block` is this buffer. Once it has taken in stripe row `r` of column `x`, `blk[i][j]` holds row `r-7+i`, column `x-7+j` of the image. The window is valid once `r >= 7`.

**Stripe placement.** Stripes start 8 rows apart, so consecutive stripes overlap by 8 rows.

- A frame has `height/8 - 1` stripes.
- Stripe `s` covers frame rows `8s .. 8s+15`.
- Stripe rows 4..11 form one full band of deblocking blocks around the boundary in the middle of the stripe.
- Each pixel is read twice, so the core writes one pixel per two clocks. Exactly, it takes 2 - 16/height clocks per pixel: 508 clocks per 16x16 macroblock at 1080p, and about 36 frames/s at 1080p with a 150 MHz clock.

**Rows each stripe writes.** Stripe `s` writes its band, stripe rows 4..11. The first stripe also writes frame rows 0..3, and the last stripe the bottom 4 frame rows. Those outer rows belong to no deblocking block, so the offset filter never touches them. The same is true of the 4 outermost columns. The one-pixel frame border is never edge-filtered, because it has no full 3x3 window.

**Putting filtered blocks back.** The original stream keeps flowing through `block_to_raster`. That unit has the same 120-word chain, but its register array can also be loaded in parallel. Once a block has been filtered, it is loaded into the array at the exact clock when the array holds that block's original pixels. The stream that leaves the unit is therefore the offset-filtered frame, still in raster order. A 3x3 buffer on that stream feeds the edge-preserving filter.

**One approximation.** The edge-preserving filter at stripe rows 4 and 11 needs rows 3 and 12 as well. Those rows belong to the neighbouring bands, whose offset-filtered values are never inside this 16-row stripe. The window therefore uses the *unfiltered* pixels there.

- The offset filter moves those rows by at most off/16 ... off/4, so the effect is small.
- The effect is only in the 3x3 weights of two rows out of eight.
- The reference model in `tb/tb_deblock_ref_pkg.sv` does the same, stripe by stripe.
- Rows next to the frame's top and bottom are exact, because the unfiltered rows there are the true values.

## Pipeline and timing

Everything advances on `clk` while `clk_en` is high. `clk_en` low freezes the whole core, including the scan counters. The latency counts below are in enabled clocks.

```
pixel_in ─► raster_to_block 3x3 ─► pixel_classifier ─► Ex, Ey ─► 8x8 map buffers ─┐
   │         (1)                    (3)                Ez∧ENz ─► delay 158 ─────┐ │
   └► delay 21 ─► raster_to_block 8x8 ─► offset_filter_block (cap..load: 20) ◄───┼─┘
                     │                                        │ load          │
                     └► delay 20 ─► block8x8_to_block3x3 ◄────┘               │
                                    (120 + 1, window centre 17)               │
                                       └► edge_preserving_filter (12) ◄───────┘
                                             └► output register (1) ─► pixel_out
```

The delay from a `pixel_in` to its `pixel_out` adds up to **192 enabled clocks**. This matches the 192-stage figure in the paper, and the testbenches check it for every pixel.

The deblocking block with its bottom-right pixel at stripe row 11, column 8c+11 is handled in these steps:

1. The controller raises `cap`, and the block and its Ex/Ey maps are captured.
2. `en_x` is high for 8 clocks: row pass.
3. One idle clock.
4. `en_y` is high for 8 clocks: column pass.
5. `load` is raised on the 19th clock after `cap`.

Blocks arrive 128 clocks apart, so the sequences never overlap. An assertion in the controller checks this.

## Interface (`deblocking_filter_core`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst`, `clk_en` | in | 1 | clock, synchronous active-high reset, global enable |
| `start` | in | 1 | start a frame; accepted while `busy` is low |
| `frame_width`, `frame_height` | in | 11 | multiples of 8, at least 16; sampled on `start` |
| `rd_addr`, `rd_en` | out | 21, 1 | image-memory read, linear address `row*width+col` |
| `pixel_in` | in | 8 | data for the read issued one enabled clock earlier |
| `pixel_out`, `wr_addr`, `wr_en` | out | 8, 21, 1 | deblocked pixel and its address; every frame pixel is written exactly once |
| `rdy` | out | 1 | pulse with the first result of a frame |
| `done` | out | 1 | pulse with the last result of a frame |
| `busy` | out | 1 | a frame is in progress |

Parameters: `MAX_WIDTH = 1920`, `MAX_HEIGHT = 1080`, `T = 20`, `TD = 10`. These only size the counters and addresses. No buffer depends on the frame width.

**Memory.** The four block buffers hold 35 + 120 + 120 + 35 = 310 bytes, the figure the paper reports. The alignment delays come on top: 41 bytes of pixels, plus under 600 bits of edge maps and filter FIFOs.

## Modules

| file | what it is |
|---|---|
| `rtl/deblock_pkg.sv` | pixel type, block and stripe sizes, truncating-squarer and clip functions |
| `rtl/deblocking_filter_core.sv` | top level |
| `rtl/deblock_controller.sv` | three scan counters (read, aligned, write); cap/ENx/ENy/load, ENz, write enables |
| `rtl/address_generator.sv` | vertical-raster scan FSM with linear address |
| `rtl/raster_to_block.sv` | NxN memory-reduced window buffer (pixels and 1-bit maps) |
| `rtl/block_to_raster.sv` | 8x8 array with parallel load back into the stream |
| `rtl/block8x8_to_block3x3.sv` | block_to_raster followed by a 3x3 buffer |
| `rtl/pixel_classifier.sv` | Prewitt, abs, thresholds |
| `rtl/offset_filter.sv` | one 8-lane offset filter |
| `rtl/offset_filter_block.sv` | capture, row pass, column pass of a deblocking block |
| `rtl/edge_preserving_filter.sv` | 12-stage filter |
| `rtl/pipelined_divider.sv` | 4-stage restoring divider |
| `rtl/delay_fifo.sv` | fixed-length delay (circular buffer) |

The image memory and the output line buffer are outside the core. The testbenches model the image memory as an array with a synchronous read.

## Departures and choices

These points are not fixed by the paper, or differ from it:

- **Stripes.** The 8-row stripe step, and the rows each stripe writes. The paper gives the 16-row stripe and 2 clocks per pixel, but not how stripes meet.
- **Band-edge approximation.** The edge filter at band rows 4 and 11 sees unfiltered neighbours (see above).
- **Clipping.** Offset-filter results are clipped to 0..255.
- **Division.** The divider rounds down.
- **Centre weight.** The centre coefficient is the truncated chain's value for d = 0.
- **Sequencing.** The row/column sequencing in `offset_filter_block` and the idle clock between the passes.
- **Stage split.** Which classifier stage holds which result, and where the edge filter registers its products.
- **Ey map.** The Ey map is captured with the block rather than delayed separately.
- **ENz.** ENz acts as "full 3x3 window available" and gates Ez.
- **Memory and status interface.** One-clock read latency, the write-address interface, and `rdy`/`done` as one-clock pulses.
- **Reset.** All state clears on reset. Frames do not overlap; `start` is ignored while `busy` is high.
- **Frame size.** Width and height must be multiples of 8, and at least 16.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. For example, to run the end-to-end test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/deblock_pkg.sv tb/tb_deblock_ref_pkg.sv tb/tb_deblocking_filter_core.sv \
  --top-module tb_deblocking_filter_core
./obj_dir/Vtb_deblocking_filter_core
```

| testbench | covers |
|---|---|
| `tb_deblocking_filter_core` | 4 frames (32x16 ... 64x48) back to back with random `clk_en` stalls. Every write is compared with the bit-exact reference model: value, address, order, 192-clock latency, written exactly once. Counts stalls, block captures, edge and smooth lanes, clipping, filtered, pass-through and border pixels, and first/middle/last stripes. |
| `tb_deblocking_filter_core_full` | one 1920x1080 frame at the default parameters (about 15 s) |
| `tb_deblock_workloads` | 512x512, 352x288 (CIF) and 640x480 frames at the default parameters; reports clocks per frame and per macroblock |
| `tb_<module>` | each module against its own model: window positions, load placement, threshold edges, filter equations, the 12-stage and 3-stage latencies, scan order, controller schedule |

`tb/tb_deblock_ref_pkg.sv` is the frame-level reference. It is written from the equations, and it also generates the blocky test images: random flat, ramped, noisy and edged 8x8 blocks.
