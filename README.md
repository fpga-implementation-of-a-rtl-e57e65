# Stereo matching processor with window-parallel and pixel-parallel SAD array

This design computes a dense disparity map from a rectified stereo pair, and it
is written as synthesizable SystemVerilog. For every pixel of the left
(reference) image it finds the horizontal offset of the matching pixel in the
right (candidate) image. Matching minimises the sum of absolute differences
(SAD) over a square window.

A large window is needed to avoid ambiguity, and a small one to avoid errors at
depth edges. The design therefore runs coarse to fine:

1. **Full search.** The reference image is cut into non-overlapping
   `WMAX x WMAX` windows (8x8 by default). Each window is compared with every
   candidate window on the same rows that lies inside the image, and the
   disparity with the smallest SAD is kept.
2. **Local search.** The window size is halved and the image is cut again into
   non-overlapping windows. Each new window looks at the four disparities
   D1..D4 found at the previous size for the four larger windows nearest to it.
   It then searches only the disparities within `+-RADIUS` of any of them.
3. Step 2 is repeated down to 1x1 windows. The 1x1 map is the per-pixel
   result.

Because the windows never overlap, no SAD is computed twice. The default
configuration is a 64x64 8-bit image with an 8x8 maximum window. It finishes in
16675 clocks, which is 0.194 ms at 86 MHz.

## The WPPP array (`sad_unit`)

The core is an array of `WMAX x IW` PE1s, one per reference pixel of a band of
`WMAX` image rows. For the default size that is 8 x 64 = 512 PE1s. A quad-tree
of adders sits on top of them:

```
level 0   PE1   1x1   512 per band   absolute difference
level 1   PE2   2x2   128 per band   adds 4 PE1 outputs
level 2   PE3   4x4    32 per band   adds 4 PE2 outputs
level 3   PE3   8x8     8 per band   adds 4 level-2 PE3 outputs
```

Every node of the tree, at every level, has its own **window node**. A window
node contains a SAD accumulator, a search area controller and a minimum
detector. When window size `2^L` is being matched, the window nodes of level L
are active. All `(WMAX/2^L) x (IW/2^L)` windows of the band are then matched at
once from the same 512 absolute differences. This is the point of the
window-parallel-and-pixel-parallel arrangement. At 8x8, the ADs are used as 8
windows of 64 pixels. At 1x1, they are used as 512 windows of one pixel. No AD
is idle at any window size.

Disparities are produced by moving the data, not by addressing. The candidate
registers of a PE1 row form a shift chain. After each candidate word, every
candidate pixel moves one column to the right. So after `d` shifts, the PE1 at
column `x` compares reference pixel `x` with candidate pixel `x - d`. Each pass
steps through all `IW` disparities. A search area controller passes a SAD to
its minimum detector only when both of these hold:

- the candidate window lies inside the image (`d <= x0`, where `x0` is the
  window's left column);
- the search is a full search (largest size), or `|d - Di| <= RADIUS` for some i.

Control is local. Each window has a hard-wired column and its own D1..D4, so
only the bit-plane token and the level are broadcast.

### Choosing D1..D4

A window at level L has a parent window at level L+1. Its position in the
parent (top/bottom, left/right) picks the neighbours. D1..D4 are the disparities
of:

- the parent;
- the parent's horizontal neighbour on that side;
- the parent's vertical neighbour on that side;
- the diagonal neighbour.

At the image border, a missing neighbour is replaced by the parent itself.

## Bit-serial arithmetic

Pixels are processed one bit-plane per clock, LSB first. One candidate
disparity therefore takes `PIX_W = 8` clocks. This keeps every adder of the
tree narrow.

- **PE1** holds both pixels in parallel. A comparator picks the larger one, and
  a one-bit subtractor with a borrow flip-flop produces `max - min`, which is
  `|ref - cand|`, one bit per clock. The AD bit is registered.
- **PE2** adds the four AD bits of one bit-plane, giving 0..4 (3 bits,
  registered). **PE3** adds four child sums, so it is 2 bits wider than its
  inputs (5 bits for 4x4, 7 bits for 8x8). So a level-L adder is only
  `2L+1` bits wide, whatever the pixel width.
- A **window node** rebuilds the SAD from the bit-plane counts with a
  serial-parallel accumulator. For bit-plane `k` it forms `t = P + count`,
  shifts `t[0]` out as SAD bit `k`, and keeps `P = t >> 1` as the carry into the
  next plane. This gives `SAD = sum_k count_k * 2^k`. After the last plane the
  full SAD word `{t >> 1, t[0], bits}` goes to the minimum detector, one clock
  later.

Timing of one word (disparity `d`) at level L. Clock 0 is bit-plane 0 entering
PE1.

```
clock        0 .. 7      PE1 bit-planes 0..7 (candidate shifts at end of 7)
clock        1 .. 8      AD bits registered         (level 0 node input)
clock   L+1 .. L+8       level-L sums registered    (level L node input)
clock   L+9              SAD word offered to the minimum detector
clock   L+10             best disparity updated
```

The controller's token `{valid, k, d}` is delayed by one register per tree
level (`tok_d[L]`), so each window node sees the token together with its data.
Consecutive words follow each other with no gap. The last word of a pass is
fully absorbed `LMAX + 3` clocks after its last token.

## Memories and the pass schedule

- **Image memories.** `WMAX` R-MEMs hold the reference image, and `WMAX` C-MEMs
  hold the candidate image. Rows are interleaved: row `y` is in module
  `y mod WMAX` at address `(y / WMAX) * IW + x`. All modules are read with the
  same address, so one read fetches one column of a whole band.
- **Line buffers.** Each memory feeds a line buffer of `IW` registers. A band
  is loaded in `IW` clocks and copied into the PE1s in one clock. The next
  band is fetched while the PEs compute, so loading is hidden except before
  the first pass.
- **Disparity memory.** This holds one map per window size, with
  `(IW/2^L)^2` entries at level L. After each pass, all window results of the
  band are written in one clock. While level L is matched, the memory presents
  the level-(L+1) rows that surround the band (`dstrip`), from which each window
  node takes its fixed D1..D4 positions.

The controller (`stereo_ctrl`) runs the passes level by level over the whole
image: 8x8 over all 8 bands, then 4x4, 2x2 and 1x1. This order matters because
a window in the bottom half of a band needs the coarser result of the band
below. A pass consists of:

| phase   | clocks             | action                                          |
|---------|--------------------|-------------------------------------------------|
| XFER    | 1                  | line buffers to PE1s, clear minima, start prefetch |
| COMPUTE | IW * 8 = 512       | tokens for d = 0..IW-1, k = 0..7                |
| DRAIN   | LMAX + 2 = 5       | pipeline empties                                |
| WB      | 1                  | band results written                            |

The total is `3 + IW + (LMAX+1)*(IW/WMAX)*(IW*8 + LMAX + 4)`, with `LMAX = log2(WMAX)`. For the default size
that is 67 + 32 * 519 = 16675 clocks.

## Interface (`stereo_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `img_we`, `img_sel`, `img_row`, `img_col`, `img_data` | in | write one pixel; `img_sel` 0 = left/reference, 1 = right/candidate; ignored while `busy` |
| `start` | in | one-clock pulse to start matching |
| `busy`, `done` | out | running; one-clock pulse when all maps are written |
| `rd_level`, `rd_row`, `rd_col` | in | read the map of window size `2^rd_level` |
| `rd_disp` | out | disparity, one clock after the read address |

The disparity is `x_left - x_right` of the matched windows, so it is never
negative. Parameters: `IW` (image width and height, default 64), `WMAX` (maximum
window size, a power of two >= 2, default 8), `RADIUS` (local search radius,
default 2). Shared types and widths are in `stereo_pkg`: 8-bit pixels and 8-bit
disparities, which allows images up to 256 wide.

## What follows the reference architecture and what does not

These points follow the reference architecture:

- the coarse-to-fine algorithm on non-overlapping windows;
- the four-neighbour local search;
- `WMAX` row-interleaved memory modules per image;
- `IW`-register line buffers;
- the `IW x WMAX` PE1 array with PE2/PE3 adders and constant AD use;
- a pipeline register, search area controller and minimum detector in each PE;
- the shift-the-candidate compute step;
- a bit-serial datapath;
- the 64x64 / 8x8 / 8-bit configuration with 512 AD units, and about 0.19 ms at
  86 MHz.

These are this design's own choices, because the architecture leaves them open:

- **Local search radius.** The value 2 is assumed.
- **Bit-serial details.** LSB-first order, the comparator-plus-serial-subtractor
  PE1, and the bit-plane-count tree with serial-parallel accumulation are
  chosen here. The internal structure of the PEs is not specified.
- **Full search range.** The full search covers disparities 0..x0 for every
  window. Each pass shifts through all `IW` disparities even when the local
  search needs only a few.
- **Line buffer prefetch.** The line buffers are used as a prefetch stage. The
  PEs are then idle only for the one-clock copy, rather than for the whole
  load. This is what brings the run time to 0.194 ms.
- **Border handling.** D1..D4 are clamped at the image border. Candidates that
  would leave the image are rejected.
- **Ties.** On equal SADs, the smaller disparity wins.
- **Disparity memory.** It stores every level in registers and is written a
  band at a time.
- **Host side.** The host write and read ports and start/done are this
  design's.

Not built: multi-chip scaling to 256x256 images with 16x16 windows. That size
is only a matter of the parameters `IW = 256, WMAX = 16`, but it has not been
synthesized or simulated. It would need 4096 PE1s.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_stereo_top` | full default size, end to end (see below) |
| `tb_stereo_top_w16` | the same on a 32x32 image with a 16x16 maximum window (five tree levels, 2675 clocks) |
| `tb_sad_unit` | 16x16 image, 4x4 window: every window's disparity at every level vs. SADs computed from the pixels, random D1..D4 |
| `tb_stereo_ctrl` | pass order, token sequence, shifts, prefetch addresses, write-backs, 16675-clock duration |
| `tb_pe1`, `tb_pe2`, `tb_pe3` | every AD bit / bit-plane sum, and the window node's choice in full and local search |
| `tb_search_area_ctrl`, `tb_min_detector` | the enable rule and min/tie behaviour vs. models |
| `tb_image_mem`, `tb_line_buffer`, `tb_disparity_mem` | storage, latency, strip contents with border clamping |

`tb_stereo_top` works on a generated scene. The right image is random texture.
The left image is built from it with a background at disparity 3, a square at
9 and a thin strip at 20. The test checks:

- every entry of all four maps against a behavioural model of the algorithm;
- the start-to-done time;
- that every mechanism occurred at least once: passes at each window size,
  prefetch during compute, rejections at the image edge, rejections by the
  local search, and windows whose result the local search changed.

About 93% of the pixels get the true disparity. The remaining pixels are at
depth edges and image borders.

The test also reports how much of the array's work is useful. A pass computes
a SAD word for every window and every one of the `IW` disparities. On this
scene about 45% of those words pass the search area controllers at 8x8 (the
image-edge limit only). About 8-9% pass at the smaller sizes, where the local
search keeps a few disparities per window. Skipping the unused disparities
would shorten the local passes, but it is not done. Every pass has the same
fixed length, which keeps the control simple and the timing predictable.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/stereo_pkg.sv tb/tb_stereo_top.sv --top-module tb_stereo_top
./obj_dir/Vtb_stereo_top
```

The full-size model takes about a minute to build and under a second to run.
