# Streaming FAST corner detector with a compressed pattern table

FAST ("Features from Accelerated Segment Test") decides whether a pixel `p` is a
corner by looking at the 16 pixels on a radius-3 circle around it. Each ring
pixel is classed as darker than `I(p) - t`, brighter than `I(p) + t`, or similar.
The machine-learned form of FAST treats this as a table lookup. The index is the
16 three-valued states, which gives 3^16 = 43 million entries and a 26-bit
address. That table is far too large for on-chip memory, and as flat logic it is
also too big to synthesize.

This RTL detects FAST-N corners (N = 10 by default, 9 as an option) in a camera
pixel stream, one pixel per clock. The table has been compressed so that it can
be built as a small block of combinational logic:

* **Split.** The three-valued state is split into two binary patterns: `SD`
  (bit x = ring point x is darker) and `SB` (bit x = ring point x is brighter).
  The corner table for `SD` and the one for `SB` are identical. For N >= 9 at
  most one of them can match, and it must be the one with more 1 bits. So one
  2^16-entry binary table is looked up once, with whichever pattern has more
  ones. This compression loses nothing.
* **Symmetry** (optional). The pattern is also replaced by a representative: the
  smallest of its four 90-degree rotations and those of its mirror image. The
  table then only has to list the representatives of the corner patterns. This
  costs a comparator tree in front of the table and one more pipeline stage.

## Data path

```
 pix_data ─► shift_window (7 x 7 flip-flops) ──► state_converter ─► [reg] ─┬────────────────────────────────► corner_table ─────┬─► [reg] ─► out_corner
               ▲   rows 0..5 right end │            SD / SB, pick more ones        │  split (default)                 N contiguous ones   │
               └──── line_fifo ◄───────┘                                           └─► symmetry_converter ─► [reg] ─► symmetry_table ───┘
                 (one block RAM, 6 lanes)                                               symmetry option         representatives only
```

| module | role |
|---|---|
| `fast_pkg` | pixel and pattern types, the ring offset table, the `compression_e` option |
| `shift_window` | 7 rows of 7 pixel registers, all readable in parallel |
| `line_fifo` | six line delays side by side in one memory (block-RAM style, read-first) |
| `state_converter` | `SD`/`SB` from Eq. `I(x) <= I(p)-t` / `I(p)+t <= I(x)`, then selects the pattern with more ones |
| `symmetry_converter` | minimum of the 8 rotated/mirrored patterns |
| `corner_table` | the split corner table as logic (split build) |
| `symmetry_table` | the representative-only corner table (symmetry build) |
| `fast_corner_detector` | top: position counters, pipeline, result stream |

### The window and the line buffer

The camera pixel enters row 0 of the window at column 0, and each row shifts
one place to the right per accepted pixel. The pixel that falls off the right
end of row r (r = 0..5) goes into lane r of `line_fifo`. One line later that
lane returns it to column 0 of row r+1. Row r therefore holds image line
`y - r`, and column c holds image column `x - c`, where `(x, y)` is the newest
pixel. The window is the image turned by 180 degrees. The ring lookup in the top
accounts for this: ring point k at image offset `(dx, dy)` is read from
`win[3 - dy][3 - dx]`.

The line delay has to equal one image line exactly. The delay is made up of
seven window stages, the buffer's `depth` words and the buffer's registered read
port, so the top sets `depth = img_width - 8`. The buffer is a circular memory
with one pointer that is read and then written on every enabled clock. That
makes it a FIFO that is always exactly full, with no flags and no random access.
The depth is a run-time input, so one build serves any line width from 10 to
`MAX_WIDTH` pixels.

Ring numbering (`fast_pkg::ring_dx/ring_dy`): point 0 is directly above `p`,
and the points run clockwise. Point 4 is to the right of `p`, point 8 below it
and point 12 to its left. In pattern bit order this is `{S15, ..., S0}`.

### The converter

`state_converter` compares in 9-bit arithmetic so that `I(p) ± t` cannot wrap
around. It counts the ones in `SD` and in `SB` and passes on `SB` only when it
has strictly more ones. On a tie it passes on `SD`. A tie means neither pattern
has more than 8 ones, so neither can hold 9 contiguous ones, and the result is
the same either way. With `t = 0`, a ring pixel equal to `p` sets a bit in both
`SD` and `SB`. Use a threshold of 1 or more.

### The table

`corner_table` holds the segment-test patterns: those with at least `FAST_N`
contiguous ones around the circular ring. In logic this is an OR over the 16
start points of an AND of `FAST_N` consecutive bits.

* For N = 10 this is exactly 513 patterns. That is also the size of the
  published split table learned for FAST-10.
* For N = 9 it is 1,025 patterns. The learned FAST-9 table has 1,026 entries.
  The learned decision tree is not available, so this design uses the exact
  segment test.

The FAST-9 results can therefore differ from the learned detector on the rare
window that matches that one extra learned pattern.

`symmetry_table` is the table of the symmetry build. It holds only the
representatives of the corner patterns: 72 for FAST-10 and 144 for FAST-9. The
learned tables have more. Its input is compared against each listed
representative. The list is not written out by hand. A constant function builds
it at elaboration: it enumerates every pattern with `FAST_N` contiguous ones,
reduces each to its representative and keeps the distinct ones. A pattern that
is not a representative reads 0, which is harmless because only
representatives reach this table. The segment test is fully symmetric under
rotation and mirroring. So here the symmetry build always gives the same
corners as the split build, while with the learned FAST-9 table it changes a
small share of the results.

The mirror flips the ring about the axis through points 0 and 8, so bit i takes
point `(16 - i) mod 16`. A 90-degree rotation is `{p[3:0], p[15:4]}`.

## Interface and timing (`fast_corner_detector`)

| parameter | default | meaning |
|---|---|---|
| `MAX_WIDTH` | 640 | longest line; sets the line buffer to `MAX_WIDTH - 8` words of 48 bits |
| `MAX_HEIGHT` | 512 | most lines per frame (counter width only) |
| `FAST_N` | 10 | contiguous ring points needed, 9..16 |
| `COMPRESSION` | `COMP_SPLIT` | `COMP_SYMMETRY` adds the representative stage |

Inputs:

* `pix_valid` / `pix_data` / `frame_start`: one pixel per clock at most, in
  raster order. Pixels may arrive with idle clocks between them, and nothing
  moves on an idle clock. `frame_start` marks the frame's first pixel.
* `img_width` and `img_height` are run-time inputs and must stay constant
  within a frame.
* `threshold` is `t`.

Outputs:

* `out_valid`, `out_corner`, `out_bright`, `out_x`, `out_y`: one result per
  pixel that lies 3 or more pixels from every border, in raster order.
* `out_bright` says which split pattern was looked up.
* Border pixels produce no result.

Latency is counted from the clock edge that accepts pixel `(x+3, y+3)` to the
result for `(x, y)` appearing: 2 clocks with `COMP_SPLIT`, 3 with
`COMP_SYMMETRY`. An assertion in the top checks this. No flush is needed between
frames, because a window that still reaches into the previous frame produces no
result. Reset is asynchronous and active low. It clears the window, the
pipeline and the buffer pointer, but not the buffer memory.

At one pixel per clock a 640x480 frame with blanking takes 400,000 clocks,
which is 62.5 frames/s at 25 MHz. The default build synthesizes to about 490
flip-flop bits and a 632 x 48-bit memory, plus the table and converter logic.

## Where this design departs from the published one, or is its own choice

* The table contents are the exact segment test, not the learned libcvd tree
  (see above). The result is identical for FAST-10. For FAST-9 it can differ on
  the one extra learned pattern.
* Pixel width (8 bits), the stream interface, the run-time image size, the
  pipeline registers, the tie rule and the border rule are this design's own
  choices.
* The camera front end and the video (DVI) output of the original system are
  not included. The top exposes the pixel stream and the result stream as
  plain ports.
* The 26-bit three-valued "basic" table is not built. It is the baseline that
  the compression replaces.

## Verification

Each module has a self-checking testbench in `tb/`:

| testbench | what it checks |
|---|---|
| `tb_corner_table` | all 2^16 patterns for N = 10 and 9 against a run-length reference; entry counts 513 / 1,025 |
| `tb_symmetry_converter` | all 2^16 patterns against an index-by-index construction of the 8 transforms |
| `tb_symmetry_table` | all 2^16 patterns through converter and table, for N = 10 and 9, against the segment test; entry counts 72 / 144 |
| `tb_state_converter` | 20,000 random and arc-shaped rings, including `p` = 0 and 255 |
| `tb_line_fifo` | delay for depths 2, 5, 9, 16 with random enable gaps |
| `tb_shift_window` | every window register and buffer lane against a history model |
| `tb_fast_corner_detector` | default build: a 640x480 frame, a 512x512 frame, then 64x40 and 32x16 frames with idle clocks; every result, its position and its latency checked against a reference detector |
| `tb_fast_corner_detector_modes` | FAST-9 split and FAST-9 symmetry at 512x512, FAST-10 symmetry at 64x48 with idle clocks |

The end-to-end tests use synthetic images: a noisy background with bright and
dark rectangles and isolated dots. `fast_tb_pkg::ref_corner` applies the
three-valued segment test directly. It does not split the patterns, so it checks
the compression as well as the pipeline. `fast_stream_agent` drives the stream
and checks the results. It also counts the mechanisms that each test must
exercise: darker corners, brighter corners, idle clocks, border pixels and
changes of line width.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fast_pkg.sv tb/fast_tb_pkg.sv tb/tb_fast_corner_detector.sv \
    --top-module tb_fast_corner_detector -Mdir obj -o sim
./obj/sim
```

Each testbench prints `TB_RESULT checks=N failures=M`. The full-size test takes
about a second.
