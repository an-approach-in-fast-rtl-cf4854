# 100 Hz scan-rate converter for interlaced 4:1:1 video

A 50 Hz interlaced TV picture flickers on a large screen. This design doubles
the field rate. Each incoming field is shown twice at 100 Hz: first as a field
of the opposite parity, computed from the incoming field and the one before it,
then as received. On the way into field storage, isolated pixels that change
abruptly from one picture to the next are treated as noise and replaced. On the
way out, letterboxed (movie-mode) material can be stretched vertically to fill
the screen.

The design follows the scan-rate-conversion IC in *An Approach in Fast IC
Development for Digital Video Processing Based on FPGA-s*. That paper is about
design method. It names the IC's functions and describes the line memory and the
filter-window structures in detail, but it leaves most of the datapath and all
of the control open. The section "What comes from the paper and what does not"
says which parts are which.

## Data flow

```
               in_en (one pixel every 2nd clock)
 yi,ci,av_i,vs_i,interlc_i
        |
   in_timing ---- row/col/field start
        |
   st_window, one field stream: 3x3 window on the current field
        |
   stage B ----- reads the centre's address in bank "W" (still holding the
        |        previous same-parity picture) before overwriting it
        v
   nr_filter --> write {Y, C nibble} to the same address of bank "W"
                                           |
                     external field memory: bank 0 | bank 1
                                           |
   out_timing (restarted per input field, 2 output fields per input field)
        |
      vzoom (output row -> source row)
        |
   read addresses -> bank "Y" (field n, rows above/below)
                     bank "W" (field n-1, co-sited row, read ahead of the writes)
        |
   first output field : deint_interp(above, below, previous)   parity = not p(n)
   second output field: field n as stored                      parity = p(n)
        |
   yo, co, av_o, vs_o, interlc_o (100 Hz)
```

## Field storage and the 100 Hz timing

Timing is the hardest part to follow, and most of the design's own choices are
here.

**Banks.** There are two external field memories. Each holds one field of
720 x 288 pixels at 12 bits per pixel (8-bit Y plus the 4-bit 4:1:1 chroma
nibble), which is 2,488,320 bits. The banks swap roles at every input VS.
Bank **W** receives the field now arriving. Bank **Y** holds the field that
arrived before it.

**Write side.** The noise-reduction window is centred one line plus one pixel
behind the input. The centre pixel's address in bank W still holds the pixel
from two fields ago, the previous picture of the same parity. One more pixel
stage (stage B) holds the centre's 3 x 3 window and its address while that word
is read through port 1 of bank W. Noise reduction then compares against it, and
the result overwrites the same word. The stored fields are therefore the
noise-reduced ones, and the reduction is recursive.

**Read side.** During input field n+1, the output shows two fields at twice the
line rate:

| output field | content | reads |
|---|---|---|
| first half of the period | field n interpolated to the opposite parity | bank Y rows above/below (ports 0, 1); bank W co-sited row, field n-1 (port 0) |
| second half | field n as stored | bank Y (port 0) |

The interpolated field comes first because it needs field n-1, which sits in
bank W and is being overwritten by field n+1. The read side runs at twice the
input line rate, and its active picture starts after `OUT_V_START` output
lines. Every read of row *s* therefore happens before the write side reaches
row *s*, provided the input's first active line is at least
`(OUT_V_START - 1) / 2` lines after VS. The reads also stay ahead when vertical
expansion maps output rows to higher source rows. The second output field uses
only bank Y, which is not written during this period.

**Parity.** If field n is field A (even lines, `interlc = 0`), its missing lines
2s+1 lie between its rows s and s+1. If it is field B (odd lines), the missing
line 2s lies between rows s-1 and s. In both cases row s of field n-1 lies on
the missing line. At the top and bottom edge the outside row is replaced by the
edge row. The output `interlc_o` is the parity of the field being shown.

**Clocking.** There is one clock. `in_en` marks input pixels and must not be
high in two consecutive clocks, because the read-before-write needs the gap.
A 720-pixel line at 100 Hz needs the core clock at twice the 27 MHz input pixel
rate, so `in_en` is high on every second clock. `out_timing` restarts at each
input field start. This keeps input and output locked without a second clock
domain. If an input field is longer than two output fields (a 313-line field,
for instance), the output stays blank until the next VS.

## Line memory (`line_mem`)

A one-line delay has to read and write one location in every pixel cycle. There
is only one clock, and the RAM has one port. The memory is therefore DEPTH/2
words of twice the pixel width, and it works on pixel pairs. In the even cycle
of a pair it reads the word that holds the next two old pixels. In the odd
cycle it writes the two new pixels as one word. Because the read runs one pair
ahead of the write, a word is always read before it is overwritten. The output
is then exactly the input delayed by DEPTH enabled cycles, so pixel (x, y-1)
leaves while pixel (x, y) enters. DEPTH defaults to a full line of 864 clocks
(720 active + 144 blanking), so the delay also runs through blanking. The RAM
is not cleared at reset. For that reason `video_ic_top` ignores the window
centre until the line memories have been filled once.

## Filter windows (`spatial_window`, `st_window`)

`spatial_window` builds an H x W neighbourhood. The incoming line is the newest
row, and H-1 chained line memories supply the rows above it. Each row passes
through W-1 registers, so there are H*(W-1) registers. Tap `win[r][c]` has r = 0
for the oldest line and c = 0 for the oldest pixel. For a 3 x 3 window, tap
r*3+c+1 is Z1..Z9: Z1 at (x-1, y-1), Z5 at the centre, Z9 at (x+1, y+1).

`st_window` applies this to D field-aligned streams, giving D*(H-1) line
memories and D*H*(W-1) registers. The field delays themselves are external
memories, so the caller supplies one stream per field. With H = 1 the block is
a purely temporal window. The converter uses D = 1, H = W = 3 on the current
field. It needs only one pixel of the previous picture, the co-sited one, so it
reads that pixel straight from field memory. A second window stream would cost
one more line memory.

## Noise reduction (`nr_filter`)

The centre pixel is replaced by the previous picture's pixel when three things
hold: it differs from that pixel by more than `nr_th` (fast motion), it differs
by more than `nr_th` from each of its eight neighbours (an isolated
singularity), and it is not on the picture border. Because stored fields are
the filtered ones, a rule based on motion alone would lock a changed region to
its old content for ever. The isolation condition prevents that for real
picture changes, which are spatially coherent. A feature one pixel wide that
appears suddenly and stays can still be held back. `nr_fwd` pulses once for
every replaced pixel.

## Missing-line interpolation (`deint_interp`)

Two estimates are mixed linearly, with no switching between them:

- the median of (above, below, previous-field co-sited pixel);
- the vertical lowpass (above + below + 1) / 2.

The output is (median + lowpass + 1) / 2. The chroma nibble of an interpolated
pixel is taken from the "above" row.

## Vertical expansion (`vzoom`)

Output row j shows source row `first + floor(j * step / 256)`, clamped to the
last row. For 16:9 material letterboxed in 4:3, use `zoom_step = 192` (4/3
expansion) and `zoom_first = 36`. Rows are repeated (nearest row). The settings
are sampled at each input field start.

## Interfaces

`video_ic_top` ports:

- Input stream: `in_en`, `yi[7:0]`, `ci[7:0]`, `av_i`, `vs_i`, `interlc_i`.
  - The 4:1:1 chroma nibble is on `ci[7:4]`.
  - A field starts at the rising edge of VS.
  - AV is high for each active run; rows and columns are counted from AV.
- Configuration: `nr_en`, `nr_th`, `zoom_en`, `zoom_first`, `zoom_step`. These
  are plain ports, since no register map is defined.
- Output stream: `yo`, `co` (nibble on `[7:4]`), `av_o`, `vs_o`, `interlc_o`.
  - `vs_o` is high during the first line of each output field.
  - Active lines begin at line `OUT_V_START`; active pixels are the first 720
    clocks of each line.
  - All outputs are registered, three clocks after the raster counters.
- Field memories:
  - Write port: `fm_we[1:0]` (one per bank), `fm_waddr`, and `fm_wdata` as
    `{y, c}`.
  - Read ports: `fm_raddr[bank][port]` and `fm_rdata[bank][port]`, with data one
    clock after the address.
  - Address = row * 720 + column.
  - The memory must return the old word when a location is read and written in
    the same clock.

Parameters (defaults): `H_ACTIVE` 720, `H_TOTAL` 864, `V_ACTIVE` 288, `V_TOTAL`
312, `OUT_V_START` 20. Shared types are in `video_pkg`.

## What comes from the paper and what does not

From the paper:

- the functions (noise reduction that forwards the previous picture on fast
  motion, median plus lowpass interpolation mixed linearly, 100 Hz field
  doubling, vertical expansion);
- the signal set (Y, C, AV, VS, INTERLC; field A = even lines);
- the 27 MHz line of 720 + 144 clocks, and the 4:1:1 input;
- the 2,488,320-bit field and its external storage in two field memories;
- the double-width single-port line memory;
- the window structures and their register and line-memory counts.

This design's own choices:

- the bank organisation (random access, two read ports per bank);
- the order of the two output fields, and the read-ahead timing argument;
- running the core clock at twice the input pixel rate. The paper says its
  FPGA had only the 27 MHz clock, but does not say how its 100 Hz output was
  produced;
- the noise-reduction threshold, the isolation test and the border rule;
- equal weights in the interpolation mix;
- nearest-row expansion;
- 312 lines per field, `OUT_V_START`, the one-line output VS, and reset
  behaviour;
- chroma handling (nibble on C[7:4], no chroma filtering).

Left out:

- I2C configuration (no register map defined);
- the video decoder and display processor ICs around the converter;
- the external field memories themselves (`tb/field_mem_model.sv` is a
  behavioural model for simulation).

## Resources

Synthesis at default size gives about 340 word-level cells, 370 flip-flop bits
and 18,144 bits of on-chip RAM:

- two 432 x 16 line memories for the window;
- one 432 x 10 line memory for the chroma and AV delay.

This fits in the 12 embedded RAM blocks (2,048 bits each, 24,576 in all) of an
Altera FLEX 10K100A, the device the original was built on. Counted in whole
blocks in their 512 x 4 shape, the design needs 4 + 4 + 3 = 11.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_video_ic_top rtl/video_pkg.sv tb/tb_video_ic_top.sv
./obj_dir/Vtb_video_ic_top
```

- `tb_video_ic_top` runs the whole converter on a 16 x 8 picture for six
  fields.
- `tb_video_ic_full` runs it at the default size (720 x 288, four fields plus a
  blank one); it takes about 15 s.
- Both use `video_ic_env`. It generates a moving ramp picture with isolated
  spikes, computes the stored fields and every output pixel independently, and
  checks each active output pixel, its chroma and its parity.
- The environment also checks:
  - two output fields per input field, each with a full active picture;
  - the number of pixels replaced by noise reduction;
  - that each mechanism occurred: replacement, both output parities, zoom on
    and off, a zoom switch, and edge-row clamping at top and bottom.

The block testbenches cover:

- `line_mem`: exact delay under an irregular enable;
- `spatial_window`, `st_window`: every tap, with a short line and with the
  default 864-clock line, and the temporal-only shape;
- `nr_filter`, `deint_interp`, `vzoom`: random and corner inputs;
- `in_timing`, `out_timing`: a small raster and the default 864 x 312 raster,
  including an input field longer than two output fields.
