# Direct Binary Search halftoning engine

Halftoning turns an 8-bit gray image into a 1-bit image, meant to look the
same to a viewer once the eye has blurred it. Direct Binary Search (DBS) gives
the best-looking halftones of the common methods, but it is slow. It starts from
any binary image, often random noise. It then visits every pixel and tries ten
states: leave the pixel alone, toggle it, or swap it with one of its eight
neighbours. It keeps the state that lowers a perceptual error the most. Passes
over the image repeat until one pass changes nothing.

This RTL implements the fast ("quick") form of DBS in hardware. It does one
pixel per clock: the nine possible moves are costed in parallel, and the chosen
move is written back in the same clock. A 256×256 image that needs 14 passes
takes 14 × 65,536 clocks of search. Loading, a short flush and the output stream
add about 133,000 clocks.

## The arithmetic

### What is minimised

Let `f` be the gray image (0..255) and `g` the halftone (0/1). The error image
is

    e[m,n] = 255*g[m,n] - f[m,n]        (gray units, -255..255)

The eye is modelled by a low-pass filter `p`. The perceived error energy is
`|| p ** e ||^2`. Quick DBS never filters the image during the search. It keeps
one table instead:

    c_ep = e ** c_pp

Here `c_pp` is the autocorrelation of the eye filter, a 13×13 mask. It is
called the visual model error table, and this design stores it as `c_ep`.
Changing pixel `(m0,n0)` by `A0` and pixel `(m1,n1)` by `A1` changes the error
energy by

    dE = (A0² + A1²)·c_pp[0,0] + 2·A0·A1·c_pp[m1-m0, n1-n0]
         + 2·A0·c_ep[m0,n0] + 2·A1·c_ep[m1,n1]

After an accepted move, the table is corrected by

    c_ep[m,n] += A0·c_pp[m-m0, n-n0] + A1·c_pp[m-m1, n-n1]

A toggle has `A1 = 0`. A swap has `A1 = -A0`. `A0` is +255 when the pixel is
0, and -255 when it is 1.

### Fixed point

- **The mask.** Each mask value is multiplied by 2^12 and truncated to an
  integer (a "level shift"). Its largest value, 0.042274635646005, becomes 173.
  Every product with a mask value is built from shifted copies of the other
  operand, one per set bit of the coefficient (`dbs_pkg::shift_mult`).
  Coefficients are constants, so no multiplier is needed. Taps that truncate to
  0 cost nothing.
- **The move cost.** The hardware divides `dE` by 255, which does not change
  its sign or the order of the candidates:

      toggle:        255·C0 + 2·a0·c_ep0
      swap with k:   510·(C0 − Ck) + 2·a0·(c_ep0 − c_ep_k)

  Here `a0 = ±1` and `C0 = 173`. The factors 255 and 510 are `(x<<8)−x` and
  `(x<<9)−(x<<1)`. The correction window uses `255·c_pp = (c_pp<<8) − c_pp`.
- **Word widths.** The line buffer stores 12-bit errors. Table words are 25-bit
  signed. With this design's mask the table stays within ±816,255, so it would
  fit in 21 bits. The 25 bits leave room for a mask with a larger sum.

All of this arithmetic is exact in integers. The hardware therefore matches a
plain software implementation of the same formulas bit for bit: same output
image, same number of passes, same number of moves. The testbenches check
exactly that.

### The mask values

The architecture fixes the size of the mask (13×13), its 12-bit scaling and its
peak value. It does not print the other coefficients. This design uses a
circular Gaussian with that peak:

    c_pp[m,n] = floor( 4096 · 0.042274635646005 · exp(−(m² + n²)/6) ),  |m|,|n| ≤ 6

One quadrant of it reads:

    173 146 88 38 12 2 0
    146 124 75 32 10 2 0
     88  75 45 19  6 1 0
     38  32 19  8  2 0 0
     12  10  6  2  0 0 0
      2   2  1  0  0 0 0
      0   0  0  0  0 0 0

72 of the 169 taps are zero. A mask derived from a real eye model (for
instance Näsänen's) can replace it: edit `CPP_Q` in `rtl/dbs_pkg.sv`. The mask
must be symmetric in `m` and in `n`, and its values must fit in 8 bits. Every
consumer, including the testbench reference, reads the mask through
`dbs_pkg::cpp()`.

## Data flow

    rb_Q,in_en ──► cep_builder ──────────────► fcep_mem (c_ep, 25 b/pixel)
       │           (e = 255g − f,                 ▲   │ 3×3 read
       │            err_line_buffer,              │   ▼
       │            hvs_mask_conv)         15×15 add  dbs_core ◄── g_mem 3×3
       └─────────────────────────────────► g_mem (1 b/pixel) ◄── flips
                                               │
                                               └──► data, dataout_en

### 1. Load and table build (`cep_builder`, `err_line_buffer`, `hvs_mask_conv`)

Pixels arrive in raster order. Each one is a 9-bit word `rb_Q`: bit 8 is the
initial halftone bit and bits 7:0 the gray level. The halftone bit goes straight
into `g_mem`. The error `255·g − f` goes into a line buffer, and the gray value
is not kept anywhere.

The line buffer holds 12 × 256 + 12 = 3,084 twelve-bit words. Folded into
rows of 256, these are the previous 12 image lines plus the first 12 pixels of
the current 13-pixel window row. The incoming error is the 13th value of that
row and is used directly, so it needs no storage. Together they form the 13×13
window around a pixel six rows and six columns back.

On each new pixel every word moves one place along the raster order. The window
therefore slides one pixel right, wraps onto the next line at the end of a row,
and the oldest word drops out. Only 3,084 of the 65,536 errors are ever held.
In the RTL the folded rows are a single delay line with 169 taps: tap `(r,c)`
is the error pushed `(12−r)·256 + (12−c)` pixels earlier.

The window's centre lies 6 rows and 6 columns behind the incoming pixel. Once
that centre is inside the image, the 169 taps are summed in one combinational
pass, in the same clock as the push.
The result is that pixel's `c_ep`, written to `fcep_mem`. Taps outside the
image (rows above or below it, and columns that wrapped from the previous line)
are forced to zero. This is zero padding.

After the last pixel, the builder feeds 6·256+6 = 1,542 zero errors on its own,
which brings out the last six rows of the table. It then signals done.

### 2. Search passes (`dbs_core`, `g_mem`, `fcep_mem`)

A pixel counter walks the image in raster order, one pixel per clock. In each
clock:

- `g_mem` and `fcep_mem` present the 3×3 halftone bits, the inside-image flags
  and the table words around the pixel.
- `dbs_core` costs the toggle and the eight swaps at once. A swap is a
  candidate only if the neighbour is inside the image and holds the opposite
  bit. The lowest cost wins. On a tie, the toggle goes first, then the
  neighbours in raster order. The move is accepted only if its cost is
  negative.
- On acceptance, the same clock edge flips one or two bits in `g_mem` and adds
  a 15×15 correction window to `fcep_mem`. The window covers the 13×13 mask
  around the pixel, plus the one around a swap partner up to one pixel away.
  The next pixel already sees the new values, so there are no hazards and no
  stalls.

At the end of a pass, the search stops if no move was accepted during it.
Otherwise a new pass starts on the very next clock.

### 3. Output

`finish` rises and stays high. The halftone then streams out of `g_mem` in
raster order: one bit per clock on `data`, with `dataout_en` high for 65,536
consecutive clocks. The first pixel of a new image may follow any time after
the last output bit; pixels offered earlier are ignored. That first pixel
clears `finish` and starts the whole sequence again.

## Interface of `dbs`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `reset` | in | 1 | asynchronous reset, active low |
| `rb_Q` | in | 9 | `{initial halftone bit, gray[7:0]}` |
| `in_en` | in | 1 | `rb_Q` holds a pixel; gaps are allowed |
| `finish` | out | 1 | search complete; high from the end of the search until the next image starts |
| `dataout_en` | out | 1 | `data` is valid |
| `data` | out | 1 | halftone pixel, raster order |
| `iter_count` | out | 8 | passes made, counting the final pass with no changes |
| `update_count` | out | 32 | moves accepted (toggles and swaps) |
| `dbs_count` | out | 17 | output pixels sent so far |

The three counters are for monitoring. Their widths and reset behaviour are this design's choice.

Parameters are `IMG_W` and `IMG_H`, both 256 by default. Other sizes work: the
testbenches also run 20×18, 24×16 and 32×24. Both should be at least 2.
Memories hold exactly `IMG_W·IMG_H` words.

Timing, counted in clock edges after the edge that takes the last pixel:

- the table is complete after 6·IMG_W + 6;
- the first pass starts after 6·IMG_W + 7;
- each pass takes IMG_W·IMG_H;
- `finish` is set at 6·IMG_W + 7 + passes·IMG_W·IMG_H.

The output bits follow on consecutive clocks.

## Memories, and where this departs from a buildable chip

The search reads nine table words and writes up to 225 of them in the same
clock. The architecture calls for exactly this: the table and the halftone are
updated together, in parallel. It does not say how a memory reaches that
bandwidth. Here both memories are plain arrays updated from `always_ff`:

- `g_mem` is 65,536 × 1 bit;
- `fcep_mem` is 65,536 × 25 bits.

That is correct and simulates quickly. In silicon, however, it means 1.7 Mbit of
flip-flops with a very wide update path, and synthesis tools take minutes on
it. A real chip would put the table in SRAM banks and cache a band of about
16 rows in registers. Only that band is touched while the scan moves through
the image. Such a cache is not part of this RTL.

The line buffer is written as a shifting delay line, about 37,000 flip-flop
bits. That is the plainest form of the structure. An implementation would
usually keep the 12 rows in small RAMs, with the read and write pointers
advancing instead of the data.

The table build is also one long combinational path: 169 shift-and-add taps and
the adder tree. Likewise, the decide-and-update path of the search is a single
clock. This matches the one-pixel-per-clock behaviour. For a high clock rate,
both paths would need pipelining, and pipelining the search needs forwarding
between neighbouring pixels.

## What follows the architecture and what is this design's own

These follow the architecture:

- the pin set and its 9-bit merged input;
- the 13×13 mask with 12-bit scaling and shift-and-add instead of multipliers;
- the 12 × 256 line buffer plus a 12-word register, used to build the table
  without storing the gray image;
- the 25-bit table in a memory named after its shared use for `f` and `c_ep`;
- the 1-bit halftone memory;
- the parallel evaluation of the ten states;
- the simultaneous update of halftone and table;
- the stop when a pass no longer lowers the cost.

These are this design's own choices:

- the mask coefficients, as above;
- gray-unit scaling of the error (`e = 255·g − f`);
- zero padding at the borders;
- the tie rule and raster visiting order;
- the 15×15 correction window;
- the flip-flop memories;
- the line buffer written as one tapped delay line rather than as a 2-D
  array of rows (same storage, same window);
- the 1,542-cycle flush;
- the reset behaviour: only control state is reset, memories are not;
- the `finish` protocol and the status counters.

## Files

| File | Contents |
|---|---|
| `rtl/dbs_pkg.sv` | widths, mask table, `cpp()`, `shift_mult()` |
| `rtl/hvs_mask_conv.sv` | 13×13 shift-and-add mask sum |
| `rtl/err_line_buffer.sv` | 3,084-word line buffer tapped as a 13×13 window |
| `rtl/cep_builder.sv` | error computation, padding, flush, table writes |
| `rtl/g_mem.sv` | halftone memory |
| `rtl/fcep_mem.sv` | error-table memory with 3×3 read and 15×15 update |
| `rtl/dbs_core.sv` | nine move costs, selection, correction window |
| `rtl/dbs.sv` | top level and pass/output control |
| `tb/dbs_ref_pkg.sv` | software quick DBS using the unscaled formulas in 64-bit integers |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_dbs_full.sv` | one complete 256×256 run at default parameters |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. A
watchdog ends a run that hangs. With Verilator 5, from the directory that holds
`rtl/` and `tb/`:

    verilator --binary --timing --assert \
        rtl/dbs_pkg.sv tb/dbs_ref_pkg.sv rtl/hvs_mask_conv.sv rtl/err_line_buffer.sv \
        rtl/cep_builder.sv rtl/g_mem.sv rtl/fcep_mem.sv rtl/dbs_core.sv rtl/dbs.sv \
        tb/tb_dbs_full.sv --top-module tb_dbs_full -o tb
    ./obj_dir/tb

Replace `tb_dbs_full` with any other testbench name. Add `-Wno-fatal` if your
Verilator treats width warnings in the testbenches as errors.

What the testbenches cover:

- **`tb_dbs`** (32×24) sends two images, the second after `finish` and without
  a reset, with random gaps in `in_en`. It checks for each image:
  - every output bit, the pass count and the move count, against the
    reference;
  - the exact latency;
  - an unbroken output stream;
  - that input gaps, the flush, accepted toggles, accepted swaps, multi-pass
    runs and border pixels all occurred.
- **`tb_dbs_full`** (256×256) feeds a synthetic scene (a ramp, a bright disc
  and a dark band) with a random initial halftone. The run takes 17 passes and
  144,405 moves, and matches the reference exactly. It simulates in a few
  seconds.
- **The unit testbenches** check each module on its own:
  - the mask sum against multiply-accumulate;
  - the line-buffer window against the pushed history;
  - every table entry against direct convolution;
  - the memories against software copies;
  - `dbs_core` against the unscaled cost formula, over 3,000 random
    neighbourhoods including borders.
