# Approximate bilateral filter with clock gating

A bilateral filter removes noise but keeps edges. Each output pixel is a
weighted average of its neighbours. A neighbour's weight is the product of
two factors:

- a **spatial** factor that falls off with distance from the centre;
- a **range** factor that falls off with the neighbour's intensity
  difference from the centre.

Pixels on the other side of an edge differ strongly in intensity, so they
get almost no weight and the edge stays sharp.

```
            sum_i  Gs(|x-i|) * Gr(|I(x)-I(i)|) * I(i)
  I'(x) =  -------------------------------------------
            sum_i  Gs(|x-i|) * Gr(|I(x)-I(i)|)

  Gs = exp(-d^2 / 2 sigma_s^2)       Gr = exp(-D^2 / 2 sigma_r^2)
```

The exponentials are what make bilateral filters costly in hardware. This
design makes three changes to keep the hardware small and low-power:

1. **Cheaper weights.** Both Gaussians use the approximation
   `exp(-x) ~ 1/(1+x)`, so each weight becomes `S/(S+v)`, where
   `S = 2 sigma^2` and `v` is the squared distance or squared intensity
   difference. No exponential unit is needed. The weights are tabulated, and
   the tables are rebuilt in hardware whenever sigma changes.
2. **Parallel pipeline.** 25 processing elements (PEs), one per tap of a
   5 x 5 window, work in parallel. The design is fully pipelined and produces
   one filtered pixel per clock. Set `LANES` above 1 to filter that many
   adjacent pixels per clock instead.
3. **Clock gating.** Latch-based clock gates stop the clock of every part that
   has nothing to do.

The design is written in SystemVerilog for an FPGA-style streaming flow. It
follows the block structure of the paper *Low-Power Design of Approximate
Bilateral Filters for Efficient Image Denoising on FPGAs Using Clock Gating*,
which gives that structure and the approximation. The paper gives no widths,
interface, timing or sizes: those are this design's choices, marked as such
below and at the top of each source file.

## Datapath

```
 in_pixel ──► window buffer ──► 25 × PE ──► MAC adder tree ──► divider ──► output unit ──► out_pixel
 (raster)    4 line FIFOs +     |D|, LUT,    Σw, Σw·I           Σw·I / Σw    + (x, y) tag
             5×5 registers      Ws·Wr, W·I
                   ▲               ▲
 control unit ─────┘   weight generator (spatial table + 25 range LUTs)
   ↳ clock enables for 4 clock gates
```

| stage | module | clocks | what happens |
|---|---|---|---|
| window | `bf_window_buffer` | 1 | the new pixel enters; the 5 × 5 window around (x-2, y-2) is complete |
| PE 1 | `bf_pe` | 1 | D = centre − neighbour (9-bit signed) |
| PE 2 | | 1 | \|D\| |
| PE 3 | `bf_range_lut` | 1 | Wr = LUT[\|D\|] (synchronous read) |
| PE 4 | | 1 | W = round(Ws · Wr / 256) |
| PE 5 | | 1 | W · I |
| MAC | `bf_mac` | 2 | sum of the five taps of each row, then sum of the five rows |
| divide | `bf_divider` | 9 | rounded numerator, then one quotient bit per stage |
| output | `bf_output_unit` | 1 | result registered with its coordinates |

The pixel that completes a window is accepted at a clock edge. The filtered
pixel for that window is visible after the 17th edge that follows. There is a
new window every clock if the input supplies one.

### Lanes

`LANES` (default 1) sets how many horizontally adjacent pixels the design
takes per clock. It also sets how many filtered pixels it produces per clock.

- The window buffer is replicated in width only:
  - each register row is `4 + LANES` pixels wide and shifts by `LANES`;
  - each line FIFO is `LANES` pixels wide and `IMG_W / LANES` deep.
- Lane `l` reads its 5 × 5 window starting at column `l` of the rows.
- Each lane has its own PE array, MAC unit and divider.
- The weight generator, its tables and the control unit are shared: every
  lane's PEs receive the same LUT writes.

`IMG_W` must be a multiple of `LANES`. The latency is the same for every
lane.

### Number formats

Everything is unsigned fixed point. `bf_pkg` derives the widths:

| quantity | bits | range |
|---|---|---|
| pixel I | 8 | 0..255 |
| weight Ws, Wr, W | 8 | 0..255, where 255 means 1.0 |
| W · I | 16 | |
| Σ W over 25 taps | 13 | ≤ 6375 |
| Σ W·I over 25 taps | 21 | ≤ 1 625 625 |

A table entry for squared argument `v` and setting `S = 2 sigma^2` is

```
w(v) = floor( (255·S + floor((S+v)/2)) / (S+v) )      (S = 0 is treated as 1)
```

This value is 255 at v = 0 and falls off as 1/(1+v/S). The combined weight is
`W = floor((Ws·Wr + 128) / 256)`, and the output is
`floor((ΣW·I + floor(ΣW/2)) / ΣW)`, rounded to nearest. The centre tap always
has Ws = Wr = 255, so W = 254. The divisor therefore never becomes zero. The
quotient always fits in 8 bits, because the result is a weighted average of
8-bit pixels.

## Window buffer

`bf_window_buffer` consists of four `bf_line_fifo` line delays in a chain and
five register rows. With one lane, each row holds five registers. The
incoming pixel enters the bottom row. Each FIFO output enters the row above.

A line FIFO is a RAM of `IMG_W/LANES − 1` words with one read-before-write
pointer, followed by an output register. Together they delay the stream by exactly one
line, as seen by the next shift.

Taps are numbered row-major from the top-left: tap 12 is the centre and
tap 24 is the newest pixel. The buffer shifts only when a pixel (or a group
of `LANES` pixels) is accepted. Its clock is gated off in every other
cycle.

## Weight tables and run-time settings

The filter strength is set at run time through `cfg_in` (`bf_cfg_t`):

- `s2_spatial` = 2·sigma_s²
- `s2_range` = 2·sigma_r²
- `ksize`: 3 × 3 or 5 × 5 kernel

A pulse on `cfg_we` stores the settings and requests a rebuild. The rebuild
then runs as follows:

1. The control unit stops accepting pixels (`in_ready` low, `cfg_busy` high).
2. It waits until the processing pipeline is empty, so no window is ever
   filtered with a half-written table.
3. It starts `bf_weight_gen`.
4. The generator computes 9 spatial entries (d² = 0..8) into registers. It
   then computes 256 range entries (D = 0..255, v = D²). Each range entry is
   broadcast to the private range LUT of all 25 PEs. Each entry takes 10
   clocks: one setup clock, eight restoring-division clocks and one write
   clock. The generator stays busy for 2651 clocks.

In 3 × 3 mode, the 16 outer taps get spatial weight 0 and their `tap_en` bit
goes low. The MAC unit then ignores those taps, so their PEs can be stopped.

Reset performs the same rebuild with these defaults:

- 2·sigma_s² = 8
- 2·sigma_r² = 800
- 5 × 5 kernel

The filter therefore works without any configuration. The defaults are this
design's choice.

## Clock gating

Each gated domain has a `bf_clock_gate`. This is a latch that is transparent
while `clk` is low, followed by an AND gate. The gated clock is therefore
glitch-free, and a flop on it behaves like a flop with a clock enable. On an
FPGA, the gate maps to a clock-buffer enable. `test_en` opens all gates.

| domain | enable (from `bf_control` / `bf_top`) | stopped when |
|---|---|---|
| window buffer | a pixel is accepted | no input pixel |
| pipeline (inner 9 PEs, MAC, divider, output unit) | a window enters, or a valid window or output is still inside | pipeline empty |
| outer 16 PEs | pipeline enable and 5 × 5 kernel | pipeline empty, or 3 × 3 kernel in force |
| weight generator and LUT write port | rebuild starts or runs | no rebuild |

The pipeline registers have no reset and need none. Validity travels as a tag
(valid bit and coordinates) through a delay line in the output unit. Stale
data inside a stopped PE only ever reaches the MAC at the same time as an
invalid tag. The kernel size changes only at a rebuild, while the pipeline is
empty.

## Interface (`bf_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `test_en` | in | 1 | force all clock gates open |
| `cfg_we`, `cfg_in` | in | 1, 33 | load settings (`bf_cfg_t`) and rebuild the tables |
| `cfg_busy` | out | 1 | a rebuild is pending or running; the input is stalled |
| `in_valid`, `in_ready` | in, out | 1 | pixel handshake; a pixel moves when both are high |
| `in_sof` | in | 1 | first pixel of a frame (the position also wraps after `IMG_W × IMG_H` pixels) |
| `in_pixel` | in | 8 × LANES | pixels in raster order; lane 0 is leftmost |
| `out_valid` | out | LANES | one-cycle pulse per filtered pixel, one bit per lane; there is no back-pressure |
| `out_pixel` | out | 8 × LANES | filtered pixels |
| `out_x`, `out_y` | out | log2 W, log2 H | centre of lane 0's pixel (lane `l` is at `out_x + l`; `out_x` wraps modulo 2^width when lane 0 lies off the image) |
| `frame_done` | out | 1 | high with the last filtered pixel of a frame |

Parameters:

- `IMG_W` and `IMG_H`: default 512 × 512, the usual size of standard test
  images such as Lena.
- `LANES`: pixels per clock, default 1.

Border pixels are not produced. Only pixels whose whole 5 × 5 window lies
inside the image are output, which gives `(IMG_W − 4) × (IMG_H − 4)` pixels
per frame. This holds in 3 × 3 mode too. With the input streaming without
gaps, a frame takes `IMG_W × IMG_H / LANES` clocks.

Synthesis size at the defaults, from a generic coarse synthesis:

- about 2 800 flip-flop bits;
- 68 800 memory bits: 25 range LUTs of 256 × 8 bits and four line FIFOs of
  511 × 8 bits;
- 4 clock-gate latches;
- no DSP-style multipliers beyond the 25 Ws·Wr and 25 W·I products.

## Files

| file | content |
|---|---|
| `rtl/bf_pkg.sv` | widths, types (`pixel_t`, `weight_t`, `bf_cfg_t`, `ksize_e`), tap geometry functions |
| `rtl/bf_top.sv` | top level |
| `rtl/bf_control.sv` | position counters, window-valid tags, settings, rebuild sequencing, stall, clock enables |
| `rtl/bf_clock_gate.sv` | latch + AND clock gate |
| `rtl/bf_window_buffer.sv`, `rtl/bf_line_fifo.sv` | 5 × 5 sliding window |
| `rtl/bf_weight_gen.sv` | table generator (approximation unit) |
| `rtl/bf_pe.sv`, `rtl/bf_range_lut.sv` | processing element and its range LUT |
| `rtl/bf_mac.sv` | adder tree |
| `rtl/bf_divider.sv` | pipelined divider |
| `rtl/bf_output_unit.sv` | tag delay line and output register |
| `tb/*_tb.sv` | one self-checking testbench per module, plus two for the top |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each also has a cycle watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/bf_pkg.sv tb/bf_top_tb.sv --top-module bf_top_tb -o sim
./obj_dir/sim
```

- `bf_top_tb` runs a 16 × 12 image through four frames, with two lanes. Every output pixel
  and its latency are checked against a reference model written in the
  testbench. The model uses the formulas above, with direct integer division
  for the tables.
  - Frame 1: reset settings, 5 × 5 kernel, random input gaps.
  - Frame 2: 3 × 3 kernel. The settings are written while the previous frame
    is still in flight. The input has no gaps, and the test checks
    `LANES` pixels per clock and the 17-clock latency.
  - Frame 3: the settings are rewritten in mid-frame, so the input stalls for
    a rebuild.
  - Frame 4: `test_en` is high.

  The testbench counts each mechanism and fails if one never occurs: the
  rebuilds, the stall, each of the clock gates stopping, both kernel sizes,
  the test enable and `frame_done`.

  It also prints, per frame, the PSNR (`10·log10(255²/MSE)`) of the noisy
  input and of the filtered output against the noise-free image, which has
  two step edges and uniform noise of ±20. Filtering must raise the PSNR. At
  512 × 512 with the reset settings, it goes from about 26.7 dB to about
  36.5 dB; with the 3 × 3 kernel, to about 31 dB.
- `bf_top_full_tb` runs the same test with `bf_top` at its defaults,
  512 × 512 and one lane. This is about 1 M input pixels and 2 M checks, and takes a few
  seconds in Verilator.
- The module testbenches check their blocks against independent models:
  - the line delay and the window contents of every lane at every position
    (three lanes);
  - every table entry and the rebuild time;
  - the PE arithmetic, including the extreme differences;
  - the adder tree with tap masks;
  - 1000 divisions, including the extremes;
  - the clock gate's edge counts and glitch-freedom;
  - the control unit's window tags, wrap, restart and stall (two lanes);
  - the output unit's alignment and `frame_done` (two lanes).

## Where this departs from the paper, and what is left out

- **Widths, interface, handshake, sizes.** The paper gives none of these: the
  8-bit weight format, the valid/ready handshake, the border policy, the
  reset defaults and the 512 × 512 default image size are all choices made
  here. The paper draws the 5 × 5 window (four line FIFOs, five register rows).
- **Approximation.** This design uses `1/(1+x)`. The paper also mentions
  piecewise-linear approximations in general terms, but `1/(1+x)` is the only
  model it writes out.
- **Where the tables come from.** The paper does not say how the tables are
  filled. Here a sequential generator computes them in hardware. A host could
  load them instead, but this design has no port for that.
- **Accumulation.** The paper lists accumulation as a PE stage, but its
  drawing places the MACs after the PE array. The sum is done once, in the
  shared adder tree, after the PE array.
- **Gated domains.** Which domains are gated, and by which enables, is this
  design's decision. The outer-ring gate in 3 × 3 mode applies the paper's
  "disable idle modules" idea to the kernel-size switch.
- **Parallelism.** The paper says more processing elements let more pixels
  be processed at once, but gives no number. `LANES` is this design's
  version of that scaling. Its default of 1 matches the single PE array the
  paper draws.
- **Not included.**
  - The paper's baseline, an exact filter with an exponential unit. It is a
    baseline only.
  - The measured power, latency, PSNR and resource figures. Those are FPGA
    measurements.
  - Adaptive choice of sigma from the noise level. The paper names it as
    future work; here the settings come from outside.
