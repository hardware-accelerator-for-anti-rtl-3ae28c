# Parallel Wu anti-aliased line accelerator

A line drawn with whole pixels has jagged steps. Xiaolin Wu's algorithm
smooths it. At each step along the line's major axis it lights the two
pixels that straddle the ideal line. It splits a fixed intensity between
them in proportion to how close each one is. In hardware the algorithm is
cheap, at one pixel pair per clock. But it is serial, so a line of L steps
takes about L clocks.

This design removes the serial bottleneck by cutting the line into `NCORES`
pieces of equal length (10 by default). The cut points are pixels of the
line's Bresenham path. All pieces are then drawn at the same time, each on
its own Wu core with its own result memory. A 480-step line takes 500 clocks
on one core and 119 clocks on ten, splitting included.

The architecture is the one described in the paper *Hardware accelerator for
anti-aliasing Wu's line algorithm using FPGA* (Zynq-7000, HLS cores on
AXI4-Lite, up to ten cores). The RTL is written from scratch from that
description. Every detail the paper leaves open is this design's own choice.
Those details include widths, fixed-point format, register map and memory
size. The most important departures are listed under
[Departures from the published system](#departures-from-the-published-system).

## Block structure

```
       line_start, line_p0, line_p1, line_ncores      line_busy, line_done
                          |                                  ^
                   +------v-------+                          |
                   | line_splitter|--seg_pt[0..10]--+   dispatcher (in top)
                   +--------------+                 |        ^
                                                    v        | idle[c]
   s_axi_req/rsp[c] <--> +-------------------------------------+  x NCORES
   interrupt[c]   <----  | wu_core_axil ("Xiaolin" peripheral) |
                         |   AXI4-Lite regs --> wu_line_core   |
                         |                      | pair/clock   |
                         |                 pixel_pair_ram      |
                         +-------------------------------------+
```

| file | what it is |
|---|---|
| `rtl/wu_pkg.sv` | widths, `pixel_t` / `pixel_pair_t`, AXI4-Lite structs, register map |
| `rtl/wu_line_core.sv` | Wu's algorithm for one segment, one pixel pair per clock |
| `rtl/pixel_pair_ram.sv` | per-core result memory, 1024 pairs |
| `rtl/wu_core_axil.sv` | one core as an AXI4-Lite peripheral with interrupt |
| `rtl/seq_divider.sv` | restoring divider used by the splitter |
| `rtl/line_splitter.sv` | equal-length split on the Bresenham path |
| `rtl/wu_accel_top.sv` | top: splitter, `NCORES` peripherals, dispatcher |

## Drawing one segment: `wu_line_core`

Inputs are two endpoints in unsigned fixed point 12.4: 12 pixel bits and 4
sub-pixel bits. The core does this:

1. **Normalise.** If |dy| > |dx| the line is *steep*. x and y are then swapped
   internally and swapped back on output. If the first endpoint lies after
   the last one on the major axis, the two are exchanged. After this the
   major axis is x and runs upward, and dx ≥ |dy|.
2. **Gradient.** The core computes `gradient = |dy|/dx` as an unsigned 1.16
   fixed-point number. A restoring divider produces one bit per clock
   (16 clocks). The integer bit is 1 only when |dy| = dx. The sign of dy is
   applied afterwards. The result is truncated.
3. **Endpoints.** The two endpoint pairs are emitted first, in the order Wu's
   algorithm plots them. For each endpoint (x, y):
   - `xend = round(x)` (halves round up)
   - `yend = y + gradient·(xend − x)`
   - `xgap` = 1 − frac(x + ½) for the first endpoint, frac(x + ½) for the last
   - A = (xend, ⌊yend⌋, (255 − f)·xgap), B = (xend, ⌊yend⌋+1, f·xgap),
     where f is the top 8 bits of yend's fraction.

   Inside, x carries one more fraction bit than the input so that the ½ is
   exact. For whole-pixel endpoints xgap is ½ and f is 0, so pixel A gets
   127 and pixel B gets 0.
4. **Interior.** `intery` is a signed fixed-point value that starts at
   `yend + gradient` of the first endpoint. For x = xend₁+1 … xend₂−1 the core emits one pair per clock:
   - A = (x, ⌊intery⌋, 255 − f)
   - B = (x, ⌊intery⌋+1, f)

   f is the top 8 bits of intery's fraction. It then adds the gradient to
   intery.

The two shares of an interior pair always add up to 255, so the line's
brightness does not vary along its length. For the example line (0,0)–(6,1)
the line passes halfway between two pixels at x = 3, and the core gives
128/127.

Output: `out_valid`, `out_idx` (pair index), `out_pair`. A pair is two
`pixel_t` of `{x[11:0], y[11:0], intensity[7:0]}`. Pair order is first
endpoint, last endpoint, then the interior from xend₁+1 upward. With
dx = xend₂ − xend₁ a run produces dx+1 pairs, and never fewer than 2. When
both endpoints round to the same column both pairs are in that column. If
dx is 0 before rounding the gradient is 0.

Timing: `done` is high `FRAC_W + 2 + max(dx,1)` clock edges after the edge
that takes `start`. That is 18 + dx with the default 16 fraction bits.

Accuracy: the gradient is truncated to 16 fraction bits. Over 4095 steps the
accumulated error stays below 4095·2⁻¹⁶ ≈ 0.06 pixel. The error is always
toward zero, so the pair stays between the endpoints' rows.

## Splitting a line without walking it: `line_splitter`

The hardest part to follow is how the split avoids a serial walk.

Let L = max(|dx|,|dy|) be the line's length in steps and N the number of
segments (1 … NCORES, given with each line). Boundary k (k = 0 … N) must be
the Bresenham pixel after s_k = ⌈k·L/N⌉ steps. So segment lengths differ by
at most one step. Segment k is `seg_pt[k] → seg_pt[k+1]`, and neighbours
share their joint pixel. Boundaries past N repeat the last endpoint.

Walking the Bresenham line to find those pixels would cost L clocks, as much
as drawing the line on one core. Instead the splitter uses a closed form for
the all-octant Bresenham iteration. That iteration keeps `err = dx + dy`
with dy = −|dy|, and on each step tests `2·err ≥ dy` and `2·err ≤ dx`. The
major coordinate moves on every step. After s steps the minor coordinate has
moved

    m(s) = floor((2·s·amin + amaj) / (2·amaj))

that is, s·amin/amaj rounded half up. Here amaj and amin are the absolute
major and minor extents. The testbench checks this identity against the
step-by-step iteration on several hundred random lines. It includes
full-range and very short lines.

The splitter evaluates m(s_k) for k = 1 … N with additions only, after
two divisions:

- `q, r = divmod(L, N)`: 12 clocks. Each step `s_k − s_(k−1)` is q or
  q+1. A counter `t = k·r − N·⌈k·r/N⌉`, kept in (−N, 0],
  chooses which. This is itself a small Bresenham-style DDA.
- `(Qq, Rq) = divmod(q·amin, amaj)`: 24 clocks. `(Qq1, Rq1)` for (q+1)·amin
  follows with one conditional subtraction.
- A running pair (Q, R) with s·amin = Q·amaj + R adds one of the two
  quotient/remainder pairs per boundary. It carries when R reaches amaj. Then
  m = Q + (2R ≥ amaj).

A split therefore takes `3·COORD_W + N + 4` clocks (50 for N = 10) for any
line length, or N + 2 for a single-pixel line.

## The multi-core accelerator: `wu_accel_top`

Each core is a `wu_core_axil` peripheral with its own AXI4-Lite slave port,
result memory and interrupt. The top exposes all of them as arrays
(`s_axi_req[c]`, `s_axi_rsp[c]`, `interrupt[c]`). In a system they go to an
AXI interconnect and a processor. There are two ways to run the
accelerator:

- **Line port.** Pulse `line_start` with `line_p0`/`line_p1` and
  `line_ncores` while `line_busy` is low. `line_ncores` is the number of
  cores N to use (1 … NCORES; 0 or a larger value means all). The splitter
  computes the boundaries. In one clock each core c < N is then loaded with
  `seg_pt[c]`, `seg_pt[c+1]` and started. `line_done` pulses once those
  cores are idle. Each has also raised its done interrupt (if enabled).
  The other cores are not touched and stay free for the host port. The host reads each core's pairs over its
  port. A `line_start` while busy is ignored.
- **Host port.** The host programs any core itself: it writes X0/Y0/X1/Y1,
  sets `ap_start` and waits for the interrupt or polls `ap_done`. With one
  core this is the single-core system. With all cores it is the
  processor-driven split of the published system.

Run time on the line port on N cores, for L > 0:
`(3·COORD_W + N + 4) + FRAC_W + 5 + ⌈L/N⌉` clock edges from
`line_start` to `line_done`. That is 71 + ⌈L/10⌉ on all ten cores. At
156.25 MHz a 480-step line takes 119 clocks (0.76 µs) on ten cores. Programmed
over the host port of one core it takes 500 clocks (3.2 µs). The published figures of 3.1 µs and
0.31 µs scale exactly as 1/N. This design has a fixed overhead of about
70 clocks for the split and the hand-over, so its speed-up flattens for
short lines.

The same 480-step line on the line port with `line_ncores` = 1 … 10
(`tb/tb_core_count_sweep.sv`):

| cores | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 |
|---|---|---|---|---|---|---|---|---|---|---|
| clocks | 542 | 303 | 224 | 185 | 162 | 147 | 137 | 129 | 124 | 119 |
| ns at 156.25 MHz | 3469 | 1939 | 1434 | 1184 | 1037 | 941 | 877 | 826 | 794 | 762 |
| published ns | 3100 | 1550 | 1033 | 775 | 620 | 517 | 443 | 388 | 344 | 310 |

The drawing part falls as 480/N. The rest is the fixed 61 + N clocks of the
split, the division and the register stages. In the published system the
split runs on the processor and is not part of those figures.

### Register map of one core (byte addresses)

| addr | name | access | meaning |
|---|---|---|---|
| 0x00 | CTRL | R/W | b0 `ap_start`: write 1, cleared when the core starts. b1 `ap_done`: cleared by reading CTRL. b2 `ap_idle` |
| 0x04 | GIE | R/W | b0 global interrupt enable |
| 0x08 | IER | R/W | b0 done-interrupt enable |
| 0x0C | ISR | R/W1C | b0 set when a run finishes |
| 0x10–0x1C | X0, Y0, X1, Y1 | R/W | endpoints, fixed point 12.4 in bits 15:0 (pixel = value/16) |
| 0x20 | COUNT | R | pairs produced by the last run |
| 0x24 | STATUS | R | b0 last line was steep. b1 more pairs than the memory holds (the rest were dropped) |
| 0x8000 + 8n | pair n, pixel A | R | `{x[31:20], y[19:8], intensity[7:0]}` |
| 0x8004 + 8n | pair n, pixel B | R | same |

`interrupt = GIE & IER & ISR` (a level). AXI4-Lite handling: AW and W are
taken together. There is one transaction at a time per direction. Read data
comes two clocks after AR. Responses are always OKAY. Writes to the result
window are ignored. The layout imitates the control block that high-level
synthesis tools generate. It is not a copy of one.

## Parameters and sizes

| parameter | default | where |
|---|---|---|
| `NCORES` | 10 | `wu_accel_top`: the core count of the published system |
| `DEPTH` | 1024 pairs | `wu_accel_top`, `wu_core_axil`, `pixel_pair_ram` (own choice) |
| `COORD_W` | 12 | `wu_pkg`: coordinates 0…4095 (own choice) |
| `INT_W` | 8 | `wu_pkg`: intensity 0…255 (own choice) |
| `FRAC_W` | 16 | `wu_pkg`: gradient fraction bits (own choice) |
| `SUB_W` | 4 | `wu_pkg`: sub-pixel bits of the host endpoint registers (own choice) |

With 10 cores any line inside the 4096×4096 range fits: at most 410 pairs
per core. A single core stores a segment of up to 1023 steps whole.
Coordinates wrap at 4096. Pixel B of a pair on the top row (y = 4095) wraps
to 0.

## Departures from the published system

- **Split in logic.** The paper splits the line in processor software. It
  uses Bresenham's algorithm and mentions a "binary tree" method without
  describing it. Here the split is also available in logic, using the closed
  form above. The processor path remains through each core's AXI port.
- **No interconnect, processor or shared memory.** The AXI interconnect, the
  Zynq processing system, its reset block and the shared AXI block memory
  (AXI BRAM controller plus block memory) are vendor parts. They are not
  built. Each core's AXI4-Lite port and interrupt are top-level ports
  instead.
- **Result memory inside each core.** The published block design puts an AXI
  BRAM controller and block memory next to each core. Here each core's
  result memory is read through that core's own AXI4-Lite port, the way its
  output arrays are described.
- **Sub-pixel endpoints.** The paper's figure of the algorithm rounds
  fractional endpoints but does not give a number format. Here the host
  registers take 4 sub-pixel bits. The line port and the split work in whole
  pixels, so split segments always start and end on pixels.
- **Core count per line.** The paper uses up to ten cores and reports times
  for one to ten, but does not say how the count was chosen. Here
  `line_ncores` chooses it for each line without rebuilding.
- **Steep and reversed lines.** The swaps for these follow the standard form
  of Wu's algorithm.
- **Intensity.** The pixel nearer the line gets the larger share, as in Wu's
  algorithm. How a share maps to screen darkness is left to the display.
- **Open choices.** Widths, rounding (truncation), reset (asynchronous,
  active low), handshakes, register map and memory size are this design's
  own choices. The paper's 156.25 MHz clock is not constrained or checked
  here. No timing closure has been done.

## Simulating

Each testbench is self-checking. It ends with
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. The reference model
in `tb/wu_ref_pkg.sv` computes every expected pair with plain integer
arithmetic. It also computes every Bresenham pixel by replaying the
iteration. It shares no code with the RTL.

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/wu_pkg.sv tb/wu_ref_pkg.sv rtl/wu_line_core.sv rtl/pixel_pair_ram.sv \
  rtl/wu_core_axil.sv rtl/seq_divider.sv rtl/line_splitter.sv rtl/wu_accel_top.sv \
  tb/tb_wu_accel_top.sv --top-module tb_wu_accel_top -o sim
./obj_dir/sim
```

Replace the last testbench and top module to run another one:

| testbench | what it checks |
|---|---|
| `tb_wu_line_core` | all pairs of directed and random lines (steep, reversed, single point, full range, sub-pixel endpoints); pair count; the exact latency; shares sum to 255; the half/half pixel of the example line |
| `tb_pixel_pair_ram` | write/read, read-during-write returns old data |
| `tb_wu_core_axil` | AXI4-Lite programming with whole-pixel and sub-pixel endpoints, `ap_done` clear-on-read, interrupt enable/mask and W1C, result read-back, truncation flag (with `DEPTH` = 64), splitter load port, start-to-interrupt time |
| `tb_line_splitter` | every boundary against the Bresenham walk for segment counts 1 … 10 (and the out-of-range counts), equal lengths, the constant split time, lines shorter than the core count |
| `tb_wu_accel_top` | the default-size accelerator end to end: parallel runs (shallow, steep, reversed, long, shorter than 10 steps, single pixel, random) with exact run time and every core's pairs read over AXI; a fan of twelve lines in all directions; runs on fewer cores that must leave the rest untouched; host-programmed runs with whole-pixel and sub-pixel endpoints; truncation; ignored `line_start`; interrupts; speed-up over one core |
| `tb_core_count_sweep` | one line on 1 to 10 cores of the default accelerator: exact run time, pair counts per core, run time not growing with the core count |

`tb_wu_accel_top` uses the default parameters. It finishes in well under a
minute.
