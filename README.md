# Scalable optical-flow processor core (HOE / Horn–Schunck iteration)

This is a SystemVerilog model of a dense optical-flow processor for real-time video
segmentation. It follows the architecture study "An Architecture Study of Scalable
Optical-Flow Processor for Real-Time Video Segmentation". For every pixel it finds the
motion vector (u, v) between successive frames. It does this by iterating the
Horn–Schunck-type update used by hierarchical optical-flow estimation (HOE):

    u' = ū − Ix · (Ix·ū + Iy·v̄ + It) / (α² + Ix² + Iy²)
    v' = v̄ − Iy · (Ix·ū + Iy·v̄ + It) / (α² + Ix² + Iy²)

Here Ix, Iy and It are the luminance gradients, and ū, v̄ are the means of the eight
neighbouring flows from the previous iteration. One frame can need up to about 150
iterations, which is most of the work. The main idea of the architecture is a single
**common element (CE)**: four identical processing elements (PEs) working as 4-way SIMD.
The CE runs the iteration and also the multiply-accumulate filters that produce the
gradients, so there is no separate gradient hardware.

In its default configuration (one CE, CIF frames of 352 × 288) the core updates 4 pixels
per clock. One iteration over a CIF frame takes 25,760 clocks, which is 136 µs at the
189 MHz clock the original study targets. 150 iterations over a three-level pyramid
therefore fit in a 30 frame/s budget (27 ms of the 33 ms per frame).

## Block structure

```
 bus ──► input buffer (of_fifo) ──┐                    ┌──► output buffer (of_fifo) ──► bus
                                  ▼                    │
             ┌──────────── sequence controller (of_seq_ctrl) ────────────┐
             │                                                           │
  optical-flow memory ──► previous-flow buffer ──► register file ──► CE (of_ce) ──┐
  8 × of_dram2p (2-port)   (of_prev_flow_buf)       (of_regfile)    4 × of_pe     │
        ▲                                                           + of_acc     │
        └───────────────────────── updated flows ◄──────────────────────────────┘
  gradient memory 12 × of_sram1p ──► CE (Ix, Iy, It)    CE filter results ──► gradient memory
```

| module | role |
|---|---|
| `of_core` | top: one CE (or `NUM_CE` of them) with its memories, buffers and controller |
| `of_seq_ctrl` | mode, addresses, raster sweep, drain, iteration count, convergence stop |
| `of_ce` | `LANES` PEs in lock step plus the difference accumulator |
| `of_pe` | one lane: AVE → BE1/BE2 → DIV → U_V → DIFF, or a 3-tap filter |
| `of_mac` | three multiplexed multiplies, summed (BE1, BE2, DIFF, filter) |
| `of_ave`, `of_div`, `of_uv`, `of_acc` | neighbour mean, pipelined divider, flow update, accumulator |
| `of_regfile` | 3 × 3-group window of previous-iteration flows |
| `of_prev_flow_buf` | two line memories holding rows y−1 and y |
| `of_dram2p` | one optical-flow bank: 25,344 × 24 b, one write and one read port |
| `of_sram1p` | one gradient bank: 25,344 × 16 b, single port |
| `of_fifo` | input and output data buffers |
| `of_delay` | alignment shift register |
| `of_pkg` | number formats, types, latencies, default filter coefficients |

The memories are organised by SIMD lane. The optical-flow memory has 4 lanes × (u, v) =
8 banks, and the gradient memory has 4 lanes × (Ix, Iy, It) = 12 banks. Each bank holds
one word per 4-pixel group of a CIF frame (25,344 words). This gives 4.87 Mb for the flows
and 4.87 Mb for the gradients, the sizes of the original floor plan (8 × 0.61 Mb and
12 × 0.41 Mb). In silicon the flow banks are two-port gain-cell DRAM. They need no refresh
because every word is read once per iteration (every 25,760 clocks, 136 µs at 189 MHz,
for a CIF frame), well within the retention time. Here they
are plain memory arrays.

## How an iteration sweeps the frame

This is the part that needs the most care. The flow memory is overwritten in place while
it is being read. The neighbour mean must still use **previous-iteration** values only, so
this is a Jacobi sweep, not Gauss–Seidel. The sweep works as follows.

* The frame is processed in raster order of **groups**. A group is `LANES` (4)
  horizontally adjacent pixels. Group (row r, column c) is at address `r·img_g + c` in
  every bank.
* One iteration has `(img_h + 1) × (img_g + 1)` steps, one per clock. Step (r, c) reads
  group c of row r from the flow memory. This is the row below the one being updated, and
  it still holds old values. The step also reads column c of the two line memories of the
  previous-flow buffer, which hold the old rows r−1 and r−2. The old row r is then pushed
  into the line buffer. The old row r−1 moves to the second line. So the buffer always
  holds old values of the rows that are already being overwritten.
* The three words (rows r−2, r−1, r) form a column. It is shifted into the register file,
  a window 3 rows high and 3 groups wide. The middle group is the centre: group
  (r−1, c−1). For each lane the window gives the pixel's own old flow and its eight
  neighbours. Near the frame edge the neighbours come from the zero column and row fed by
  the extra step (column `img_g`, row `img_h`), or from masked rows. **Flows outside the
  frame count as zero.**
* The gradients of the centre group are read from the gradient memory in the same cycle.
  The CE gets one neighbourhood set per clock. PE_ITER_LAT = 33 clocks later it writes the
  updated group back to the flow memory, at the centre's address, through the second
  port. This write goes to row r−1, while reads are already at row r or later, so reads
  and writes never collide.
* After the last step the controller waits 37 clocks for the pipeline to drain. It then
  compares the summed squared change of the iteration, Σ (u' − u)² + (v' − v)², with
  `threshold`. It stops when that sum is at or below the threshold (`converged`) or when
  `max_iter` iterations have run. Otherwise it starts another sweep.

The measured cost is `(img_h + 1)(img_g + 1) + 39` clocks per iteration.

## The processing element

Each PE evaluates the update for one pixel per clock in a fixed pipeline:

| stage | unit | operation | clocks |
|---|---|---|---|
| AVE | `of_ave` ×2 | ū, v̄ = ⌊Σ 8 neighbours / 8⌋ | 1 |
| BE1 (MAC1) | `of_mac` | α·α + Ix·Ix + Iy·Iy | 3 |
| BE2 (MAC2) | `of_mac` | Ix·ū + Iy·v̄ + It·2¹⁶ (in parallel with BE1) | 3 |
| DIV | `of_div` | be2·2⁸ / be1, restoring, one quotient bit per stage | 25 |
| U_V (MAC3) | `of_uv` | u' = ū − ⌊Ix·div / 2⁸⌋, same for v, saturate | 1 |
| DIFF (MAC4) | `of_mac` | (u' − u)² + (v' − v)² | 3 |

**Number formats.** Gradients are 16-bit and flows are 24-bit two's complement. This is
the 16/24-bit split the original bit-length study found as accurate as 32-bit floating
point. Where the binary point sits is this design's choice:

* gradients have 8 fraction bits (Q8.8);
* flows have 16 fraction bits (±128 pixels at 1/65536 pixel);
* α is an unsigned 15-bit input with 8 fraction bits;
* filter coefficients are Q2.14.

The quotient is rounded toward zero and saturates at ±(2²³−1). The flow update rounds
toward −∞ and saturates at 24 bits.

**Filter mode.** MAC1 has a second multiplexer input. In `MODE_FILTER` every lane computes
`c0·e0 + c1·e1 + c2·e2`, shifted back to 16 bits and saturated, PE_FILT_LAT = 5 clocks
after entry. This is the building block of gradient generation. Each separable pass of the
prefilter (lpf0, lpf1, lpf0) and of the derivative (d0, 0, −d0), along x, y or t, is one
filter pass over the frame. `of_pkg` holds Simoncelli's three-tap values (0.223755,
0.552490; 0.453014) as `LPF0`, `LPF1`, `DRV0`. The coefficients are inputs, so any 3-tap
kernel works. Coefficients (0, 1, 0) copy data straight into a gradient plane.

## Operating the core

Set `mode`, `dest`, the frame size and the other settings, pulse `start` for one clock,
and wait for the one-clock `done` pulse. `busy` is high in between.

| mode | input stream | action | output stream |
|---|---|---|---|
| `MODE_FILTER` | per lane three 16-bit taps `{e0,e1,e2}` | 3-tap filter with `coef[0..2]` | to gradient plane `dest` (Ix/Iy/It), or filtered words if `dest = DEST_OUT` |
| `MODE_LOAD` | per lane one flow pair `{u,v}` | written to the flow memory | – |
| `MODE_ITER` | – | iterate until converged or `max_iter` | `iter_count`, `converged`, `acc_sum` |
| `MODE_READ` | – | flow memory read in raster order | per lane `{u,v}` |

Both streams use valid/ready and carry one group per word. Lane k occupies bits
`[48k+47 : 48k]`; filter results are sign-extended to 48 bits. Words come in raster
order of groups, so a frame of `img_g × img_h` groups takes `img_g·img_h` words. The
frame in use can be smaller than the build size: `img_g ≤ WIDTH/(LANES·NUM_CE)` and
`img_h ≤ HEIGHT`. This is how the coarser pyramid levels run.

The controller never issues more results than the output buffer has room for. With the
output held off it stalls, and the input buffer then fills and drops `in_ready`.

A host processes one pyramid level as follows:

1. Run filter passes over its frames to produce Ix, Iy and It (the last pass of each
   goes to the gradient memory).
2. Load the initial flows: zero, or the flows interpolated from the coarser level.
3. Run `MODE_ITER`.
4. Read the flows out.

## Scaling

* `NUM_CE` (default 1) places several CEs side by side on one wider group of
  `LANES·NUM_CE` pixels. Each CE has its own flow and gradient banks. The CEs share the
  register file, so boundary pixels see their neighbours in the other CE. The pixel rate
  grows in proportion. Four CEs with `WIDTH = 640`, `HEIGHT = 480` are the VGA-30
  configuration: an iteration of a 640 × 480 frame then takes 19,760 clocks, and
  150 iterations on three pyramid levels take 3.93 M clocks, inside the 6.3 M clocks
  of one frame period at 189 MHz.
* `max_iter` and `threshold` trade accuracy for power at a fixed pixel rate.
* `WIDTH`, `HEIGHT` set the memory depth; `LANES` sets the SIMD width of one CE.

## How far it follows the original architecture

Taken from the original architecture:

* the CE/PE structure with AVE, BE1, BE2, DIV, U_V, DIFF and ACC;
* the 4-way SIMD;
* the 16/24-bit word lengths;
* the MAC with multiplexed, registered operands and products;
* the 2-port flow banks and 1-port gradient banks, with their counts and sizes;
* the previous-flow buffer, register file, I/O buffers and sequence controller;
* one result per clock;
* the convergence and iteration-limit stop;
* side-by-side CE scaling.

This design's own choices:

* the binary-point positions, rounding and saturation;
* the pipeline depths;
* the divider algorithm;
* Jacobi update order with a zero border;
* the sweep and window organisation;
* the line-buffer size: 2 × 88 groups × 192 b = 33.8 kb (the original quotes 28 kb);
* the convergence measure: the frame sum of squared change against the pixel's own
  previous flow;
* the operation set, the stream format and the FIFO depth of 16;
* the coefficient values.

Not included:

* **External SDRAM and its controller.** The core's streams stand where the bus would be.
* **Pyramid handling.** Sub-sampling, flow interpolation between levels, motion-compensated
  frame generation and flow addition are named in the algorithm but not specified, so they
  are left to the host. The Gaussian smoothing itself runs as a filter pass.
* **ADD1/ADD2.** These two adders appear in the CE diagram without a stated function.
* **The transistor-level 4T DRAM cell.**
* **ACC to gradient memory and the links between PEs.** The original PE diagram draws
  the accumulator feeding the gradient memory and lines between the PEs' U_V and DIFF
  stages, without saying what passes over them. Here the accumulator only sums DIFF, and
  filter results go from MAC1 straight to the gradient memory.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against
reference arithmetic written independently with 64-bit integers (`tb/tb_of_ref_pkg.sv`),
and checks latencies where they are fixed. The testbenches:

* `tb_of_pe` and `tb_of_ce` mix filter and iteration operations with random operands and
  check results and latencies (33 and 5 clocks).
* `tb_of_div` covers signs, overflow and a zero divisor.
* `tb_of_seq_ctrl` checks every sweep step against an independent raster loop, and
  checks stalling against a small modelled output buffer.
* `tb_of_core` runs the whole host sequence on a 20 × 8 frame in a 32 × 8 build:
  three gradient passes, a smoothing pass to the output with stalls, a flow load,
  three iterations stopped by `max_iter`, a read, and a run stopped by convergence.
  Flows are compared bit-exactly with a Jacobi reference of the update over the frame.
  `acc_sum` and the clock count are checked, and each mechanism must occur at least
  once.
* `tb_of_core_2ce` runs the same sequence with two CEs (8 pixels per clock).
* `tb_of_core_full` runs it on the default build with a full 352 × 288 frame and two
  iterations: 51,520 clocks, about 20 s of simulation.
* `tb_of_core_levels` loads five frame sizes into the default build: 352 × 288 and its
  two smaller pyramid levels (176 × 144, 88 × 72), 320 × 252 and 152 × 150. Each runs
  three iterations with flows checked against the reference and the clock count per
  iteration checked against (rows + 1)(groups + 1) + 39. It also checks that 150
  iterations on each of the three CIF levels (5.11 M clocks) fit one frame period of
  30 frame/s at 189 MHz (6.3 M clocks).
* `tb_of_core_vga` does the same for a four-CE build sized for 640 × 480 (16 pixels
  per clock): 640 × 480, 320 × 240 and 160 × 120, two iterations each, and the
  VGA-30 budget (3.93 M clocks).

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_of_core \
    -y rtl -y tb +libext+.sv rtl/of_pkg.sv tb/tb_of_ref_pkg.sv tb/tb_of_core.sv
./obj_dir/Vtb_of_core
```

Each testbench ends with the line `TB_RESULT checks=N failures=M`.

The iteration has been checked against the fixed-point reference only, not against
image sequences or angular-error figures. The convergence threshold has no calibrated
value.
