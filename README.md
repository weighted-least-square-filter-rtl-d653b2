# Guided WLS post-filter for stereo depth maps

A stereo matcher (for example semi-global matching) leaves holes in its
disparity map: pixels it could not match are set to 0 and look like black holes
to anything downstream. This design fills them. It smooths the disparity map with
a weighted-least-squares (WLS) filter that is guided by the camera image. Where
the guide image is uniform, values spread freely into holes. Where it has an
edge, they stop. Untrusted disparities are kept from spreading by a per-pixel
confidence. The filter smooths two images, confidence and disparity × confidence,
and divides the first result into the second.

The RTL handles 672 × 376 frames with 8-bit disparities and an 8-bit guide.
It takes about 1.01 million clock cycles per frame (about 7.8 ms at 130 MHz).
The frames live in off-chip memory and are moved over AXI4.

```
 DDR (AXI4)                          wls_system
 ┌──────────┐   ┌────────────────┐   ┌──────────────────── wls_postfilter ─────────────────────┐
 │ left map │──▶│                │──▶│ discontinuity (L) ─┐                                    │
 │ right map│──▶│ axi4_frame_dma │   │ discontinuity (R) ─┴▶ confidence ─▶ frame_banks ◀──┐   │
 │ guide    │──▶│                │   │ guide pixels ─────────────────────▶ (on-chip)       │   │
 │ result   │◀──│                │◀──│ depth_divide ◀───────────────────── frame_banks  wls_filter
 └──────────┘   └────────────────┘   └─────────────────────────────────────────────────────────┘
```

## The three phases of a frame

`wls_postfilter` handles one frame at a time, in three phases (`phase` output):

1. **Load**, (W+1)·(H+1) cycles. The left disparity, right disparity and guide
   pixels arrive together in raster order. Two `discontinuity` units, one per
   map, run in lockstep. Each computes the variance of the pixel's 3×3
   neighbourhood and turns it into a credibility score,
   `disc = max(0, 1 − var/1000)`. Border pixels are repeated so every pixel
   has a full window. `confidence` then forms
   `conf = round(min(disc_L, disc_R) · 255)` and `disparity_L · conf`. Both
   values and the guide pixel are written into the on-chip frame store.
   A hole next to valid depth, or a depth edge, has a large local variance, so
   its confidence is 0.
2. **Filter**, (W/2)·(2H+5) + (H/2)·(2W+5) cycles. `wls_filter` smooths the
   two channels in place. It first runs a pass down every column, then a pass
   along every row.
3. **Unload**, W·H cycles if the output never stalls. `depth_divide` reads
   the frame back and sends out `filtered(disparity·conf) / filtered(conf)`,
   rounded and clamped to 8 bits. Where the filtered confidence is 0 it sends 0
   ("still unmeasured").

The phases do not overlap, so loading the next frame waits until the current
one has been written out.

## Solving one line: the heart of the filter

Each pass solves every line (a column or a row) of N pixels on its own. For a
line it looks for the output u that stays close to the input d and is smooth between
neighbours whose guide pixels are similar:

    minimise  Σ (u_x − d_x)² + λ Σ w_x (u_x − u_(x+1))²,     w_x = exp(−|g_x − g_(x+1)| / σ)

Setting the gradient to zero gives a tridiagonal linear system
(I + λA)·u = d. Row x of that system reads

    −λ w_(x−1) u_(x−1) + (1 + λ w_(x−1) + λ w_x) u_x − λ w_x u_(x+1) = d_x

The filter solves it with the Thomas algorithm, i.e. Gaussian elimination on a
tridiagonal matrix. It takes two sweeps. With e_x = −c'_x, a factor that always
lies between 0 and 1:

* **forward** (`wls_forward`), x = 0 … N−1:
  `den = 1 + λ w_x + λ w_(x−1) (1 − e_(x−1))`,
  `e_x = λ w_x / den`,
  `d'_x = (d_x + λ w_(x−1) d'_(x−1)) / den`
* **backward** (`wls_backward`), x = N−1 … 0:
  `u_x = d'_x + e_x · u_(x+1)`

Each pixel needs one division, 1/den. The result is shared by e and by both
channels. Confidence and disparity·confidence use the same guide, so they have
the same matrix. They are therefore solved in lockstep by one controller.

The weight goes through one lookup table (`exp_weight`): 256 entries, indexed by
|g_p − g_q|, filled at elaboration from the exponential.

### The split forward sweep

The forward recursion is the slow part, because each pixel waits for the one
before it. To halve its time, each line is cut at its centre. Engine A runs the
forward sweep on the first half. Engine B runs it on the second half, at the
same time. Engine B starts at the centre pixel as if it were the first pixel of
a line: it drops the left coupling term (`first = 1` on `wls_forward`). Engine
A's last pixel still uses the true weight to its right neighbour. Engine B
supplies that neighbour's guide value from its first read.

The backward sweep is not split. It runs over the whole line, so it carries
information back across the centre. The result is an approximation of the exact
solve. Pixels near the vertical and horizontal centre lines can differ from it,
mostly where a depth edge lies close to a centre line. This trade of accuracy
for speed is deliberate. The reference model in `tb/wls_ref_pkg.sv` makes the
same split, so the testbenches check the RTL bit for bit. The model can also
run without the split, which gives the exact solve in the same arithmetic.
`tb_wls_split_accuracy` compares the two on two full-size synthetic scenes:

| scene | pixels unchanged by the split | PSNR against the exact solve |
|---|---|---|
| stairs: depth steps, one on the horizontal centre line, an object edge 6 px from the vertical one | 88.8 % | 52.2 dB |
| parking lot: depth ramp running across the horizontal centre line, two boxes | 23.9 % | 26.1 dB |

Step edges near the centre cost little. A smooth depth ramp across a centre
line costs much more. The lower half is solved without any information from
the upper half, and over a band of several tens of rows around the centre it
settles a few grey levels away from the exact result. The original design
reported 82 % to 94 % unchanged pixels and 38 to 41 dB on its own camera
scenes.

### Schedule: pairs of lines

A line's forward phase takes N/2 + 2 cycles. Both engines read one pixel per
cycle, and each step is written one to two cycles after its read. The backward
sweep is not split, since that would cost more accuracy, and it is the longer
of the two phases. The backward sweep of a single line uses only one memory
port, so lines are handled in pairs: line l and line l + L/2 of
the L lines in the pass. First l runs its forward phase, then its partner does.
Then the two run their backward phases side by side, in N + 1 cycles, on two
`wls_backward` engines and the two memory ports. A pair therefore takes 2N + 5
cycles, not 3N + 6. The values of e are kept between the phases in one line
buffer per line of the pair, each split into halves for engines A and B
(`ebuf_a`, `ebuf_b`). The d' and u values overwrite the data in the frame
store, so no further frame-sized arrays are needed.

## Frame store and bank mapping

`frame_banks` holds the guide (8 bits) and one 48-bit word per pixel (both
channels, Q16.8). Every cycle, both forward engines must each read one pixel and
write another. To allow that, the frame is split at its centre lines into four
quadrants. The quadrants are dealt to two banks like a checkerboard:

    bank = (x ≥ W/2) XOR (y ≥ H/2)

Two pixels in the same row but opposite halves, or in the same column but
opposite halves, always fall in different banks. So the forward engines never
collide, in either pass. Neither do the paired backward engines: they work at
the same position of lines l and l + L/2, which lie in opposite halves. An
assertion checks this. Each bank is a `frame_ram`: one read and one write per
cycle, with registered read data, which maps onto UltraRAM or
block RAM. At 672 × 376 each bank has 126,336 words. The whole store is about
14.2 Mbit.

## Number formats

| quantity | format |
|---|---|
| disparity, guide, output | 8-bit unsigned integer |
| discontinuity | Q1.16 (0 … 1.0) |
| guide weight w | Q1.16, from a 256-entry table |
| e | Q0.16 |
| stored data (conf, disparity·conf, d', u) | Q16.8, 24 bits, saturating |
| reciprocal of den | Q0.32 |

Every step rounds to nearest where it drops fraction bits. This matters. With
λ = 8000 the factor e is about 0.99, and each sweep sums errors over about a
hundred pixels. Truncation would bias the result by around ten grey levels.
With rounding, the unsplit fixed-point solve is within 3 (stairs) and 7 (parking
lot) grey levels of a double-precision solve. 1.7 % and 3.5 % of its pixels are off
by more than one level.

λ = 8000 and σ = 1.5 are the defaults. They are the usual settings of a
disparity WLS filter. Both are parameters of `wls_system`, `wls_postfilter`
and `wls_filter`.

## AXI4 frame mover

`axi4_frame_dma` reads the three input images (W·H bytes each, at `src_l`,
`src_r` and `src_g`) using 64-bit INCR bursts of up to 16 beats. It rotates
between the three images and starts a burst only when that image's 32-word
buffer has room for all of it, so it never stalls the read-data channel. Result
pixels are packed eight to a beat and written to `dst`, one burst at a time.
`done` pulses after the last write response. `err` is set by any response other
than OKAY. Base addresses must be multiples of 128 bytes, and W·H must be a
multiple of 8.

## Ports of the top (`wls_system`)

| port | meaning |
|---|---|
| `clk`, `rst_n` | clock; asynchronous active-low reset |
| `start` | one-cycle pulse: filter the frame at the given addresses |
| `src_l`, `src_r`, `src_g`, `dst` | byte addresses of left map, right map, guide and result |
| `busy`, `done`, `err` | frame in progress; end-of-frame pulse; bus error |
| `m_ar*`, `m_r*`, `m_aw*`, `m_w*`, `m_b*` | AXI4 master, 32-bit address, 64-bit data, one ID |
| `phase` | 0 load, 1 filter, 2 unload |

`wls_postfilter` can also be used on its own, without the bus. It has plain
valid/ready pixel streams: `s_*` in, with three pixels per beat, and `m_*` out,
with `m_last` on the last pixel of a frame.

## Design choices and known limitations

The dataflow, formulas and parallel structure follow the published design. The
published design was written for high-level synthesis. The points below were not
specified there and were chosen here, or differ on purpose:

* The input stages stream with line buffers. The frame store therefore holds
  three frame arrays: guide, confidence, and disparity·confidence. The original
  kept four arrays, including the input depth maps.
* Guide weights are computed on the fly from the stored guide, not
  precomputed into arrays. In the original, the loops that precomputed them took
  about 70 of its 99 ms per frame (about 10 frames/s at 130 MHz). This RTL's
  schedule is 1.01 million cycles, or 7.8 ms at 130 MHz, if it met timing at
  that clock (see the next points).
* One vertical pass and one horizontal pass; no further iterations with
  decreasing λ.
* Work is doubled up in a different way. The original unrolled its loops by
  two over arrays split in halves. Here each engine does one pixel per cycle,
  and the two-pixels-per-cycle backward phase comes from pairing lines.
* The forward step is one cycle long and includes a divider. The design has not
  been tuned for timing, and at 130 MHz this path would need pipelining. The
  pipelining could, for example, interleave several lines to hide the
  divider's latency.
* Borders are replicated for the 3×3 variance. Confidences are rounded to
  nearest. An output with zero filtered confidence is 0.
* There is no processor register interface: `start` and the four addresses are
  plain ports.
* W and H must be even. Coordinates are 11 bits wide, so frames can be up to
  2047 pixels on a side.

## Verification

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/wls_ref_pkg.sv` is an
independent, sequential model of the whole filter, with the same rounding, so
results are compared exactly.

| testbench | what it checks |
|---|---|
| `tb_dis3x3`, `tb_confidence`, `tb_exp_weight` | arithmetic against the formulas, including edge values |
| `tb_wls_forward` | every step, including restarts, against the recursion |
| `tb_wls_backward` | bit-exact results, plus the residual of the tridiagonal equations (< 2 grey levels) |
| `tb_frame_ram`, `tb_frame_banks` | latency, read-during-write, bank mapping under the two-engine access pattern |
| `tb_discontinuity` | windows with replicated borders, random input gaps, (W+1)(H+1) cycles per frame |
| `tb_wls_filter` | the whole in-place solve and its exact cycle count, two frames |
| `tb_depth_divide` | division, zero rule, clamping, `m_last`, one pixel per cycle |
| `tb_wls_postfilter` | end to end at 16 × 10 with random stalls on both streams; requires each mechanism to occur |
| `tb_wls_postfilter_full` | one 672 × 376 frame through the core at default parameters; all 252,672 pixels compared |
| `tb_wls_split_accuracy` | two full-size scenes: exact match with the split model, then accuracy of the split against the exact solve (table above) |
| `tb_axi4_frame_dma` | bus transfers against a stalling memory model, full and partial bursts |
| `tb_wls_system` | end to end through AXI4 at 16 × 10, two frames |
| `tb_wls_system_full` | one 672 × 376 frame through the whole system at default parameters |

`tb/axi4_mem_model.sv` is a behavioural AXI4 memory that stands in for the DDR.
It withholds ready and valid at random.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_wls_system_full \
    -y rtl -y tb +libext+.sv rtl/wls_pkg.sv tb/wls_ref_pkg.sv tb/tb_wls_system_full.sv
./obj_dir/Vtb_wls_system_full
```

The full-size runs take a few seconds. To try other sizes or settings, change
`W`, `H`, `LAMBDA` and `SIGMA` on `wls_system` or `wls_postfilter`. The
testbenches pass the same values to the reference functions.
