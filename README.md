# Pipelined lifting 9/7 DWT with Booth multipliers

This is a 2-D discrete wavelet transform (DWT) engine for 8-bit images. It
uses the Daubechies 9/7 filter bank, computed with the lifting scheme. The
core is a 1-D lifting pipeline. Its lifting equations are rearranged so that
each step has exactly one constant multiplication, and that multiplication
is done by a radix-2 Booth multiplier. The pipeline has five arithmetic
stages. Each stage is one multiplier and two adders deep, and the pipeline
takes one even/odd sample pair per clock. A frame memory and a controller
run this 1-D core over the rows and then the columns of the image. They do
this for up to three decomposition levels, in place.

The default configuration transforms a 512 x 512 image over three levels. A
full three-level run takes 344,112 clock cycles, not counting loading and
reading out the image.

## The rearranged lifting equations

In lifting form, the 9/7 transform of a line x splits the line into even
samples s and odd samples d. Four lifting steps and a scaling follow:

    d1[i] = d0[i] + alpha * (s0[i] + s0[i+1])      predict 1
    s1[i] = s0[i] + beta  * (d1[i-1] + d1[i])      update 1
    d2[i] = d1[i] + gamma * (s1[i] + s1[i+1])      predict 2
    s2[i] = s1[i] + delta * (d2[i-1] + d2[i])      update 2
    L[i]  = K * s2[i],   H[i] = d2[i] / K

Here alpha = -1.586134342, beta = -0.05298011854, gamma = 0.8829110762,
delta = 0.4435068522 and K = 1.230174105.

Written this way, the multipliers stack up from input to output: d1 feeds
two further multiplications before s2 is known. The design divides every
branch by the product of the constants met so far. Each step then becomes a
multiplication of the sample being lifted, plus a plain sum of its
neighbours:

    d1' = A*d0  + (s0[i]  + s0[i+1])          A  = 1/alpha               = -0.630463
    s1' = B*s0  + (d1'[i-1] + d1'[i]) / 16    B  = 1/(16 alpha beta)     =  0.743750
    d2' = C*d1' + (s1'[i] + s1'[i+1]) / 2     C  = 1/(32 beta gamma)     = -0.668067
    s2' = D*s1' + (d2'[i-1] + d2'[i]) / 2     D  = 1/(4 gamma delta)     =  0.638443
    L   = K0*s2',  H = K1*d2'                 K0 = 64 alpha beta gamma delta K = 2.590697
                                              K1 = 32 alpha beta gamma / K     = 1.929981

One can check that d1' = d1/alpha, s1' = s1/(16 alpha beta),
d2' = d2/(32 alpha beta gamma) and s2' = s2/(64 alpha beta gamma delta). The
outputs L and H therefore equal the classic transform. The divisions by 16
and 2 are wiring (arithmetic right shifts). Each step costs one multiplier
and two adders, and the two scalings are one multiplier each.

All constants are 16-bit signed words with 13 fractional bits
(`round(value * 8192)`): A = -5165, B = 6093, C = -5473, D = 5230,
K0 = 21223, K1 = 15810. They live in `rtl/dwt_pkg.sv`.

Conventions differ on whether the low band is multiplied or divided by K.
This design multiplies L by K = 1.230174 and divides H by K. This gives a
DC gain of K^2 = 1.513 per 1-D pass for the low band. K0 and K1 above are
the values that produce exactly this normalisation.

## The pipeline and its timing

`dwt1d_core` chains five stages:

    pair in -> P1 (A, >>0) -> U1 (B, >>4) -> P2 (C, >>1) -> U2 (D, >>1) -> scale (K0, K1) -> (L, H)

A stream element is a `pair_t`: valid, `first` and `last` (the first and
last pair of a line), even sample `s` and odd sample `d`. A tag of any width
travels alongside; the 2-D controller uses it for the write-back address.

* **Update stages** (`update_stage`) need `d[i-1]`, which has already
  passed. They keep it in a register and produce their result one cycle
  after the pair arrives.
* **Predict stages** (`predict_stage`) need `s[i+1]`, which belongs to the
  next pair. They hold pair i for one cycle and compute it while pair i+1 is
  at their input. Their latency is therefore two cycles.
* The **scaling stage** has two Booth multipliers and a latency of one
  cycle.

A pair's result leaves the core 7 cycles after the pair enters
(`CORE_LAT` in `dwt_pkg`). Through the two look-aheads, the result of pair i
also depends on pair i+2. Every result is therefore ready five register
stages after the last input it depends on arrived.

Timing rules a user of the core must respect:

* The pairs of one line must arrive on consecutive clocks. An assertion in
  `predict_stage` checks this.
* Lines may follow each other directly or with idle cycles in between.
* At line ends the core uses whole-sample symmetric extension: it takes
  `s[n] = s[n-1]` at the right edge and `d[-1] = d[0]` at the left edge. A
  line of a single pair (two samples) is allowed.

## Booth multiplier

`booth_mult` is a combinational radix-2 Booth multiplier for signed
operands. It scans the multiplier operand b one bit pair `{b[i], b[i-1]}` at
a time, with `b[-1] = 0`:

| b[i] | b[i-1] | partial product i |
|------|--------|-------------------|
| 0 | 0 | 0 (inside a run of zeros) |
| 1 | 0 | -a * 2^i (a run of ones starts) |
| 1 | 1 | 0 (inside a run of ones) |
| 0 | 1 | +a * 2^i (a run of ones ends) |

The constant is always the recoded operand. Synthesis can therefore drop
every partial product whose code is "shift only". The full-width product
(24 + 16 bits) is summed in one combinational chain. The Booth encoding is
held in the enum `booth_op_e`.

## Word lengths and accuracy

* A sample word is 24 bits, two's complement, with 8 fractional bits. A
  pixel p enters as `p * 256`.
* This leaves 15 integer bits. The largest values are the low-low band
  after three levels, about 255 * 12, and the intermediate d1'. These stay
  well inside that range, so no overflow occurs for 8-bit images over three
  levels. Results wrap silently; there is no saturation.
* Each product and each shifted neighbour sum is rounded half up to the
  sample LSB.

Accuracy measured against a floating-point model of the classic equations:

| Case | Largest deviation |
|------|-------------------|
| Single 1-D pass | 0.04 pixel units |
| Three 2-D levels of a 512 x 512 image | 0.38 |

The three-level error comes mostly from the 16-bit constants. Their relative
error (about 2e-4) compounds on the low-low band, whose values exceed 1500.
If more accuracy is needed, widen `CW`/`CF` in `dwt_pkg`.

## 2-D operation: frame memory and pass schedule

`dwt2d_top` holds the whole image in `frame_mem`, and works level by level.
For each level it makes a row pass and then a column pass. Both passes feed
one pair per clock through the same core.

At level l the current low-low region has `N >> l` samples per line. They
sit at stride `2^l` in the memory. Every result is written back over the
pair it came from, with the low-pass value at the even position and the
high-pass value at the odd one. Between passes the controller waits 8 idle
cycles. This drains the pipeline, so a pass never reads a sample whose new
value is still in flight.

One pass over an L x L region costs `L*L/2 + 8` cycles. For N = 512:

| Levels | Cycles |
|--------|--------|
| 1 | 262,160 |
| 2 | 327,712 |
| 3 | 344,112 |

**Two banks, one pair per cycle.** The frame memory has two banks, each a
simple dual-port RAM (`dwt_bank`: one write port, one synchronous read
port).

* Sample (r, c) is stored in bank `XOR of all bits of r and c`, at word
  `{r, c >> 1}`.
* The two members of any pair differ by `2^l` in one coordinate, and that
  coordinate has bit l clear. So they differ in exactly one address bit, and
  they always fall in different banks.
* Each cycle one pair is read and the pair leaving the core is written.
  Each bank therefore sees at most one read and one write per cycle, in
  every pass at every level.

**Coefficient layout.** The result stays interleaved in place. This is the
usual "in-place lifting" layout, not the quadrant (Mallat) picture:

* After L levels, the low-low band is at rows and columns that are
  multiples of `2^L`.
* The detail bands are located as follows. For a coordinate v, let t(v) be
  the number of trailing zero bits of v, capped at L (so t(0) = L). A position
  (r, c) with m = min(t(r), t(c)) < L holds a coefficient of level m+1.
  Which band depends on which coordinate has bit m set:
  * r only: LH (vertical high-pass);
  * c only: HL;
  * both: HH.

  Positions with m = L hold the low-low band.

The testbench reference (`tb/dwt2d_tb_common.svh`) computes the transform in
this same layout.

## Top-level interface (`dwt2d_top`)

Parameters: `N` (image side, a power of two, default 512) and `LEVELS`
(maximum number of levels, default 3). `N >> LEVELS` must be at least 2.

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| start | in | 1 | one-cycle pulse while idle starts a transform |
| num_levels | in | 2 | levels to compute; 0 is taken as 1, above LEVELS as LEVELS |
| busy | out | 1 | high from the cycle after start; falls when done pulses |
| done | out | 1 | one-cycle pulse when the last level is written |
| level, col_pass | out | 2, 1 | current level and whether a column pass runs |
| pix_we, pix_row, pix_col, pix_data | in | 1, log2 N, log2 N, 8 | load one unsigned pixel per cycle (idle only) |
| coef_re, coef_row, coef_col | in | 1, log2 N, log2 N | request one coefficient (idle only) |
| coef_valid, coef_data | out | 1, 24 | the coefficient one cycle after the request, 8 fractional bits |

A typical sequence:

1. Load N*N pixels.
2. Pulse `start` with `num_levels`.
3. Wait for `done`.
4. Read the coefficients.

Loading and read-out are ignored while `busy` is high.

## Files

| File | Contents |
|------|----------|
| `rtl/dwt_pkg.sv` | word widths, lifting constants, shifts, `pair_t`, Booth op enum, core latency |
| `rtl/booth_mult.sv` | radix-2 Booth multiplier |
| `rtl/lift_pe.sv` | one lifting element y = K*c + (a+b)/2^SH |
| `rtl/predict_stage.sv`, `rtl/update_stage.sv`, `rtl/scale_stage.sv` | the pipeline stages |
| `rtl/dwt1d_core.sv` | the five-stage 1-D lifting pipeline |
| `rtl/dwt_bank.sv`, `rtl/frame_mem.sv` | memory bank and two-bank pair memory |
| `rtl/dwt2d_ctrl.sv` | level / row / column pass sequencer |
| `rtl/dwt2d_top.sv` | the complete 2-D transform |

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
ends with a line `TB_RESULT checks=<n> failures=<m>`. They compare against
values computed independently in the testbench:

* Integer models for the arithmetic blocks.
* A floating-point model of the classic lifting equations
  (`tb/dwt97_ref.svh`) for the core and the full transform.

What the main testbenches cover:

* `tb_dwt2d_top` runs a 32 x 32 image through 1, 2 and 3 levels. It also
  runs a 0/255 checkerboard, a noisy ramp and a 0-level request. It checks
  every coefficient and the cycle count of each run. It counts row passes,
  column passes, levels and line-end mirrorings.
* `tb_dwt2d_full` runs the default 512 x 512 design over one, two and
  three levels and checks all 262,144 coefficients after each run. It
  simulates in a few seconds after building.

With Verilator 5:

    verilator --binary --timing --assert -Irtl -I. -y rtl -y tb +libext+.sv \
        rtl/dwt_pkg.sv tb/tb_dwt2d_full.sv --top-module tb_dwt2d_full -o sim
    ./obj_dir/sim

Substitute any other testbench name. Testbenches that include a `.svh`
expect to be run from the directory that holds `rtl/` and `tb/`.

## Where this design departs from, or adds to, the original architecture

* **Fixed-point format, rounding and boundary handling** are this design's
  own. The original architecture does not state its word length, rounding or
  line-end rule.
* **Latency.** The original architecture quotes results five cycles after
  the input pair. Here the latency is seven cycles from the pair itself, and
  five from the last pair the result depends on.
* **The 2-D machinery** (frame memory, banking, pass schedule, in-place
  layout, external ports) is this design's own. The original architecture
  names a top module and reports first- and second-level results, but does
  not describe how rows, columns and levels are organised.
* **The constant K.** The published list of constants gives the 9/7
  scaling factor as 1.149604398. The published expression for K1 divides
  by delta. Neither matches the published values of K0 and K1. Those values
  correspond to the scaling factor 1.230174 and to `K1 = 32 alpha beta
  gamma / K`. This design uses the published numeric values.
* **Not built:**
  * the inverse transform;
  * the 3-D extension with a modified (radix-4) Booth multiplier, which is
    only mentioned as future work;
  * any FPGA-specific mapping.

  Clock rate and resource figures of the original FPGA implementation
  (4.014 ns period, 246 slices) are not reproduced.
