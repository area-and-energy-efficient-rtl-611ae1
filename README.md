# Parameterised CORDIC macros for a GNSS receiver

CORDIC turns a vector rotation into a short loop of additions and shifts.
Each step rotates (x, y) by ±atan(2^-i), which in fixed point needs only
`x ± (y >> i)`, `y ∓ (x >> i)` and `z ∓ e_i`. After N steps the vector has
been rotated by the input angle (rotate mode), or onto the x axis so that
x holds its length and z its angle (vectoring mode). The only cost is a
constant gain, corrected at the end by one constant multiplication.

This RTL implements a CORDIC template whose word length, number of iterations
N and unrolling factor K are parameters. Two instances of it make up a
satellite-navigation (GNSS) receiver:

* a **baseband macro**: 16-bit integers, 10 iterations, one iteration stage
  reused for all 10 (K = 1), followed by a shift-and-add gain correction;
* a **floating-point co-processor** for the processor that computes the
  position/velocity/time (PVT) solution. It has 28-bit mantissas, aligns the
  exponents in front, and runs a 30-bit integer CORDIC for 30 iterations.

Both sit side by side in `cordic_gnss_top`.

## The micro-rotation (`cordic_stage`)

For iteration i, with direction d = ±1:

```
x' = x - d * (y >>> i)
y' = y + d * (x >>> i)
z' = z - d * e_i            e_i = atan(2^-i)
```

* **Rotate mode** (`MODE_ROTATE`): d = sign(z). z is driven to zero.
* **Vectoring mode** (`MODE_VECTOR`): d = -sign(y). y is driven to zero.
  Zero counts as positive.

Only the circular case (m = 1) is implemented. The linear and hyperbolic
CORDIC modes are not.

The stage has one adder per coordinate. Subtraction is done the way a
hand-built datapath does it: a row of XOR gates inverts the operand and the
adder's carry-in adds the missing 1. One control bit, `sub` (d = +1), drives
all three XOR rows and carry-ins. The x and z paths subtract when it is set;
the y path adds. A 2:1 multiplexer controlled by the mode picks whether `sub`
comes from the sign of z or from the sign of y.

Shifts are arithmetic, so the shifted operand rounds toward minus infinity.
The results wrap modulo 2^W. Nothing saturates.

## Number formats

* **x, y**: W-bit two's-complement integers (any binary point you like, the
  same for both).
* **Angles (z, e_i)**: two's-complement radians with `FRAC = ZW - 3`
  fractional bits, which covers just under ±4 rad. For the 16-bit macro
  1 LSB = 2^-13 rad.
* **Convergence**: rotate mode needs |z0| ≤ about 1.74 rad. Vectoring mode
  needs x0 > 0. Fold other quadrants into this range before the call.
* **Gain**: after N iterations x and y are stretched by
  1/K_N = Π sqrt(1 + 2^-2i). That is 1.6468 for N = 10.
* **Headroom**: the core has no internal guard bits. The input magnitude
  |(x0, y0)| must stay below 2^(W-1) / 1.65 (about 19 900 for W = 16).
  Intermediate x or y values can also exceed the final magnitude by up to
  √2, so keep a further margin.
* **Step angles**: `step_angle_rom` computes its table at elaboration time
  from `$atan`, rounded to nearest. No table of numbers is stored in the
  source.

## Iterative, partially and fully unrolled (`cordic_core`)

This is the part that needs the closest reading. The core has **K stages,
each behind a register, connected in a ring**:

```
 x0,y0,z0 ─►[init mux]─►[reg 0]─►stage 0─►[reg 1]─►stage 1 ─ … ─►stage K-1 ─┬─► x_m,y_m,z_m
               ▲                                                            │
               └────────────────────────────────────────────────────────────┘
```

* **K = 1** is the fully iterative macro. One stage runs N times, and its
  shifters take the iteration index as the shift amount.
* **1 < K < N** (K must divide N) is a partially unrolled macro. Stage j
  performs iterations j, j+K, j+2K, … An operation goes round the ring N/K
  times. Up to K operations circulate at once, one in each register.
* **K = N** is a plain pipeline. No value is fed back, each stage has a
  fixed shift and a fixed angle, and no programmable shifters are left.

Each ring register carries the operation's data and, with it:

* a valid bit;
* the mode;
* a **round** number r.

The round drives the stage's shift, `j + K*r`. The constant part j is
wiring; only the `K*r` part goes through a logarithmic shifter (`log_shifter`
with `STEP = K`). This is why unrolling saves shifter levels. The round also
addresses the stage's step-angle ROM.

Handshake (all on the rising clock edge):

* `init` is sampled together with `x0, y0, z0, mode` when `ready` is high.
  `ready` is low only while the last stage holds an operation that must go
  round again. That operation has priority on the feedback path. An assertion
  flags an `init` while `ready` is low.
* `done` is high, and `x_m, y_m, z_m` valid, in the **N-th cycle after the
  init cycle**. The outputs come straight from the last stage's adders, so
  they are valid only in that cycle. A new `init` is accepted in the same
  cycle.
* Throughput, with `init` held whenever `ready` is high:

| K  | cycles per operation | results                               |
|----|----------------------|---------------------------------------|
| 1  | 10                   | one every 10 cycles                   |
| 2  | 5                    | bursts of 2 consecutive, every 10 cycles |
| 5  | 2                    | bursts of 5 consecutive, every 10 cycles |
| 10 | 1                    | one per cycle                         |

`x_m` and `y_m` are the raw pseudo-rotation results and still carry the
gain 1/K_N.

## Adders and shifters

**`csel_adder`**: a carry-select adder whose group lengths grow by two from
the LSB:

* `FIRST = 1` gives groups 1, 3, 5, 7, … (exact fits at 9, 16, 25 and 36 bits);
* `FIRST = 2` gives groups 2, 4, 6, 8, … (exact fits at 12, 20 and 30 bits).

Any other width cuts the top group short. By default the progression with
the least pruning is chosen: 16 bits → 1+3+5+7, 30 bits → 2+4+6+8+10.

Each group computes its sum twice in parallel, once for a carry-in of 0 and
once for 1. The real carry then picks one with a single multiplexer per
group. Groups grow by one more bit each, so a longer group has finished
rippling by the time the select signal reaches it. The adder's own carry-in
enters as the select of the lowest group.

**`csca_cell`**: the bit cell of those groups. It passes two conditional
carries (`ci0/ci1 → co0/co1`) and outputs the sum bit selected by the group's
carry. `FIRST = 1` is the bottom cell of a group, with its conditional
carries tied to 0 and 1. A full-custom version would also have
inverted-polarity copies of both cells; logically they are the same cells and
are not separate modules here.

**`log_shifter`**: an arithmetic right shifter made of AMT_W levels of 2:1
multiplexers. Level b shifts by `STEP * 2^b`.

## Gain correction (`k_correction`)

`x_out = round(x_m * K_N)`, and the same for y, using only shifts and adds:

1. K_N is rounded to `KF = W + 2` fractional bits.
2. That constant is recoded into canonical signed digits (±1 digits, no two
   adjacent), which needs the fewest terms. For N = 10 that is 7 terms.
3. One shifted copy of the input is added or subtracted per non-zero digit.
   Ties round toward +∞.

z is an angle and is not scaled. The baseband path of the top always applies
this block. The co-processor applies a 30-bit copy only when asked to
(`kcorr`).

## Floating-point co-processor

### Pre-normalisation (`fp_prenorm`)

A rotation does not change the vector's length (apart from the gain). x and
y can therefore share one exponent for the whole operation, and the iterations
can run on plain integers. The block:

* subtracts the exponents of x0 and y0;
* shifts the mantissa with the smaller exponent right by the absolute
  difference (a shift of NM+2 or more gives 0 or -1);
* passes on the larger exponent as the result exponent;
* turns z0 into a fixed-point angle by shifting its mantissa by its own
  exponent;
* gives every output two extra top bits: one for the √2 growth within a
  rotation, one for the gain that is corrected only at the end.

Operand format (this design's choice):

* mantissa: NM-bit two's-complement fraction, value = `man · 2^-(NM-1) · 2^exp`;
* exponent: EW-bit two's-complement;
* z0: must satisfy |z0| < 4 rad, and `z_exp` must be ≤ +2.

### Co-processor (`cordic_coproc`)

The processor presents the three operands, the mode and `kcorr`, and raises
`start`.

* The start is accepted when `busy` is low. `busy` rises on that edge and
  stays high for the whole operation; the processor's control unit waits on
  it. A `start` while `busy` is high is ignored.
* N rising edges after acceptance, `busy` falls and `done` pulses for one
  cycle. The result registers then hold:
  * `x_res, y_res`: the 29 upper bits of the 30-bit result. Value =
    `res · 2^-(NM-2) · 2^exp_res`. With `kcorr = 0` this is the raw
    pseudo-rotation result, still to be multiplied by K_30 ≈ 0.60725. With
    `kcorr = 1` the co-processor has already multiplied it, using a 30-bit
    `k_correction` in front of the result registers.
  * `z_res`: the angle in radians, `z_res · 2^-(NM-2)`.
* The mantissas are never re-normalised; that stays with the processor. With
  `kcorr = 0` the processor also does the multiplication by K_30.
* With 27 fractional bits the last step angles e_27…e_29 round to 1, 0 and
  0 LSB. The testbenches check angle errors below 1e-6 rad.

## Top level (`cordic_gnss_top`)

| parameter | default | meaning |
|-----------|---------|---------|
| `BB_W` | 16 | baseband word length |
| `BB_N` | 10 | baseband iterations |
| `BB_K` | 1 | baseband unrolling factor (1, 2, 5 or 10 for N = 10) |
| `CP_NM` | 28 | co-processor mantissa bits (inner CORDIC CP_NM+2 = 30 bits) |
| `CP_EW` | 8 | co-processor exponent bits |
| `CP_N` | 30 | co-processor iterations |
| `CP_K` | 1 | co-processor unrolling factor |

* **Baseband ports** (`bb_*`): `cordic_core` timing; `bb_x_out`/`bb_y_out`
  are gain-corrected.
* **Co-processor ports** (`cp_*`): connect to the processor's register file
  and control unit. They include `cp_kcorr`, which selects hardware gain
  correction.
* **Clock and reset**: the two macros share `clk` and an asynchronous
  active-low `rst_n`, and nothing else.
* **Shared types**: `cordic_pkg` holds the mode enum and the constant
  functions (step angle, gain, CSD recoding, adder group layout).

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog. The reference
models are in `tb/cordic_ref_pkg.sv` and use plain integer and real
arithmetic. Example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/cordic_pkg.sv tb/cordic_ref_pkg.sv tb/tb_cordic_gnss_top.sv \
  --top-module tb_cordic_gnss_top -Mdir obj_top && obj_top/Vtb_cordic_gnss_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_csca_cell` | cell exhaustively, both variants |
| `tb_csel_adder` | 12, 16, 18 (pruned) and 30 bits, random and carry corners |
| `tb_log_shifter` | all shift amounts, step 1 and step 2 |
| `tb_step_angle_rom` | every entry for K = 1 and K = 2, plus hand-computed e_0 and e_1 |
| `tb_cordic_stage` | one iteration, both modes, iterative and unrolled stage, bit exact |
| `tb_cordic_core` | K = 1, 2, 5, 10: bit exact against an integer model, accuracy against cos/sin/atan2, latency and throughput |
| `tb_k_correction` | 16- and 30-bit, exact and within 1 LSB of x·K |
| `tb_fp_prenorm` | alignment in both directions, large shifts, z exponents -40…+2 |
| `tb_cordic_coproc` | full size (28/30/30): bit exact and within 1e-6 of ideal, with and without hardware gain correction, busy/done timing, start while busy |
| `tb_cordic_gnss_top` | both macros at default sizes, running concurrently; counts every mechanism (both modes on both macros, iteration feedback, back-to-back operations, gain correction, alignment of x and of y, z shifted left and right, start ignored while busy, co-processor results with and without hardware gain correction) and fails if one never occurs |

The top-level testbench runs the default configuration in well under a
minute.

## Where this RTL departs from, or adds to, the reference design

* **Implementation style**: the reference macros were full-custom layouts
  with automatically sized transistors. Here the same structure (carry-select
  cells, multiplexer shifters, XOR rows, registers) is plain synthesizable
  RTL. Area, speed and power therefore depend on your synthesis flow.
* **Own choices**: none of these is specified by the reference design.
  * ring control (valid, mode and round bits travelling with the data);
  * `ready`/`done` and `start`/`busy`/`done` handshakes;
  * reset behaviour;
  * angle and floating-point formats;
  * exponent width;
  * which bit is dropped in the co-processor outputs (the LSB);
  * precision of the gain constant.
* **Step angles**: the plain series atan(2^-i), i = 0…N-1, is used. A series
  with repeated angles chosen to simplify the gain constant is a known
  option, but no such series is defined here.
* **Co-processor pre- and post-processing**: the co-processor takes
  floating-point operands and does the exponent alignment in hardware. It can
  also do the gain correction (`kcorr = 1`). In the preferred system the
  processor normalises the operands itself and multiplies by K. Doing both in
  hardware saves about 6 % of the PVT cycle count (622 012 instead of 660 472
  cycles for a 7-satellite solution). Driving the co-processor with equal
  exponents reduces `fp_prenorm` to the z conversion, and `kcorr = 0` gives
  raw results.
* **Processor stalls**: the processor is assumed to stall while `busy` is
  high. Letting it run on during the co-processor operation would be faster,
  but needs scoreboard logic in the processor that is not part of this RTL.
* **Not included**: the PVT processor itself, its instruction memory,
  control unit and buses, and the physical-design features (layout, sizing,
  reverse back-bias).
