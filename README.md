# FIR-based IIR filter: a recursive filter built from parallel, pipelined FIR filters

An IIR filter is hard to speed up because of its feedback loop: every output
depends on the previous one, so the multiply and add in the loop cannot simply
be pipelined. This design builds the recursion entirely out of FIR filters,
which pipeline and parallelise freely. A feed-forward FIR filters the input. A
feedback FIR filters the filter's own output. Their sum is scaled, and the
result is both the output and the feedback FIR's input:

```
 x ──► [ parallel pipelined FIR, coeffs B ] ──►(+)──► [ scaling, saturate ] ──┬──► y
                                                 ▲                            │
                                                 └── [ parallel pipelined FIR, coeffs A ] ◄──┘
```

Both FIRs process three samples per clock (three lanes) and use multipliers
that are split in two with a register in between, so a path through a FIR is
about half a multiply plus two adds. The top level has a
plain one-sample-per-clock interface: 32-bit `x` in and 32-bit `y` out, with
`clk` and `rst`.

## What the filter computes

Samples are 32-bit two's-complement integers. Coefficients are 16-bit signed
fixed-point numbers with 14 fractional bits (Q2.14): a value `v` is stored as
`round(v * 2**14)`. The scaling factor `S = SCALE / 2**14` uses the same format.

The pipeline inside the loop means the feedback cannot reach the immediately
preceding outputs. It reaches back `D = L*(T+2)` samples, which is 15 with the
defaults (L = 3 lanes, T = 3 taps). Writing `v(n)` for the filter's n-th output:

```
v(n) = sat32( floor( SCALE * ( Σ_j B[j]·x(n-j) + Σ_j A[j]·v(n-D-j) ) / 2**28 ) )
```

Leaving aside saturation, the transfer function is

```
V(z) / X(z) = S·B(z) / (1 − S·z^-D·A(z))
```

This is the scattered look-ahead form of a recursive filter. The poles of
`1 − S·z^-D·A(z)` lie inside the unit circle whenever `S·Σ|A[j]| < 1`.

The default coefficients are `B = A = {1, 3/4, 9/16}` and `S = 1/4`. These
are the constants of the classic first-order look-ahead example (pole `a = 3/4`,
`a² = 9/16`). The loop gain is 0.25 × 2.3125 = 0.578, so the default filter is
stable. Its DC gain is 0.578 / (1 − 0.578) ≈ 1.37, so a held input above about
73 % of full scale drives the output into saturation. To realise a particular
IIR response, choose the coefficients in look-ahead form. The denominator
terms must then start at `z^-D`, and the numerator absorbs the intermediate
terms. This may need more taps (`T`). Note that raising `T` also raises `D`.

## The parallel FIR (`par_fir`): how the lanes and the pipeline line up

This is the hardest part to read in the code. One clock with `en = 1` delivers
block `k`: `din[r] = x(3k + r)` for r = 0, 1, 2. Output lane `r` must produce

```
dout[r] = Σ_{j=0}^{T-1} H[j] · x(3k + r − j)
```

Each lane is a row of T multipliers followed by a chain of adders. There is a
register after every adder, so a row's partial sum moves one step down the
chain per enabled clock. Tap `j` is added `j` clocks later than tap 0.
Therefore tap `j` does not read the current block. It reads the block from `j`
clocks earlier, which comes from a small history of past input blocks
(`hist`). Samples with `r − j < 0` belong to an earlier block, so they come from
one or more further blocks back. Combined, tap `j` of lane `r` reads

```
lane  = (r − j) mod L
age   = j + ceil(max(0, j − r) / L)      // blocks back; 0 = din itself
```

For the default L = 3, T = 3 (history depth 3 blocks):

| lane r | tap 0         | tap 1          | tap 2          |
|--------|---------------|----------------|----------------|
| 0      | din[0], age 0 | lane 2, age 2  | lane 1, age 3  |
| 1      | din[1], age 0 | lane 0, age 1  | lane 2, age 3  |
| 2      | din[2], age 0 | lane 1, age 1  | lane 0, age 2  |

Every row is therefore an exact FIR with a fixed latency. Results are kept at
full precision: `W + CW + clog2(T)` = 50 bits.

Timing: `dout` for a block is valid after **T + 1 enabled clock edges**. One
edge is for the multiplier register and T are for the adder-chain registers. A
new block is accepted on every enabled edge.

## The split multiplier (`fg_mult`)

Each product `a × c` (32 × 16 bits) is computed in two halves:

* **m1**: `a × c[7:0]`, with the low byte taken as unsigned.
* A register holds that partial product, together with `a` and the signed high
  byte `c[15:8]`.
* **m2**: `(a × c[15:8]) << 8`, plus the partial product.

`p` comes straight out of m2, so it is valid one enabled edge after the
operands were presented. It then feeds the first adder of its row without
another register.

## Scaling (`iir_scale`)

The scaling stage multiplies the 51-bit sum of the two FIR results by `SCALE`.
It shifts right arithmetically by 28 bits, which removes the two Q2.14 weights
and rounds toward minus infinity. It then clips to the 32-bit range. A `sat`
output flags clipping. The stage is combinational, and the core registers its
result. Its 51 × 16-bit multiply, together with the adder in front of it, is
the longest combinational path of the design: the FIRs are finely pipelined
but the scaling stage is not. With a power-of-two `SCALE`, synthesis reduces
the multiply to a shift.

## The recursive core (`iir_core`)

The core holds the two `par_fir` instances, three adders, three scaling stages
and the output register `y_q[0..2]`. `y_q` feeds the feedback FIR directly.
The loop runs through:

1. `y_q`
2. the feedback FIR (T + 1 edges)
3. the adder and scaling stage
4. `y_q`

That is **P = T + 2 blocks** (5 with the defaults), which is why
`D = 3 × 5 = 15`. The output of block `k` appears on `y` P enabled edges after
block `k` was presented. `sat` is high in a clock with `en = 1` if any lane of
the block being registered is clipped.

## Top level (`iir`): serial interface

The top level has the pins `clk`, `rst`, `x[31:0]`, `y[31:0]`, with one
sample per clock in each direction. Inside it, three stages do the work:

* **Serial to parallel.** A phase counter `ph` (0, 1, 2) collects three input
  samples into `xblk`. It then raises `blk_valid` for one clock.
* **Core.** `blk_valid` is the core's clock enable, so the core advances once
  every three clocks. There is one clock domain and no divided clock.
* **Parallel to serial.** The core's output block is stable for three clocks.
  A multiplexer shows lane `(ph − 1) mod 3` on `y`.

**Timing:** `y` at clock `c` equals `v(c − 16)`. The latency is
`(T+2)·L + 1 = 16` clocks, counted from the clock in which `x` carries sample
0. Sample 0 is the first clock after `rst` is released. `rst` is synchronous
and active high, and clears every register. `y` is 0 until the pipeline has
filled.

Because the top level takes one sample per clock, the three-lane core runs at
a third of the clock rate. The three-lane structure pays off when the core
(`iir_core`) is used directly, with three samples per clock on its array
ports.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `L` | 3 | lanes (samples per block) |
| `T` | 3 | taps of each FIR |
| `W` | 32 | sample width |
| `CW` | 16 | coefficient width |
| `F` / `FRAC` | 14 | fractional bits of coefficients |
| `B`, `A` | {1, 3/4, 9/16} | feed-forward / feedback coefficients, arrays of T |
| `SCALE` | 1/4 | scaling factor |

Shared sizes and default coefficients are in `rtl/iir_pkg.sv`. If you change
`T`, you must also pass `B` and `A` arrays of the new length. The latency
formulas above are general. They are checked by simulation for the FIR with
L = 3 and 4 and T = 3 and 6, and for the whole filter with L = 3 and T = 3 and 8.

## Files

| file | contents |
|------|----------|
| `rtl/iir_pkg.sv` | sizes, coefficient type, default coefficients |
| `rtl/fg_mult.sv` | two-stage split multiplier |
| `rtl/par_fir.sv` | L-lane pipelined FIR |
| `rtl/iir_scale.sv` | scale, round, saturate |
| `rtl/iir_core.sv` | feed-forward FIR + feedback FIR + scaling loop |
| `rtl/iir.sv` | top level with serial interface |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench compares the design sample by sample with an independent
integer model of the equations above, computed in 128-bit arithmetic. Each
ends by printing `TB_RESULT checks=N failures=M`. The checks cover:

* `tb_fg_mult`: random and extreme operands, the one-clock latency, and
  holding while `en` is low.
* `tb_iir_scale`: scaling by +1/4 and −3/4, rounding, and clipping at both
  ends.
* `tb_par_fir`: 3-lane/3-tap and 4-lane/6-tap instances, where taps reach more
  than one block back. Enables are random, and the latency must be exactly
  T + 1.
* `tb_iir_core`: random blocks with idle clocks in between. It counts outputs
  that carry feedback and outputs that saturate, and fails if either never
  happens.
* `tb_iir`: the top level at its default parameters, with a 16-clock latency
  check. The input runs through an impulse, a step, random samples of mixed
  amplitude and a saturating level. It then applies a reset mid-stream and
  runs again.
* `tb_iir_8tap`: the same end-to-end test with 8-tap FIRs (`T = 8`, taps
  0.75^j, `S = 3/16`). Here the loop delay is 30 samples and the latency is
  31 clocks.

Run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_iir \
    rtl/iir_pkg.sv rtl/fg_mult.sv rtl/par_fir.sv rtl/iir_scale.sv \
    rtl/iir_core.sv rtl/iir.sv tb/tb_iir.sv
./obj_dir/Vtb_iir
```

Every test runs in well under a second.

## How far this follows the architecture it implements, and where it departs

These parts follow the architecture:

* the overall structure: two parallel pipelined FIRs, an adder, a scaling
  stage and feedback from the output;
* three parallel input lanes `X(3k)…X(3k+2)` broadcast to three output rows;
* three taps;
* multipliers split into two units with a register between them;
* a registered adder chain in every row;
* the top-level pin names and 32-bit widths.

These are choices of this design and are not taken from the source:

* **Row alignment.** The architecture's drawing places one register between
  the adders of each row. On its own that does not yield a plain FIR. Here
  each later tap reads its sample one block older, from an input history, so
  the rows are exact (see the table above).
* **Loop delay.** How the pipeline latency inside the recursion is absorbed is
  not specified. Here the feedback FIR sees outputs D = 15 samples old, the
  look-ahead form.
* **Coefficients.** No coefficients are given for the FIR-based filter. The
  defaults reuse the look-ahead example's constants, and the scaling factor
  of 1/4 is chosen for stability.
* **Number format.** The Q2.14 coefficient format, the floor rounding and the
  output saturation are this design's own.
* **Sign convention.** A textbook difference equation subtracts the feedback
  terms, but the block diagram shows an adder. The adder is kept, and the
  sign lives in `A`.
* **Tap count.** An 8-tap FIR is also mentioned as a building block. The
  three-tap structure that is drawn in detail is the default. `T` is a
  parameter, and `tb_iir_8tap` exercises the 8-tap configuration.
* **Serial interface.** The serial-to-parallel and parallel-to-serial
  conversion in the top level, and the synchronous active-high reset.

Not included:

* The simpler first-order look-ahead IIR and the two-level (2-parallel,
  2-pipeline) IIR. These are reference designs that the FIR-based filter was
  compared against, not parts of it.
* The reported FPGA implementation figures: 172 slice registers, 120 LUTs,
  16 DSP blocks and 285 MHz on a Virtex-5. They have not been reproduced, and
  they depend on word lengths and a tool flow that are not known. At the
  defaults this RTL has 18 split multipliers in the two FIRs plus 3 scaling
  multipliers.
