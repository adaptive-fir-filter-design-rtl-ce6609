# Aging-aware adaptive FIR filter

An LMS adaptive FIR filter whose multipliers keep working as the silicon
ages. Bias temperature instability (NBTI in pMOS, PBTI in nMOS) raises
threshold voltages over the life of a chip. Gates get slower, and a design
closed at its fresh timing starts to miss the clock. The usual fix is a
worst-case guard band on the clock period, which wastes speed for most of
the chip's life.

Here each multiplier is a **variable-latency** unit instead. It gives an
input pattern one clock cycle when the pattern exercises only short paths,
and two cycles otherwise. A **Razor** register on the product catches the
rare pattern that was judged fast but arrived late, and recovers the correct
value. An **aging indicator** counts these misses. Once they become
frequent, it switches the judgement to a stricter rule, so more patterns get
two cycles. The filter is built around eight of these multipliers and waits
for them as needed.

All of the RTL is synthesizable SystemVerilog (IEEE 1800-2017). The only
parts not included are the delay element that makes the Razor's delayed
clock and the physical aging itself.

## Hierarchy

```
aafir_top
├── adaptive_fir            4-tap LMS filter, 16-bit samples
│   └── aging_aware_mult ×8   (column bypassing) 4 tap + 4 update multipliers
│       ├── column_bypass_mult   16×16 array, full_adder cells
│       ├── razor_ff             32-bit product register with shadow
│       └── ahl                  adaptive hold logic
│           ├── judging_block ×2   zeros > n, zeros > n+1
│           └── aging_indicator    error counter per window
└── aging_aware_mult        (row bypassing) stand-alone 16×16 unit
    └── row_bypass_mult, razor_ff, ahl ...
aafir_pkg                   bypass_e enum, magnitude(), saturate()
```

## Why the number of zeros predicts the delay

Both multipliers are carry-save arrays: 16 rows of 16 full adders, with a
ripple-carry adder as the last row. Row 0 holds the partial products
a_i·b_0. Row j adds a_i·b_j to the sums of the row above, shifted one column,
and keeps its carries in the same column for the next row. Bit j of the
product leaves the array at the right end of row j. The last row resolves
the remaining sums and carries into bits 16..31.

**Column bypassing** (`column_bypass_mult`). When multiplicand bit a_i is 0,
every partial product in column i is zero. The adders of that column then
have their inputs forced to 0 (operand isolation, in place of the tri-state
gates of a custom circuit). A multiplexer passes the sum from the adder
above straight down, with a carry of 0. This is exact, because the carry
entering a bypassed column comes from the bypassed adder above it, and that
carry is 0.

**Row bypassing** (`row_bypass_mult`). When multiplier bit b_j is 0, row j
adds nothing. Its adders are isolated, and multiplexers pass the sums and
the carries of the row above down, both moved one column to the right, as an
active row would move them. One bit does not fit this scheme: the carry that
would leave the right edge (weight 2^j). It is ANDed with the inverse of b_j,
collected in a 16-bit correction word and added back by a correction adder at
the right-hand side. Without that adder the row-bypassing array is wrong
whenever a bypassed row follows an active one.

Either way, every zero in the controlling operand takes a column or row of
adders out of the switching path. An operand with many zeros has a short
critical path. This link between zero count and delay is what the hold
logic relies on.

## Adaptive hold logic and the cycle timing

`ahl` holds two `judging_block`s. Each counts the zeros of the operand that
controls bypassing: the multiplicand for column bypassing, the multiplier for
row bypassing.

- Judge 0 says "one cycle" if zeros > n.
- Judge 1 says "one cycle" if zeros > n + 1.

n defaults to 8 for 16-bit operands. The aging indicator selects judge 0
while the circuit is fresh and judge 1 once it has aged.

The multiplexer output is ORed with the inverted output of a D flip-flop
clocked on the **falling** edge. That flip-flop's output is `gating_n`. For a
two-cycle pattern:

```
rising edge  t0 : operands loaded into md_q/mr_q, product starts to settle
falling edge     : judge says "two cycles"  -> gating_n = 0
rising edge  t1 : hold: operand registers keep their value, product not taken
falling edge     : OR with ~gating_n forces 1 -> gating_n = 1
rising edge  t2 : Razor register captures the product, next operands load
```

A one-cycle pattern is captured at t1, and the next operands load at that
same edge, so fast patterns stream at one per cycle. The OR with
`~gating_n` makes a hold last exactly one edge. An extra input, `active`,
suppresses holds while no operation is in flight.

The original circuit gates the clock of the operand registers with
`clk & gating_n`. This RTL uses a register enable instead. The behaviour at
the clock edges is the same, and the design has no derived clock. If you
replace the enable with an integrated clock-gating cell, it needs the
falling-edge decision exactly as it is.

## Razor register and re-execution

`razor_ff` has a main flip-flop on `clk` and a shadow register on `clk_del`,
a slightly delayed copy of the clock. A product that settles after the `clk`
edge but before the `clk_del` edge leaves a stale word in the main flip-flop
and the right word in the shadow. XOR comparison, ORed over the word, then
raises `error` in the following cycle. The comparison is qualified by a
registered copy of the capture enable, so a register that is only holding
never reports an error.

On an error the multiplexer in front of the main flip-flop reloads it from
the shadow at the next edge. In `aging_aware_mult` this costs one cycle:

- `out_valid` stays low during the error cycle.
- The corrected product is presented one edge later.
- Any operation already loaded waits that cycle too.

Each error is also counted by the aging indicator.

**Simulation without gate delays.** In RTL simulation the multiplier has no
delay, so a real setup violation cannot happen. With a truly delayed
`clk_del`, the shadow would also see the *next* operation's product (the
short-path constraint of a real Razor cannot be met at zero delay). For that
reason the shadow is an edge-triggered register rather than a latch, and
system-level simulations tie `clk_del` to `clk`. The testbenches create a
timing violation by overwriting the main flip-flop just after it captured,
which is exactly the state a late product leaves behind. `tb_razor_ff`
checks the register alone with a real 3 ns clock delay and late data.

## Aging indicator

`aging_indicator` counts completed operations and Razor errors. Every
`WINDOW` (32) operations both counters return to zero. If the error count
inside one window exceeds `THRESHOLD` (3), `aged` goes to 1 and stays there
until reset, because aging does not reverse. From then on, a pattern with
exactly n + 1 zeros, which was a one-cycle pattern before, gets two cycles.

## The LMS filter

`adaptive_fir` runs the LMS recursion on 16-bit two's-complement Q1.15
samples:

```
y(n)     = sat( (sum_k w_k * x(n-k)) >>> 15 )
e(n)     = sat( d(n) - y(n) )
w_k(n+1) = sat( w_k + (x(n-k) * e(n)) >>> (15 + MU_SHIFT) )     mu = 2^-4
```

`>>>` rounds toward minus infinity, and `sat` clamps to 16 bits. The
coefficients start at zero.

Four tap multipliers form the products w_k·x(n-k), and four update
multipliers form x(n-k)·e(n). All eight are aging-aware multipliers with
column bypassing. The arrays are unsigned, so the filter feeds them
magnitudes and applies the XOR of the operand signs afterwards. The sample
magnitude is the multiplicand, which is the operand the hold logic judges.

One sample is processed at a time:

| state   | what happens                                                   |
|---------|----------------------------------------------------------------|
| `S_IDLE`| `in_ready` high; accept x(n), d(n), shift the delay line        |
| `S_FIR` | issue the four tap multiplies, collect results as they arrive   |
| `S_SUM` | form y(n) and e(n)                                              |
| `S_UPD` | issue the four update multiplies, collect results               |
| `S_WUP` | write coefficients; `out_valid` with y, e and `coef` next cycle |

From the edge that accepts a sample to the edge that sees `out_valid`, a
sample takes 7 + L_fir + L_upd edges. L_fir and L_upd are the slowest
multiplier latencies (1 or 2) of the tap step and the update step, so a
sample takes 9 edges at best and 11 when both steps hold. Each Razor
correction inside a step adds one edge. Per-multiplier `mult_error`,
`mult_aged` and `mult_hold` flags are brought out.

## Top level

`aafir_top` holds the filter (column bypassing) and, beside it, a
stand-alone 16×16 aging-aware multiplier with **row** bypassing, so both
multiplier variants are available and observable. The two share only
`clk`, `clk_del` and `rst_n`. Filter ports are prefixed `f_` and multiplier
ports `rb_`. `clk_del` is an input, because the delay element is a physical
part. Reset is synchronous and active low everywhere.

## Parameters

| parameter | default | meaning | origin |
|-----------|---------|---------|--------|
| `M`       | 16 | multiplier operand width (32 also intended) | given |
| `TAPS`    | 4  | filter length | given |
| `BYPASS`  | `BYPASS_COLUMN` | array variant in an aging-aware multiplier | given (both) |
| `N`       | M/2 = 8 | judging threshold n | chosen |
| `WINDOW`  | 32 | operations per aging window | chosen |
| `THRESHOLD` | 3 | errors per window that mean "aged" | chosen |
| `DW`, `FRAC` | 16, 15 | sample format Q1.15 | chosen |
| `MU_SHIFT` | 4 | step size mu = 1/16 | chosen |

The multipliers are parameterised in M; the aging-aware multiplier is
tested at 16 and at 32 bits.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=F`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/aafir_pkg.sv \
          --top-module tb_aafir_top tb/tb_aafir_top.sv
./obj_dir/Vtb_aafir_top
```

Replace `tb_aafir_top` with any other testbench in `tb/`.

| testbench | checks |
|-----------|--------|
| `tb_column_bypass_mult`, `tb_row_bypass_mult` | 3000+ random and corner 16×16 products; exhaustive 4×4, including 1111×1001 |
| `tb_razor_ff` | real 3 ns delayed clock: late data raises `error`, the value is restored one edge later; holds never flag |
| `tb_judging_block` | all 65536 operands at n = 8 and n = 9 |
| `tb_aging_indicator` | threshold, window reset, errors that straddle windows, stickiness |
| `tb_ahl` | falling-edge hold decision against a reference on random operands; one-edge holds; judge switch after aging |
| `tb_aging_aware_mult` | both variants at 16 and at 32 bits: every product, exact 1- and 2-cycle latency, injected Razor errors corrected one cycle later, aging switch |
| `tb_adaptive_fir` | system identification of a 4-tap system, 400 samples, bit-exact against an LMS reference; per-sample latency; injected errors in the second half; convergence; a second filter built with row bypassing, checked against the same reference |
| `tb_aafir_top` | the whole top at default parameters: the filter and the row unit together, with holds, Razor errors, corrections and aging in both, each counted and required |

## What is specified and what is chosen

These parts follow the architecture as described:

- the bypass rules of both arrays;
- the Razor structure (main flip-flop, shadow, XOR comparator, restoring
  multiplexer);
- the hold logic (two judging blocks at n and n+1, multiplexer steered by
  the aging indicator, OR with the inverted output of a falling-edge
  flip-flop);
- the aging indicator as a windowed error counter;
- the four-tap LMS structure with aging-aware multipliers.

These are this implementation's own choices:

- n, the window length, the error threshold, and that `aged` stays set;
- the sample format, step size, saturation and sign-magnitude use of the
  unsigned arrays;
- the valid/ready handshakes and the filter's one-sample-at-a-time
  sequencing;
- the register enable in place of the clock gate;
- an edge-triggered shadow register instead of a latch;
- the carry routing of the row-bypassing array, including its correction
  adder.

Not modelled: the delay element that produces `clk_del`, and any real path
delay. This RTL shows the control behaviour of the scheme (holds,
detection, recovery, aging response) exactly. It cannot show the timing
benefit, which only appears at gate level with aged delay models.
