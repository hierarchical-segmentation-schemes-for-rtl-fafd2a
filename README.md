# Hierarchical-segmentation function evaluator

A pipelined hardware unit that computes a fixed function `y = f(x)` of an
n-bit input `x = 0.x[n-1]..x[0]` in `[0, 1)` with one result per clock. Over
the whole input range, `f` is replaced by piecewise polynomials: one low-degree
polynomial for each segment of `[0, 1)`. Compound functions such as `x·ln(x)`
or `sqrt(-ln(x))` curve very steeply in some places and hardly at all in
others, so uniform segments waste table space. This unit therefore uses a
**two-level hierarchy of segments**:

* an **outer** level, whose segments are either uniform (US) or grow and
  shrink by powers of two (P2S): small near 0 and 1, large in the middle;
* an **inner** level that divides each outer segment uniformly into `2^v1`
  pieces, with its own `v1` for each outer segment.

Curved regions get many small segments and flat regions a few large ones, but
finding the segment of an input stays cheap. It takes a leading-zero/one
count, a small table and a shift, with no comparators against stored
boundaries.

The default build evaluates **f2(x) = x·ln(x)** (used for entropy and mutual
information) with 16-bit input and output, second-order polynomials, and a
P2SL(US) hierarchy with v0 = 12. That takes 47 segments, about 4.4 kbit of
tables in all. Every one of the 65,536 outputs is *faithfully rounded*: its
error is below one unit in the last place (ulp), and the worst case is
0.794 ulp. Tables for five more configurations are included:

* sqrt(−ln x), the Box–Muller step of a Gaussian noise generator;
* a rational function with two sharp peaks, in two schemes;
* a 20-bit version of x·ln(x);
* a first-order version of x·ln(x).

Any function can be used by supplying new tables.

## Data flow

```
 x ──► [ delta0 | delta1 | delta2 ]            (field boundaries depend on x)
          │
          ▼
     P2S unit ── j ──► ROM0[j] = {v1, offset}
                              │        │
 x, j, v1 ──► bit selection ──┼─ delta1 ─► (+) ──► ROM1[offset+delta1] = {c2, c1, c0}
                   │                                          │
                   └── x_hat = delta1:delta2 ────────────► Horner: (c2·x̂ + c1)·x̂ + c0
                                                              │
                                                   round, saturate ──► y
```

| stage (clock) | work | module |
|---|---|---|
| 1 | register x | `hfs_eval` |
| 2 | outer address j from the top v0 bits | `p2s_unit` |
| 3 | read `{v1, offset}` | `hfs_rom0` |
| 4 | extract x̂ and delta1, form the ROM1 address | `bit_select`, `offset_adder` |
| 5 | read the coefficients | `hfs_rom1` |
| 6–9 | two Horner steps, each a multiply clock and an add clock | `poly_eval` |
| 10 | round to nearest, saturate | `poly_eval` |

At degree 2 the arithmetic is two multipliers and three adders: two in the
Horner chain and the offset adder.

`y` and `out_valid` come exactly **10 clocks** after `x` and `in_valid`
(`6 + 2·D` for degree D). A new input may be given on every clock. There is
no back-pressure.

## Powers-of-two outer segments

This is the least obvious part of the design. Call the top v0 bits of x
`delta0 = a[v0-1]..a[0]`. With **P2S**, v0 bits address `2·v0` outer
segments. For v0 = 5 in an 8-bit input:

| j | inputs (outer bits shown before the space) | size |
|---|---|---|
| 0 | `00000 xxx` | 8 |
| 1 | `00001 xxx` | 8 |
| 2 | `0001 xxxx` | 16 |
| 3 | `001 xxxxx` | 32 |
| 4 | `01 xxxxxx` | 64 |
| 5 | `10 xxxxxx` | 64 |
| 6 | `110 xxxxx` | 32 |
| 7 | `1110 xxxx` | 16 |
| 8 | `11110 xxx` | 8 |
| 9 | `11111 xxx` | 8 |

The address is a run-length count, which `p2s_unit` computes without a
priority encoder. Two prefix chains walk down from `a[v0-1]`:

* the OR chain, `or[k] = a[v0-1] | … | a[v0-1-k]`;
* the AND chain, `and[k] = a[v0-1] & … & a[v0-1-k]`.

A one-bit multi-operand adder (a population count) then adds `a[v0-1]` and
the chain taps:

* **P2S**: `a[v0-1] + Σor + Σand` gives 0 … 2v0−1.
* **P2SL** (segments small only near 0): `a[v0-1] + Σor` gives 0 … v0. The
  last address covers the whole upper half `1xxxx`.
* **P2SR** (segments small only near 1): `a[v0-1] + Σand` gives 0 … v0. The
  first address covers the whole lower half `0xxxx`.
* **US**: the unit is bypassed and `j = delta0`, giving 2^v0 equal segments.

Because the outer segments differ in size, the inner field `delta1` does not
sit at a fixed position. `bit_select` finds `p`, the bit of delta0 right after
which delta1 starts:

* after `a[0]` for j = 0 and j = s0−1;
* after `a[j-1]` for 1 ≤ j < s0/2;
* after `a[s0-2-j]` for s0/2 ≤ j ≤ s0−2.

Here s0 = 2v0 is the P2S segment count. P2SL and P2SR each use one half of
this rule. The low `R = p + n − v0` bits of x form **x̂**: the distance of x
from the start of its outer segment, in units of 2^−n. A right barrel shift by
`R − v1` leaves `delta1`, the inner segment index. ROM1 is addressed by
`offset + delta1`.

## Polynomial evaluation and number formats

Each inner segment's polynomial is written in **x̂**, not in x. This keeps
the multiplier operand short: it never needs more bits than the widest outer
segment. The multiplier operand is the whole of `delta1:delta2`, so one
polynomial serves all of its inner segment even though x̂ is measured from
the start of the outer segment.

Fixed-point formats in `poly_eval`:

* `x̂` is unsigned, n bits, with weight 2^−n.
* `c_k` is a CW-bit two's-complement number with `CF[k]` fractional bits.
  `CF[k]` is set per coefficient when the table is made, because the curvature
  term c2 can be thousands of times larger than c0. For x·ln(x), c2 reaches
  about 10^4 in the segment next to 0.
* After each product, an arithmetic shift by `CF[k+1] + n − CF[k]` aligns it
  to the next coefficient. The dropped bits are truncated, and the sum is kept
  in `ACC_W = CW + 1` bits.
* The final sum is rounded to nearest (ties up) at `OUT_F` fractional bits and
  saturated to `OUT_W` bits.

The accuracy budget is:

* at most 0.3 ulp of approximation error per segment;
* a little truncation error in the datapath;
* 0.5 ulp from the final rounding.

The total stays below 1 ulp. This is checked bit-exactly for every input
when a table is made, and again in simulation.

## Tables and configurations

The table files hold one hex word per line:

* ROM0: `{v1[4:0], offset}`.
* ROM1: `{c_D, …, c_1, c_0}`, with c_0 in the least significant bits.

They were produced at design time for each configuration, as follows:

1. For each outer segment, start with v1 = 0.
2. Fit each inner segment with a minimax polynomial over its actual 2^−n
   input grid.
3. Increase v1 until every inner segment is within 0.3 ulp.
4. Place the offsets and choose the binary points so that the largest
   coefficient fills CW bits.
5. Run the bit-exact datapath over all inputs.

| tables (`rtl/`) | function | scheme, v0 | segments m | CW | CF (c0, c1, c2) | OUT_F | worst error |
|---|---|---|---|---|---|---|---|
| `hfs_f2_*` (default) | x·ln(x) | P2SL, 12 | 47 | 30 | 30, 25, 15 | 16 | 0.794 ulp |
| `hfs_f3_*` | f3 | US, 5 | 126 | 24 | 22, 17, 13 | 14 | 0.792 ulp |
| `hfs_f1_*` | sqrt(−ln x) | P2S, 12 | 78 | 32 | 29, 18, 10 | 13 | 0.789 ulp |
| `hfs_f3p2sr_*` | f3 | P2SR, 5 | 310 | 28 | 20, 17, 17 | 14 | 0.716 ulp |
| `hfs_f2n20_*` | x·ln(x), N = 20 | P2SL, 16 | 155 | 40 | 40, 35, 21 | 20 | 0.696 ulp |
| `hfs_f2d1_*` | x·ln(x), D = 1 | P2SL, 12 | 382 | 26 | 26, 21 | 16 | 0.742 ulp |

The last row is a first-order table. Without the c2 term, x·ln(x) needs
about eight times as many segments (382 against 47), but one multiplier and
two pipeline clocks less (latency 8).

In the table, `f3(x) = (0.0004x + 0.0002) / (x⁴ − 1.96x³ + 1.348x² − 0.378x +
0.0373)`. It ranges from 0.005 to 1.26 and has two sharp peaks.

`ln` is the natural logarithm. Outputs are signed words as wide as the input.
The value of `OUT_F` sets the range:

* `OUT_F = 16` gives [−0.5, 0.5), which holds x·ln(x) ∈ [−1/e, 0].
* `OUT_F = 14` gives [−2, 2), which holds f3.
* `OUT_F = 13` gives [−4, 4), which holds sqrt(−ln x) ≤ 3.34.

Every input is covered except x = 0 for x·ln(x) and sqrt(−ln x). There `exc`
is raised with y = 0 (`EXC_ZERO = 1`).

The P2SR table uses f3 only to exercise that scheme. f3 needs the most
segments under P2SR of all four schemes (310 against 126 with US).

To run another configuration, override the parameters of `hfs_eval` together
with the table files. The instances in `tb/hfs_eval_tb.sv` and
`tb/hfs_eval_n20_tb.sv` show the parameter sets. `N`, `D`, `SCHEME`, `V0`,
`S0`, `M`, `OFF_W`, `CW`, `CF`, `OUT_W` and `OUT_F` must all match the tables.

## Interface of `hfs_eval`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset. It clears only the valid flags; data registers are not reset |
| `in_valid` | in | 1 | `x` is valid this clock |
| `x` | in | N | input, unsigned fraction |
| `out_valid` | out | 1 | `y` and `exc` are valid, 6 + 2·D clocks (10 at D = 2) after `in_valid` |
| `y` | out | OUT_W | f(x), two's complement with OUT_F fractional bits |
| `exc` | out | 1 | x was 0 (when `EXC_ZERO` is set); y is then 0 |

The ROMs read only on clocks when a valid input is in their stage. Two
assertions in `hfs_eval` check that ROM addresses stay inside the tables.

## Where this follows the published scheme and where it does not

Taken from the published scheme:

* the two-level hierarchy and the US / P2S / P2SL / P2SR outer schemes;
* the P2S address circuit (OR and AND prefix chains plus a one-bit adder) and
  the 10-segment v0 = 5 example above;
* the placement rule for delta1;
* the two cascaded tables, the offset adder and the barrel-shifter bit
  selection;
* the translated operand delta1:delta2;
* the Horner datapath with d multipliers and d adders;
* the n-bit-in, n-bit-out format, the exception at x = 0, full pipelining,
  and faithful rounding as the accuracy goal.

Choices made in this design:

* **P2SL and P2SR taps.** The published description assigns the AND chain to
  P2SL and the OR chain to P2SR. With the chains as drawn, counting the
  leading zeros (needed when segments are small near 0) takes the OR chain.
  This design therefore uses the OR taps for P2SL and the AND taps for P2SR.
  Both choices give the same segments if the chain inputs are inverted.
* **Segments covering the rest of [0, 1).** P2SL and P2SR add one wide segment
  so that they cover all of [0, 1).
* **Pipeline depth.** There are 10 stages. The published FPGA builds report
  12–14 cycles of latency at 135–198 MHz. That latency and clock rate were
  not targeted here, and no timing closure was done.
* **Datapath.** Number formats, truncation and rounding, one common
  coefficient width with a binary point per coefficient, saturation, the
  valid handshake, reset, and y = 0 on an exception.
* **Segment counts.** The default x·ln(x) table has 47 segments, f3 has 126,
  sqrt(−ln x) has 78 and the 20-bit x·ln(x) has 155. The published counts are
  44, 107, 72 and 124, but they were obtained with double-precision data
  paths. The table-size comparison is close: 4,373 bits
  here against 4,620 published for 16-bit x·ln(x).
* **Configuration at build time.** `SCHEME` and `V0` are parameters, because
  they must match the table contents.

Not provided:

* the segmentation program itself;
* 24-bit tables. The RTL takes N = 24, but a faithful 24-bit x·ln(x) table
  is about 84 kbit (636 segments of 3 × 44 bits), far more than a small data
  file should hold. 20 bits is the widest size built and simulated. The
  published 24-bit design also uses only about 40 kbit. A generator that
  balances the per-coefficient widths would be needed to approach it.

## Files

* `rtl/hfs_pkg.sv`: scheme enum, `MAX_D`, and the depth helper.
* `rtl/p2s_unit.sv`, `rtl/bit_select.sv`, `rtl/offset_adder.sv`: the
  combinational address logic.
* `rtl/hfs_rom0.sv`, `rtl/hfs_rom1.sv`: the tables, each a synchronous-read
  array initialised with `$readmemh`.
* `rtl/poly_eval.sv`: the Horner pipeline (degree 1 … 4).
* `rtl/hfs_eval.sv`: the top level.
* `rtl/*.hex`: the table files. Each path is relative to the directory the
  simulator runs in, which must be the project root.
* `tb/*_tb.sv`: self-checking testbenches. Each prints
  `TB_RESULT checks=N failures=M`.
  * `hfs_eval_full_tb`: the default build, all 2^16 inputs back to back.
  * `hfs_eval_tb`: the five 16-bit configurations with random bubbles. It
    also counts bypass, each P2S form, exceptions, and the narrowest and
    widest segments.
  * `hfs_eval_n20_tb`: the 20-bit configuration, all 2^20 inputs.
  * `poly_eval_tb`: a bit-exact model of the datapath at degrees 1, 2 and 3.
* `tb/hfs_check.sv`, `tb/poly_eval_harness.sv`: scoreboards shared by the
  testbenches.
* `tb/rom*_pattern.hex`: formula-generated patterns for the ROM tests.

## Simulating

From the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/hfs_pkg.sv tb/hfs_eval_full_tb.sv --top-module hfs_eval_full_tb -o sim
./obj_dir/sim
```

Use the same command for any other testbench, changing the file and
`--top-module`. Each testbench finishes within a few seconds.
The end-to-end tests compare every output with the function computed in
double precision, so they do not depend on the tables being right. They also
check the latency of every result.
