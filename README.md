# Two-path floating-point adder with a variable-latency pipeline

Adding two IEEE binary floating-point numbers the textbook way is a long
chain of steps. You compare the exponents, shift the smaller significand
right, and add or subtract. A negative difference is complemented. Then the
leading one is found, the result is shifted left or right, rounded, and
renormalized if rounding carried out. Each of these steps costs an adder, a
big shifter or a wide multiplexer, and they all sit in series.

This design breaks that chain using one fact: no single operation needs all
the steps.

* A large left shift (deep cancellation) can only happen in an effective
  subtraction whose exponents differ by at most one. In that case the
  alignment shift is 0 or 1 place, and the result is always exact, so
  nothing needs rounding.
* A large alignment shift only happens when the exponents are far apart. In
  that case the sum needs at most a one-place normalization.

So two datapaths run in parallel on every operation. The **close path**
(also called the cancellation path) and the **far path** each do only the
work they can ever need. At the end, a multiplexer keeps the one whose
assumptions held. A second top-level variant pipelines the same datapaths
into three stages. Easy operations leave early: after 1, 2 or 3 cycles. A
small scheduler keeps two results from reaching the result bus in the same
cycle.

Everything is parameterized by the exponent width `EXP_W` and fraction width
`MAN_W`. The default is binary64 (`EXP_W=11`, `MAN_W=52`, significand
`P = 53` bits). The design handles:

* binary64 or binary32 operands on the same combinational unit;
* all four IEEE rounding modes;
* subnormals, signed zeros, infinities and NaNs;
* the invalid, overflow and inexact flags.

## Operand preparation (`fp_exp_swap`, `fp_special`)

Each operand is unpacked into a sign, an *effective exponent* and a
significand with its hidden bit. A zero or subnormal operand (exponent field
0) is treated as exponent 1 with hidden bit 0, so subnormals need no special
datapath.

* The effective operation is a subtraction when the sign of `a` differs from
  the sign of `b` after applying `sub`.
* The operand with the larger exponent is routed first, and the
  (non-negative) exponent difference is computed.
* On equal exponents `a` stays first. The far path does not care, and the
  close path sorts out the sign itself.

`fp_special` runs in parallel and takes over when an operand is a NaN or an
infinity:

* Any NaN operand gives the default quiet NaN `0x7FF8...0`.
* A signalling NaN operand, or infinity minus infinity, also raises invalid.
* Otherwise an infinity passes through with its effective sign.

## Close path (`close_sub`, `lop`, `penc`, `norm_shift`)

The close path is used only when the exponents differ by 0 or 1. Under that
promise, the two low exponent bits are enough to know which operand is
larger: `(ea - eb) mod 4` is 0, 1 (`a` larger) or 3 (`b` larger). So
`close_sub` does not wait for the full exponent subtraction.

It forms:

* `X`: the larger-exponent significand with one zero appended;
* `Y`: the other significand, shifted right by 0 or 1 place.

With `Y` shifted by one place, the shifted-out bit lands in the appended
position, so nothing is lost.

A compound adder gives `X + ~Y` (that is, `X - Y - 1`) and `X - Y` together.
With equal exponents, `X - Y` can be negative. In that case the result is
`~(X + ~Y)`, which equals `Y - X`, and the sign is flipped. This costs no
extra adder.

**Leading one prediction.** While the subtraction runs, `lop` looks at the
operand bits as signed digits `x_i - y_i`:

* `g` marks a digit of +1;
* `z` marks a digit of -1;
* `t` marks a digit of 0.

Simply XORing the operands is not enough. A `+1` followed by a run of `-1`
digits cancels further than the XOR suggests; `100 - 011` is an example. So
each position looks at a three-digit window:

```
f_i = t_{i+1} & (g_i & ~z_{i-1} | z_i & ~g_{i-1})
    | ~t_{i+1} & (z_i & ~z_{i-1} | g_i & ~g_{i-1})
```

The first one in `f` is either at the true leading one of `|X - Y|` or one
place above it. This holds for positive and negative differences alike.
`tb_lop` checks this exhaustively at 10 bits.

`penc` turns `f` into a shift count. `norm_shift` shifts left by that count,
then one more place if the top bit is still 0, which absorbs the prediction
error. The shift is capped at `exponent - 1`: if a result would fall below
the smallest normal exponent, it stops there and becomes a subnormal.

There is no rounding logic in this path:

* With equal exponents, no bit is shifted out.
* With a difference of one, the single shifted-out bit is pulled back in by
  the left shift.

## Far path (`align_shift`, `compound_adder`, `far_round`)

The far path handles everything else:

* every effective addition;
* subtractions with an exponent difference of 2 or more;
* subtractions with a difference of 1 whose result does not lose its top bit.

In each of these cases the raw sum is at most one place away from
normalized.

**Alignment.** `align_shift` shifts the smaller significand right by the
exponent difference. `P` bits stay aligned with the larger operand (`hi`).
The next two bits are the guard and round bits, and everything below them is
ORed into the sticky bit. Shifts of `P+2` or more leave only the sticky bit,
so the shifter is clamped there.

**Compound adder.** `compound_adder` produces `sum0 = A + B'`, `sum0 + 1` and
`sum0 + 2` at once, where `B'` is `hi`, or `~hi` for a subtraction:

* `sum0 + 1` reuses the carries of `sum0`: each carry with carry-in 1 is the
  carry with carry-in 0, ORed with the AND of all lower propagate bits.
* `sum0 + 2` comes from a row of half adders that rewrites `A + B' + 1` as
  two new operands, followed by the same sum/sum+1 step.

**Rounding decided before normalization.** This is the part of the design
that needs the most care. The far path never adds a rounding increment
after the add. Instead, `far_round` looks at the bits *before*
normalization. It works out which of the three precomputed sums the
correctly normalized and rounded result corresponds to, and selects that
sum.

First, the low part:

* For an addition, the low part is the guard/round/sticky triple `grs`, and
  the exact high part is `sum0`.
* For a subtraction, `A - hi - 0.grs` equals
  `(A + ~hi) + (1 - 0.grs)` when `grs != 0`. So the low part becomes the
  two's complement of `grs`, and the high part is `sum0`. When `grs == 0`
  there is no borrow, and the high part is `sum0 + 1`.

Call the exact high part `hb`. Its top bits then decide which case applies:

| case | when | LSB | guard | sticky | round up selects |
|---|---|---|---|---|---|
| no shift | sum already normalized | `hb[0]` | `low[2]` | `low[1] \| low[0]` | `hb + 1` |
| right shift | addition carried out | `hb[1]` | `hb[0]` | `\|low` | `(hb + 2) >> 1` |
| left shift | subtraction lost its top bit | `low[2]` | `low[1]` | `low[0]` | `+1` at the guard position |

In the left-shift case the guard bit moves into the result. A round-up adds
one there, which carries into `hb` only if that bit was 1.

Rounding up in the right-shift case adds two at the original LSB. This is
why directed rounding (toward +inf or toward -inf) needs `sum0 + 2`.

Across all cases, the result is always one of `sum0`, `sum0 + 1` or
`sum0 + 2`. If the selected value reaches `2^P`, meaning rounding carried
out, one more right shift renormalizes it and the exponent is incremented.

The round-up decision uses the mode, the sign of the result, and the LSB,
guard and sticky bits above (`fp_add_pkg::round_up`):

* RNE (round to nearest even): `G & (L | S)`
* RTZ (toward zero): never
* RUP (toward +inf): `~sign & (G | S)`
* RDN (toward -inf): `sign & (G | S)`

## Final selection, exponent and sign (`fp_result_sel`)

The close result is used when the operation is an effective subtraction
and either:

* the exponent difference is 0; or
* the difference is 1 and the close-path difference has lost its top bit.

Otherwise the far result is used. The sign is the sign of the larger operand,
flipped when the close path complemented its difference.

Packing rules:

* **Subnormal result.** A significand without its hidden bit gets exponent
  field 0.
* **Overflow.** An exponent at or above the all-ones field overflows, and
  overflow and inexact are raised. The result depends on the mode:
  * RNE gives infinity.
  * RTZ gives the largest finite number.
  * RUP and RDN give infinity when rounding toward the result's own sign,
    and the largest finite number otherwise.
* **Exact zero.** An exact zero takes the common sign of the operands, or
  +0 when the signs differ (-0 under RDN). So `x - x = +0`, but `x - x =
  -0` when rounding down, and `(-0) + (-0) = -0`.
* **Specials.** A special result from `fp_special` overrides the path
  result.

## Variable-latency pipeline (`fp_add_varlat`, `collision_detect`)

`fp_add_varlat` cuts the same blocks into three stages and accepts one
operation per cycle. Each operation finishes as early as its path allows.

| stage | work done | results finished here (latency) |
|---|---|---|
| 1 | unpack/swap, special detection, close subtraction, LOP, alignment shift, short 0/1-place normalizer | close path whose leading one is in the top two bits, whose difference is zero, or whose exponent allows at most one place of shift (1 cycle) |
| 2 | `penc` + large left shift; far-path compound adder | close path needing a larger shift (2 cycles) |
| 3 | far-path rounding selection and packing | far path and special operands (3 cycles) |

The short normalizer is `norm_shift` with a predicted count of zero. The
"1 cycle" class counts a one-place shift as no shift because, by the
argument above, every normal close-path result needs at least one place.

**Collisions.** Results finishing in different stages share one result bus,
so two operations could want it in the same cycle. For example, a far-path
operation followed one cycle later by a 2-cycle close-path operation.

`collision_detect` keeps a small calendar `busy[1..3]` of bus cycles already
promised. Each new operation is granted the first free slot at or after its
natural latency. The slot three cycles ahead is never promised in advance,
so a grant always exists: the input never stalls and every result leaves
within three cycles.

A held-back result simply rides along the pipeline registers until its slot
comes. An assertion checks that at most one stage drives the bus per cycle.

Results can overtake each other, so each operation carries a tag (`TAG_W`
bits, default 4). `out_latency` reports the cycles taken, and `out_delayed`
reports whether the result was held back. Reset is synchronous and active-low
and clears only valid bits and reservations.

## Single and double precision on one unit (`fp_add_dual`, `fp_widen`, `fp_narrow`)

The combinational adder in the top is the dual-format wrapper
`fp_add_dual`. With `fmt = 0` it adds binary64 numbers. With `fmt = 1` it
adds binary32 numbers held in the low 32 bits of `a` and `b`; the upper
result bits are then zero. The single-precision path reuses the double unit:

1. `fp_widen` converts each binary32 operand to binary64 exactly. A
   subnormal operand becomes a normal double. A NaN keeps its payload and
   quiet bit, so a signalling NaN stays signalling.
2. The same two-path unit adds the widened operands.
3. `fp_narrow` rounds the sum to binary32 in the same mode. It handles the
   binary32 subnormal range, the rounding carry and overflow.

Rounding twice does not change the result. The double significand has
53 bits, which is at least 2 x 24 + 2, so two round-to-nearest steps give
the same sum as one. A directed mode applied twice gives the same result as
applying it once.

The flags combine both steps:

* invalid comes from the unit;
* overflow comes from the narrowing;
* inexact is set if either step was inexact.

The price is one extra rounding step after the unit in single precision.
The pipelined adder is binary64 only.

## Files and interfaces

| file | role |
|---|---|
| `rtl/fp_add_pkg.sv` | rounding-mode enum `round_mode_e` (RNE=0, RTZ=1, RUP=2, RDN=3), flag struct `fp_flags_t {invalid, overflow, inexact}`, `round_up()` |
| `rtl/fp_exp_swap.sv` | unpack, effective operation, exponent difference, swap |
| `rtl/fp_special.sv` | NaN / infinity handling, invalid flag |
| `rtl/close_sub.sv` | close-path exact subtraction with LSB-based exponent prediction and complementation |
| `rtl/lop.sv` | leading one predictor |
| `rtl/penc.sv` | priority encoder |
| `rtl/norm_shift.sv` | left normalization with one-place correction and subnormal limit |
| `rtl/align_shift.sv` | right alignment shifter with guard/round/sticky |
| `rtl/compound_adder.sv` | sum, sum+1, sum+2 |
| `rtl/far_round.sv` | far-path rounding selection and one-place normalization |
| `rtl/fp_result_sel.sv` | path selection, packing, overflow, zero sign, flags |
| `rtl/fp_add_two_path.sv` | combinational two-path adder |
| `rtl/fp_widen.sv` | exact binary32 -> binary64 conversion |
| `rtl/fp_narrow.sv` | binary64 -> binary32 rounding |
| `rtl/fp_add_dual.sv` | binary64 / binary32 adder on one two-path unit |
| `rtl/collision_detect.sv` | result-bus slot reservation |
| `rtl/fp_add_varlat.sv` | three-stage variable-latency adder |
| `rtl/fp_adder_top.sv` | top: the dual-format combinational adder (`comb_*` ports, `comb_fmt` selects the format) and the pipelined adder (`vl_*` ports) side by side |

`fp_add_two_path` computes `result = a + b` (or `a - b` with `sub = 1`) in
rounding mode `rm`, and also outputs `flags` and `close_used`. It is purely
combinational.

`fp_add_varlat` takes `in_valid`, `in_tag`, `a`, `b`, `sub` and `rm` each
cycle. One to three cycles later it produces `out_valid`, `out_tag`,
`out_result`, `out_flags`, `out_latency` and `out_delayed`.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

The adder-level tests compare against `tb/fp_ref_pkg.sv`. This reference
model computes the sum independently, in the plain one-path way:

1. Place both significands in a wide integer with 66 extra low bits.
2. Subtract as signed numbers.
3. Search for the leading one.
4. Round once.

In binary64 round-to-nearest, the reference is itself cross-checked against
the simulator's native `real` addition. The operand generator favours the
hard cases: nearby exponents, shared leading bits (deep cancellation),
subnormals, zeros, the largest exponents, infinities and NaNs.

* `tb_fp_adder_top` runs the top at its default binary64 size.
  * It drives the combinational adder and the pipeline with the same stream
    and checks every result, flag, tag and latency. One operation in five
    runs the combinational adder in binary32.
  * It counts how often each mechanism happened, and fails if one never did:
    close/far path, complementation, right and left one-place normalization,
    rounding, overflow, subnormal and zero results, special operands, single
    precision, latency 1/2/3, and a result held back by a collision.
* `tb_fp_add_varlat` runs the pipeline in binary16, where close-path cases
  are common.
  * It checks each latency against an independent classification of the
    operation.
  * It checks that a result which was not held back arrives exactly at its
    natural latency.
* `tb_fp_add_two_path` runs the combinational adder in binary64 and binary16
  in all rounding modes.
  Its directed cases include 1.324e5 + 1.576e3 and 9.853e7 + 1.466e6 in
  binary64, and a binary16 tie whose rounding carries into a new leading bit.
* `tb_fp_add_dual` checks the dual-format adder in both formats.
* `tb_fp_widen` and `tb_fp_narrow` check the conversions against values
  computed with real arithmetic.
* The unit testbenches check:
  * `tb_lop`: LOP prediction, exhaustively at 10 bits;
  * `tb_compound_adder`: the compound adder, exhaustively at 6 bits;
  * `tb_align_shift`: alignment against an exact 2100-bit shift;
  * `tb_far_round`: far-path rounding against normalize-then-round on exact
    wide values;
  * `tb_collision_detect`: collision handling against a calendar kept in the
    testbench.

To run one test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fp_add_pkg.sv tb/fp_ref_pkg.sv tb/tb_fp_adder_top.sv \
  --top-module tb_fp_adder_top -o sim
./obj_dir/sim
```

Substitute any other `tb_*.sv` and its module name. Blocks that do not use
the reference package build without `tb/fp_ref_pkg.sv`, but listing it does
no harm.

## Choices made here, and what is not built

* **Format.** Binary64 is the default. Any IEEE binary format works by
  setting `EXP_W`/`MAN_W`; the tests also use binary16.
* **Dual format.** Single precision is served by widening, the double unit,
  and a narrowing rounder. A unit that rounds directly at the single-precision
  position would save the extra rounding step but change every block.
* **Rounding and flags.** The four rounding modes and their encoding,
  the `sub` input and the flag set are this design's own.
  * The underflow flag is omitted, because a tiny sum of two floating-point
    numbers is always exact.
  * There is no trap support. Overflow always produces the untrapped default
    result.
* **NaNs.** The result is always the default quiet NaN; payloads are not
  propagated.
* **LOP equation.** The three-digit-window LOP equation is the classical one
  from the literature. The notes behind this design only describe the idea:
  XOR the operands, then account for all cancelling patterns.
* **Far-path case decision.** `far_round` picks the normalization case from
  the top bits of the selected sum. A faster implementation would predict it
  from the operands.
* **Pipeline stages.** The split into stages and the way a colliding result
  is handled are this design's own. Holding the later result, rather than
  stalling the input, keeps the throughput at one operation per cycle.
* **One-path adder not built.** The single-path adder, which the two-path
  design is derived from, exists here only as the testbench reference model,
  not as RTL.
* **Synthesis.** The compound adder leaves its carry network to synthesis
  (`+`). The shifters are written as plain shifts.
