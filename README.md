# RoBA: a rounding-based approximate multiplier

A multiplier built from an array of partial products is large, slow and uses a lot
of power. Many signal-processing workloads, such as filtering, image processing and
learning, can tolerate a small error in each product. The rounding-based approximate
(RoBA) multiplier uses that tolerance. It rounds each operand to the nearest power
of two, so every product it forms is a shift. No partial-product array is needed.

Write `Ar` and `Br` for `|A|` and `|B|` rounded to their nearest powers of two.
The identity

    A*B = Ar*B + Br*A - Ar*Br + (A - Ar)*(B - Br)

is exact. RoBA keeps the first three terms and drops the last one:

    A*B ~ Ar*B + Br*A - Ar*Br

`Ar` and `Br` are powers of two, so the three kept terms are three shifts. What is
left is one addition and one subtraction. The dropped term is the product of two
rounding errors, each at most half of its operand. It is zero whenever one operand is
already a power of two.

This RTL implements the signed form of the multiplier as one combinational block,
`roba_multiplier`. Its default size is 16 x 16 bits. The same RTL can be built as the
unsigned form, and at any width.

## Datapath

```
 a ─┐  ┌───────────┐ |A| ┌──────────┐ Ar, ea ┌──────────┐ Ar*B ┌───────┐     ┌────────────┐     ┌──────────┐
    ├─►│   sign    ├────►│ rounding ├───────►│ shifters ├─────►│ adder ├────►│ subtractor ├────►│ sign set ├─► p
 b ─┘  │ detector  ├────►│   (x2)   ├───────►│   (x3)   ├─────►│       │  ┌─►│            │  ┌─►│          │
       └─────┬─────┘ |B| └──────────┘ Br, eb └────┬─────┘ Br*A └───────┘  │  └────────────┘  │  └──────────┘
             │                                    └── Ar*Br ──────────────┘                  │
             └──────────────────────────── product sign ─────────────────────────────────────┘
```

| Stage | Module | What it does |
|---|---|---|
| sign detector | `roba_sign_detector` | Takes two's-complement operands and returns `\|A\|`, `\|B\|` and the product sign, the XOR of the operand signs. |
| rounding | `roba_round` (two instances) | Returns the nearest power of two `2^e`, its exponent `e` and a zero flag. |
| shifters | `roba_shifter` (three instances) | `Ar*B = \|B\| << ea`, `Br*A = \|A\| << eb`, `Ar*Br = Ar << eb`. |
| adder | `roba_adder` | `Ar*B + Br*A`. |
| subtractor | `roba_subtractor` | Subtracts `Ar*Br`. The result is the approximate magnitude. |
| sign set | `roba_sign_set` | Negates the magnitude when the product is negative. |

`roba_multiplier` only wires these stages together. It has no clock and no
registers: `p` settles one combinational delay after `a` or `b` changes. If the
multiplier sits in a pipeline, register its inputs and outputs outside it.

### Ports and parameters of `roba_multiplier`

| Name | Dir / type | Width / default | Meaning |
|---|---|---|---|
| `N` | `int unsigned` | 16 | Operand width. |
| `SIGNED` | `bit` | 1 | 1: operands and product are two's complement. 0: they are unsigned. |
| `a`, `b` | input | `N` | Operands. |
| `p` | output | `2N` | Approximate product. |

## Rounding to a power of two

Rounding is the step everything else rests on. Take a nonzero magnitude `m` whose
leading one is at bit `k`, so that `2^k <= m < 2^(k+1)`. The halfway point between
those two powers is `1.5 * 2^k`, which is the value with only bits `k` and `k-1` set.
So the rule needs no comparator:

* bit `k-1` clear: `m` is below the midpoint and rounds **down** to `2^k`;
* bit `k-1` set: `m` is at or above the midpoint and rounds **up** to `2^(k+1)`.

A value exactly at the midpoint (3, 6, 12, 24, …) is an equal distance from both
powers and rounds up. `roba_round` finds the leading one with a priority search.
It then outputs the exponent `e = k + (bit k-1)`, the one-hot value `2^e` and a
`zero` flag. Zero rounds to 0, which is not a power of two. The shifters take the
zero flag as an enable, so that every product with a zero operand is 0.

The output `rounded` is one bit wider than the input because an unsigned magnitude
can round past it: `0xC000` rounds to `2^16`. In the signed multiplier a magnitude is
at most `2^(N-1)`, so the top bit stays 0 there.

Only the exponent of `Br` is used: every product with `Br` is a shift by `eb`.
So the second rounder's `rounded` output is left open.

## Widths

* Magnitudes are `N` bits unsigned. The most negative operand `-2^(N-1)` keeps its
  exact magnitude, `2^(N-1)`, and is not saturated.
* The three shifted products, the sum and the difference are `2N+1` bits. With
  `Ar <= 2^N` and `B < 2^N`, each of `Ar*B` and `Br*A` is below `2^(2N)`, so their sum
  fits in `2N+1` bits. `Ar*Br` can reach `2^(2N)` in the unsigned form.
* The difference is never negative. The dropped term `(A-Ar)(B-Br)` is at most a
  quarter of `A*B`. The difference is also always below `2^(2N)`. So `roba_sign_set`
  works on `2N` bits, and bit `2N` of the subtractor output goes unused. Verilator
  reports that bit as an unused signal.

## Accuracy

The approximate product equals the exact one when either operand is a power of two.
Otherwise it is off by `(A-Ar)(B-Br)`. The product comes out smaller than the exact
one when both operands were rounded the same way (both up or both down), and larger
when they were rounded opposite ways. Measured with the testbenches:

| Case | Mean relative error | Largest relative error |
|---|---|---|
| 8 x 8 signed, all 65536 operand pairs | 2.82 % | 11.1 % (for example 3 x 3 = 8) |
| 16 x 16 signed, 100000 random full-range pairs and 100000 pairs in [-256, 255] | 2.87 % | — |

## Where this RTL makes its own choices

The overall structure is the published RoBA scheme:

* rounding of both operands to powers of two;
* the signed datapath of sign detector, rounding, three shifters, adder, subtractor
  and sign set;
* the 16-bit operand size.

The internal signal names follow a published 16-bit simulation of the design where
they map: `a_round`/x_round, `a_enc`/x_enc, `ar_b`/xr_Y, `br_a`/yr_X, `ar_br`/yr_xr.
The following are choices of this RTL:

* **Midpoint rule.** Values exactly between two powers of two round up.
* **Zero handling.** Zero rounds to 0, and a zero flag gates the shifters.
* **Widths.** The internal products are `2N+1` bits. The exponent is
  `$clog2(N+1)` bits, 5 at N = 16. A 4-bit exponent would be enough for the signed
  form alone.
* **Unsigned form.** The RoBA approach also applies to unsigned operands. Here that
  form is a parameter: `SIGNED = 0` bypasses the sign detector and the sign set and
  runs the same datapath. No separate optimized unsigned architecture is
  given. A second optimized signed architecture also exists in the RoBA scheme, but it
  is not described, so it is not provided.
* **Circuits inside each stage.** The rounder uses a priority search, the shifters are
  logarithmic barrel shifters, and the adder, subtractor and negation use the
  `+`/`-` operators, which leaves their structure to synthesis.
* **Timing.** The design is purely combinational.

**A known disagreement.** The published 16-bit simulation of the design shows
intermediate values that this RTL reproduces exactly. For `10 x 8` they are
`Ar*B = 0x40`, `Br*A = 0x50` and `Ar*Br = 0x40`. For `8 x 8` all three are
`0x40`. But the final product printed there for `8 x 8` is 192: the three terms
*added*. That contradicts the subtractor in the block diagram and the identity
above, since `8 x 8` would then be 3 times too large. This RTL subtracts, so
`8 x 8 = 64` and `10 x 8 = 80`.

## Verification

Each stage has a self-checking testbench in `tb/`. Each compares the block with
values computed independently of the RTL:

| Testbench | Block | What it covers |
|---|---|---|
| `tb_roba_round` | `roba_round` | Every 16-bit and every 8-bit magnitude, against the nearest power of two found by distance. |
| `tb_roba_sign_detector` | `roba_sign_detector` | Corner and random operands, signed and unsigned instances. |
| `tb_roba_shifter` | `roba_shifter` | Every shift amount 0–16, with random data and random enable. |
| `tb_roba_adder`, `tb_roba_subtractor`, `tb_roba_sign_set` | arithmetic stages | Random operands and extremes at the widths the multiplier uses. |
| `tb_roba_multiplier` | whole multiplier, default parameters | The published operand pairs with their intermediate values. All pairs of 62 corner operands: 0, ±1, ±2^k, ±3·2^(k-1), the largest and the most negative. 200000 random pairs. |
| `tb_roba_workload_8x8` | multiplier at N = 8 | All 65536 pairs in both signed and unsigned form. |

`tb/roba_ref_pkg.sv` is the reference model. It finds `Ar` by measuring the distance
to every power of two, with ties going to the larger one. It then evaluates
`Ar*B + Br*A - Ar*Br` with 64-bit integer arithmetic.

`tb_roba_multiplier` also counts how often each behaviour of the datapath occurs, and
fails if any count is zero. The behaviours are: rounding up, rounding down, a
midpoint, a zero operand, a negative product, the most negative operand, an exact
result, and a result below the exact product.

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. It also has a
watchdog that fails the run if it does not finish.

### Running a testbench

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb tb/roba_ref_pkg.sv tb/tb_roba_multiplier.sv \
          --top-module tb_roba_multiplier -Mdir obj_mul -o sim
./obj_mul/sim
```

Swap in any other `tb_*` name to run that testbench. Every testbench finishes in
well under a second. To lint the RTL, run
`verilator --lint-only -Wall -Wno-fatal -Irtl rtl/roba_multiplier.sv`. It reports two
expected warnings: the open `rounded` pin of the second rounder, and the unused top
bit of the subtractor output (both explained above).

### Changing the design

* **Width.** Set `N`. All internal widths derive from it. The only fixed-width code is
  in the testbenches: `tb_roba_multiplier` is written for 16 bits, and
  `tb_roba_workload_8x8` shows how to instantiate another size.
* **Unsigned.** Set `SIGNED = 0`.
* **A different rounding rule**, for example ties rounding down, changes only
  `roba_round`. The reference model's tie rule in `roba_ref_pkg::nearest_pow2`
  (`d <= bestd`) must change with it.
