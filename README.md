# Single-precision tangent from floating-point adders and multipliers

This is a fully pipelined IEEE-754 binary32 `tan(x)` for inputs in
[-π/2, π/2]. It is meant for FPGAs whose DSP blocks contain hard
floating-point adders and multipliers. Most of the work is done by those FP
units and by small tables, not by wide fixed-point logic. It takes one input
per clock cycle and has a latency of 32 cycles.

The idea is to split the input into three parts and use the tangent-of-a-sum
identity, so that no polynomial for tan itself is needed:

    |x| = c + a + b
    tan|x| ≈ (t + tan c) / (1 − t · tan c),     t = tan a + b

* `c` is the 9 most significant bits of |x| in fixed point, weights 2^0 … 2^-8.
* `a` is the next 9 bits, weights 2^-9 … 2^-17.
* `b` is everything below 2^-17, held as a floating-point number.

`tan c` and `tan a` are read from two 512-entry binary32 tables. `b` is below
2^-17, so tan b ≈ b, and since tan a is small, tan(a + b) ≈ tan a + b. After
that, the result takes three FP additions or subtractions, two FP
multiplications and one reciprocal. The sign comes from the symmetry
tan(−x) = −tan(x).

## Data flow

```
 x ─┬─ fixed_point_align ─ c ─ tan_c_lut ─────────────┬──────────────┐
    │                    └ a ─ tan_a_lut ─┐           │              │
    ├─ b_extract (mask, FP sub) ── b ─ fp_add ── t ─┬─ fp_add ── N   fp_mul ── P
    │                                              └──────────────────┘
    │                                   1 − P : fp_add (sub) ── D
    │                     fp_recip (recip_ppa + exponent, sign of x) ── 1/D
    │                                          N × (±1/D) : fp_mul ── main result
    ├─ range_detect ── {near, small} ─────────────────────────┐
    ├─ tan_near_pi2_lut (low byte of x) ──────────────────────┤  output select
    └─ x ─────────────────────────────────────────────────────┘
```

### Splitting the input (the subtle part)

**c and a.** `fixed_point_align` handles these. Only the hidden one and the
top 17 fraction bits of x (9 + 9 bits) enter the shifter. The shift amount
is 127 − exp, so the hidden one lands on weight 2^(exp−127). The 18-bit
output has weight 2^0 at its top bit and 2^-17 at its bottom bit. Written as
bits of a 36-bit fixed-point word, c is bits [35:27] and a is bits [26:18].
Bits of lower weight fall off the end of the shifter.

**b.** `b_extract` recovers the bits that fall off, in floating point, with
no shifter:

1. It reads a 23-bit mask from a 16-entry table, indexed by the four low bits
   `i` of the biased exponent. Entry `i` is `2+i` zeros followed by `21−i`
   ones, MSB first.
2. For biased exponent 112 + i, the mask clears exactly the fraction bits of
   weight 2^-17 and above. Those bits are already in c and a.
3. The masked word `(0, exp, frac & mask)` equals 2^e(1 + b′). One FP
   subtraction of `(0, exp, 0)` = 2^e leaves b = 2^e·b′, with no rounding.

The main path only sees biased exponents 115 to 127. Their four low bits (3
to 15) are all different, so four bits are enough to index the mask.

### Reciprocal of the denominator

The denominator D = 1 − t·tan c lies in (0, 1]. `fp_recip` computes its
reciprocal:

* **Fraction.** `recip_ppa` approximates 1/(1 + f), where f is the fraction
  of D, so the value is in (0.5, 1].
  * The top 8 bits of f pick one of 256 segments.
  * The other 15 bits give the signed offset d from the segment midpoint m.
  * The result is `c0 − d·(c1 − d·c2)`, with c0 = 1/(1+m), c1 = 1/(1+m)²
    and c2 = 1/(1+m)³, a second-order Taylor expansion.
  * It is rounded to 24 bits of weights 2^-1 … 2^-24. Measured error: under
    0.67 units of 2^-24.
* **Result exactly 1.** This happens when f = 0, or when rounding carries up
  to 1. The carry out of the 24-bit field is dropped, so in both cases the
  bit of weight ½, `u`, reads 0. A clear `u` forces the fraction to zero.
* **Exponent.** It is 2·bias − exp(D) = 254 − exp(D), less one when the
  fraction result is below 1 (`u` = 1). Both cases are a single subtraction
  from a constant whose two low bits are `~u, u`:
  `newCst = {6'b111111, ~u, u}`, which is 254 when u = 0 and 253 when u = 1.
* **Sign.** The sign of x goes into the sign bit of the reciprocal. The final
  product N × (1/D) then comes out with the right sign.

### Special ranges

`range_detect` produces a one-hot 2-bit select for the output register:

| condition | output |
|---|---|
| biased exponent < 115 (\|x\| < 2^-12) | x itself (tan x rounds to x) |
| 0x3FC90EDC ≤ \|x\| ≤ 0x3FC90FDB | `tan_near_pi2_lut`, with the sign of x |
| otherwise | the datapath result N/D |

The near-π/2 window holds the 256 binary32 values up to π/2 rounded to
binary32 (0x3FC90FDB). That value lies just above π/2, so its tangent is
negative. The 256 encodings have distinct low bytes, so the low byte of x
indexes the table. Near π/2 the denominator cancels and the main path would
lose most of its accuracy.

## Timing

Every unit has a latency parameter. The top balances all paths with
`pipe_delay` register chains. With the default parameters:

| value | ready at cycle |
|---|---|
| c, a (2-stage align) | 2 |
| tan c, tan a (`LUT_LATENCY` = 3); b (1 + `ADD_LATENCY`) | 5 |
| t = tan a + b (`ADD_LATENCY` = 4) | 9 |
| N = t + tan c; P = t · tan c (`MUL_LATENCY` = 4) | 13 |
| D = 1 − P | 17 |
| ±1/D (PPA 2 + 3 + 3 + 1, packing 1) | 27 |
| N × (±1/D) | 31 |
| output select register | **32** |

The total of 32 cycles matches the latency reported for this architecture.
How those 32 cycles are split among the units is this design's own choice.

The FP units and the polynomial are written as combinational logic followed
by their latency in registers. They rely on register retiming to reach a
high clock rate. For real hard FP DSP blocks, replace `fp_add` and `fp_mul`
with vendor primitives of the same latency.

## Interface (`tan_fp_top`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset that clears the pipeline |
| `in_valid`, `x` | in | 1, 32 | input sample; a new sample every cycle is allowed |
| `out_valid`, `r` | out | 1, 32 | `tan(x)`, `LATENCY` cycles later; no back-pressure |

Parameters: `LUT_LATENCY`, `ADD_LATENCY`, `MUL_LATENCY`, `PPA_ROM_LATENCY`
and `PPA_MUL_LATENCY`. The localparam `LATENCY` is derived from them.

All tables are computed at elaboration, in double precision with `$tan`, and
rounded to nearest binary32 (`tan_fp_pkg::real_to_sp`):

* `tan_c_lut`, entry k: tan(k·2^-8)
* `tan_a_lut`, entry k: tan(k·2^-17)
* `tan_near_pi2_lut`, entry k: tan() of the window encoding whose low byte is k
* `recip_ppa`: the Taylor coefficients
* `b_extract`: the mask table, computed as `23'h7FFFFF >> (2+i)`

No data files are needed.

## Accuracy and limits

These figures were measured against `tan` in double precision.
`tb_tan_sweep` covers about 6.2 million inputs: every binade at a stride of
17 encodings, and every encoding from 1.5697 up to π/2.

| range of \|x\| | worst error seen |
|---|---|
| below 2^-12 (returned as x) | exact: tan x rounds to x |
| 2^-12 … 2^-8 | 1.0 ulp |
| 2^-8 … 1.5697 (0x3FC8EC00) | 3.2 ulp |
| 1.5697 … 1.57077 (below the window) | **9.5 ulp** |
| near-π/2 window | 0.5 ulp (the table is correctly rounded) |

Below 1.5697 the result meets a 4-ulp bound. In the last 0.0011 before the
near-π/2 window it does not:

* Here c = 401/256 or 402/256 and tan c ≈ 2000, so D is small.
* The rounding error of the binary32 `tan c` entry is amplified roughly by
  1/D.
* A 4-ulp bound there would need more precision in the `tan c` table or a
  wider window. Neither is part of this design.

The testbenches check a 4-ulp limit below 1.5697 and a 10-ulp limit above.

Further limits:

* **Out-of-domain inputs are not handled.** Inputs above π/2 in magnitude,
  infinities and NaNs give meaningless results.
* **Subnormals flush to zero.** `fp_add` and `fp_mul` round to nearest-even,
  flush subnormals to zero, propagate infinities and return a quiet NaN for
  invalid operations. Inputs with |x| < 2^-12, subnormals included, return
  x unchanged.

## Where the design makes its own choices

The following follow the architecture as published:

* the decomposition, with the field positions [35:27] and [26:18]
* the 9 + 9-bit shifter
* the mask format
* the order of the FP operations
* the PPA-based reciprocal with its ½-bit test and the exponent constant
* the threshold 115
* the 256-ulp window near π/2
* the total latency of 32

The following are choices made here:

* the insides of the FP adder and multiplier
* the PPA's segment count, degree and widths
* how the latency is split among the units
* the valid bit and the reset
* the 2-bit select encoding
* the low-byte indexing of the near-π/2 table

## Files and simulation

`rtl/` holds one module or package per file:

* `tan_fp_pkg`: types, constants, table generators
* `tan_fp_top`
* `fixed_point_align`, `b_extract`, `range_detect`
* `tan_c_lut`, `tan_a_lut`, `tan_near_pi2_lut`
* `fp_add`, `fp_mul`
* `recip_ppa`, `fp_recip`
* `pipe_delay`

`tb/` holds:

* one self-checking testbench per module, `tb_<module>.sv`
* `tb_tan_sweep.sv`, the accuracy sweep over the whole domain (about 6
  seconds of simulation)
* `tb_fp_ref_pkg.sv` That package has an independent binary32 rounding
function used as the reference. Each testbench prints
`TB_RESULT checks=N failures=M`.

To run the end-to-end test at the default parameters (about 25,000 inputs):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/tan_fp_pkg.sv tb/tb_fp_ref_pkg.sv rtl/*.sv tb/tb_tan_fp_top.sv \
  --top-module tb_tan_fp_top -Mdir obj_top
./obj_top/Vtb_tan_fp_top
```

Other testbenches build the same way: use `--top-module tb_<module>` and
the matching testbench file.
