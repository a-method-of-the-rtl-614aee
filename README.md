# Floating-point adder with partial preparation of results

Adding two floating-point numbers `a_M·2^A + b_M·2^B` is normally a chain of
dependent steps: compare the exponents, pick the larger one, shift the mantissa
of the smaller-exponent operand right by the exponent distance, add. Each step
waits for the one before it, and the exponent comparison (a carry-chain
subtraction) sits in series with the shifter and the mantissa adder.

This adder takes the comparison off that path. It does not wait to learn which
exponent is larger. It prepares both possible results at once and lets the
comparison choose between them at the end:

* `s_M1 = a_M + (b_M >>> (A−B))`: the result if `A ≥ B`
* `s_M2 = b_M + (a_M >>> (B−A))`: the result if `A < B`

The exponent subtraction, both alignment shifts and both additions run
together. The sign of `A−B` then drives one row of 2:1 multiplexors. The cost
is a second shifter and a second adder. The operand multiplexors that a
conventional adder puts in front of its shifter go away. So the extra area is
only about 2(n−r)+1 LUTs of an FPGA implementation: roughly 15 % for 15- and
31-bit mantissas. In exchange, about `r` carry-chain delays plus one LUT delay
come off the critical path.

## Datapath

```
 A, B ──► fp_pp_exp_diff ──► S = max(A,B)
                 │
                 ├─ S_{A-B} ─┬─► fp_pp_shifter (plain)    b_M ──► b_SHIFT
                 │           └─► fp_pp_shifter (inverted) a_M ──► a_SHIFT
                 │
                 │      fp_pp_mant_adder: a_M + b_SHIFT ──► s_M1 ─┐
                 │      fp_pp_mant_adder: b_M + a_SHIFT ──► s_M2 ─┤
                 │                                                ▼
                 └─ S_SIGN ─────────────────────────► fp_pp_result_sel ──► s_M
```

| module | step | what it does |
|---|---|---|
| `fp_pp_exp_diff` | 1 | `(R+1)`-bit subtraction `A−B`; the low `R` bits are `S_{A-B}` and the top bit is the sign `S_SIGN` (1 when `A<B`); `S` = `S_SIGN ? B : A` |
| `fp_pp_shifter` | 2 | `R` levels of 2:1 multiplexors; level `j` shifts by `2^j`, with sign fill |
| `fp_pp_mant_adder` | 3 | `(N+1)`-bit two's complement sum of two `N`-bit mantissas |
| `fp_pp_result_sel` | 4 | `s_M = S_SIGN ? s_M2 : s_M1` |
| `fp_add_pp` | top | wires the above together |
| `fp_pp_pkg` | – | default sizes and the `2^R ≥ N` coverage check |

## The inverted-address shifter (the subtle part)

Only `A−B` is computed. When `A<B`, `a_M` has to be shifted by `B−A`, the two's
complement negation of `S_{A-B}`: `B−A = (~S_{A-B}) + 1 (mod 2^R)`. Computing
that negation would put an incrementer's carry chain back on the path. The
shifter for `a_M` absorbs both parts instead:

* **Inversion.** Every multiplexor still takes its address bit straight from
  `S_{A-B}`, but its two data inputs are swapped. A level therefore shifts when
  its address bit is 0, which is what a shifter addressed by `~S_{A-B}` would do.
  The depth is the same as the plain shifter.
* **The +1.** The mantissa is shifted right by one place before it enters
  the multiplexor levels. This costs only wiring.

The total shift is `1 + (2^R − 1 − S_{A-B}) = 2^R − S_{A-B}`. That is `B−A`
whenever `A<B`. When `S_{A-B}=0` (equal exponents) the inverted shifter moves the
word by `2^R ≥ N` places and leaves only sign bits. Its sum is not selected in
that case, because `S_SIGN=0` chooses `s_M1`. This is why the shifter parameter
`INV_ADDR` exists, and why `fp_add_pp` refuses to elaborate (a `$error` in a
generate branch) unless `2^R ≥ N`.

Both shifters are addressed by the same `S_{A-B}`. They can start as soon as
its low bit leaves the subtractor, so the exponent subtraction overlaps the
shift.

## Number format and interface

* Mantissas `a_mant`, `b_mant`: `N`-bit two's complement. The alignment is an
  arithmetic right shift: bits shifted out are lost and the sign is copied in.
  This is a floor division by `2^d`, with no guard, round or sticky bits.
* Exponents `a_exp`, `b_exp`: `R`-bit unsigned values. A bias, if the number
  format has one, is the same on both inputs and cancels out.
* `s_mant`: `(N+1)`-bit two's complement sum, so it cannot overflow.
  `s_exp = max(A, B)`. `diff_sign` is brought out as a status bit.
* Timing: purely combinational, with no clock or reset. The result is valid
  one combinational delay after the inputs change. For pipelining, add
  registers around the block.

Defaults are `N=15`, `R=4`. The design was also evaluated at `N=31`, `R=5`
(`fp_pp_pkg::N_MANT_WIDE`, `R_EXP_WIDE`). Any `N`, `R` with `2^R ≥ N` works.

## What is not in this block

* **Normalization and rounding.** `s_M` comes out unnormalized: it may carry
  into bit `N` or lose leading bits through cancellation. Finding the leading
  bit, shifting, adjusting the exponent and rounding are later steps. The
  method does not define them, and they are not built here.
* **Alternatives the method is compared with.** These are not included: the
  conventional serial adder, and a "full preparation" variant that precomputes
  a sum for every one of the `2n+1` relative alignments and picks one.

## Where this departs from or adds to the method

* The exponent format (unsigned) and the mantissa format (two's complement
  with an `(N+1)`-bit result) are this design's reading of the method's
  arithmetic shifts and its `(n+1)`-digit result.
* The result multiplexor covers all `N+1` sum bits. The method's estimate
  counts `n` multiplexors.
* Shifter levels go from the least significant address bit first (1, 2, 4, …).
  The order is not fixed by the method.
* The mantissa adders are written as `+`. On an FPGA they map onto the
  dedicated carry chain, which the method's timing (`n·τ_A + τ_N` per adder)
  assumes.
* Only function is verified. The FPGA delay and LUT figures (about 25 % shorter
  delay at n=15 and 17–22 % at n=31, for 15–16 % more LUTs) come from the
  original evaluation on a Cyclone II device. They have not been reproduced
  here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a cycle-count watchdog.
`fp_pp_ref_pkg` holds the reference model. It is integer arithmetic: floor
division for the alignment, then the textbook compare, align, add order.

| testbench | covers |
|---|---|
| `tb_fp_pp_exp_diff` | all exponent pairs for R=4 |
| `tb_fp_pp_shifter` | both shifter forms, every shift address, corner and random mantissas |
| `tb_fp_pp_mant_adder` | corner pairs and random pairs |
| `tb_fp_pp_result_sel` | both select values with random sums |
| `tb_fp_add_pp` | whole adder at its defaults (N=15, R=4) |
| `tb_fp_add_pp_wide` | whole adder at N=31, R=5 |

The top-level tests apply every exponent pair with corner and random mantissas,
then more random operands. They count these cases, and a case that never occurs
is a failure:

* `A>B`
* `A<B`
* `A=B`
* `|A−B| ≥ N`: the aligned mantissa is reduced to sign bits
* a carry into bit `N`
* low bits lost in the alignment

Each run takes well under a second.

Running one testbench with Verilator (the packages are listed first; `-y`
lets Verilator find the other modules by file name):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fp_pp_pkg.sv tb/fp_pp_ref_pkg.sv tb/tb_fp_add_pp.sv \
  --top-module tb_fp_add_pp -o sim
./obj_dir/sim
```

Lint of the whole adder:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/fp_pp_pkg.sv rtl/fp_add_pp.sv --top-module fp_add_pp
```

The only warnings concern package constants that the adder itself does not use.
