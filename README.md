# High Speed BCD Adder with 16-bit and 32-bit Groups

Adding two decimal numbers in BCD (four bits per digit) is slow when it is done
the textbook way. Each digit adds in binary with its carry in, checks whether
the result passed 9, adds 6 if it did, and only then hands a carry to the next
digit. The carry ripples through the whole number, and each digit's correction
sits on that path.

This adder takes the carry off the per-digit path:

1. **Stage 1.** Every digit pair is added in binary **without** its carry in.
   All digits do this at once. The 5-bit result (0..18) of each digit is
   reduced to three flags.
2. **Stage 2.** The carry is computed by lookahead. Inside a group of digits, a
   Kogge-Stone prefix network gives every digit's decimal carry out. A separate
   group carry-lookahead produces the carry that goes to the next group.
3. **Stage 3.** Each digit's first-stage sum is corrected by adding 0, 1, 6 or
   7. The +1 is the carry in that stage 1 left out. The +6 wraps a digit that
   went past 9.

Only the group carry travels from group to group. Two group sizes are
provided:

* a **16-bit group** of 4 digits;
* a **32-bit group** of 8 digits.

Both are built for 64-bit operands (16 digits) and 128-bit operands (32
digits). With 8-digit groups a 64-bit add has two group-to-group steps instead
of four. That shorter carry path is what the larger group trades a slightly
wider lookahead for.

The design is purely combinational. "Stages" are levels of logic, not pipeline
registers. There is no clock and no reset, and the result is valid one
propagation delay after the operands.

## Per-digit flags

Let `S = a + b` be the first-stage binary sum of one digit pair. `S` is
`{Cout, S3, S2, S1, S0}` and runs from 0 to 18. From it:

| flag | equation | meaning |
|---|---|---|
| `cg` (carry generate) | `Cout \| S3 & (S2 \| S1)` | `S >= 10`: the digit carries out whatever comes in |
| `cp` (carry propagate) | `S3 & S0` | `S = 9` passes an incoming carry on. It is also set for 11, 13 and 15, where `cg` already decides. |
| `p` | `S3 & (S2 \| S1 \| S0)` | the low four bits are 9..15 |

The decimal carry out of a digit is `cg | cp & c_in`. So is
`cg | p & c_in`: whenever `p` is set and `cg` is not, `S` is exactly 9.
The design uses both forms, one for each carry path below.

## The two carry paths of a group

The group carry in goes to two blocks and nowhere else. The stage-1 adders
never see it.

* **`group_cla`: the carry into the next group.** It uses the nested
  lookahead over the group's digits, with `p` as the propagate term:

      C_out = CG(n-1) + P(n-1)·(CG(n-2) + P(n-2)·( ... + P(0)·C_in))

  It is written flat, as a sum of products: each `CG(k)` is ANDed with the
  `P` of every digit above it, and the carry in is ANDed with all of them. For
  8-digit groups the nesting simply continues over eight digits.
* **`ks_carry_network`: the carry out of every digit.** It is a Kogge-Stone
  prefix network over the digits' `(cg, cp)` pairs:
  * There are `ceil(log2 GROUP_DIGITS)` levels of the operator
    `(G,P)∘(G',P') = (G + P·G', P·P')`, with distances 1, 2, 4 and so on.
  * The carry in is applied last: `carry[j] = G[0..j] + P[0..j]·c_in`.
  * The network also works for group sizes that are not a power of two.

The top digit's carry from the network and the group CLA's carry out are the
same signal, reached by two routes. An assertion in `bcd_group_adder` checks
that they agree.

## Correction: the carry suppressor and the last adder

For each digit, `carry_suppressor` forms

    V    = Cn + Pn·Pp·Cp
    corr = {0, V, V, Cp}        // 0, 1, 6 or 7

The terms are:

* `Cn`: this digit's carry out, from the network.
* `Pn`: this digit's `p`.
* `Pp`: the `p` of the digit below. At a group boundary it comes from the
  previous group's top digit; for digit 0 it is 0.
* `Cp`: the carry into this digit.

`correction_logic` adds `corr` to `S[3:0]` and drops bit 4:

* With no carry out, `S + c_in` is at most 9. The result is `S + c_in`.
* With a carry out, `S + c_in + 6 - 16 = S + c_in - 10`.

The decimal carry itself always comes from the carry network.

The `Pn·Pp·Cp` term is kept as specified. But `Cn` here is the exact decimal
carry out, so the term never changes `V`: whenever it is true, `Cn` is already
set. The end-to-end test hits the term thousands of times, always with
correct sums. It would matter only in a variant whose `Cn`
excluded the incoming carry.

## Module hierarchy

```
hs_bcd_adder_top             both adders side by side on the same operands
├── hs_bcd_adder #(NDIGITS, GROUP_DIGITS=4)   16-bit groups
└── hs_bcd_adder #(NDIGITS, GROUP_DIGITS=8)   32-bit groups
    └── bcd_group_adder (one per group; group carry chained)
        ├── group_adder_analyzer
        │   ├── cla4_adder      (per digit: 4-bit CLA, no carry in)
        │   └── digit_analyzer  (per digit: cg, cp, p)
        ├── group_cla           (carry to the next group)
        ├── ks_carry_network    (carry out of every digit)
        ├── carry_suppressor    (per digit: V and 0/1/6/7)
        └── correction_logic    (per digit: S + corr mod 16)
```

`bcd_pkg` holds the BCD digit type and the `digit_pg_t` struct `{cg, cp, p}`.

### Top-level ports (`hs_bcd_adder_top`, `NDIGITS = 16`)

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | `4*NDIGITS` | packed BCD operands, digit 0 in bits 3:0 |
| `cin` | in | 1 | decimal carry in (tie to 0 for a plain add) |
| `sum_g16`, `cout_g16` | out | `4*NDIGITS`, 1 | result of the adder built from 16-bit groups |
| `sum_g32`, `cout_g32` | out | `4*NDIGITS`, 1 | result of the adder built from 32-bit groups |

The two results are always equal.

To build a single adder, instantiate `hs_bcd_adder` directly:

* `NDIGITS` is 16 for 64 bits and 32 for 128 bits.
* `GROUP_DIGITS` is 4 or 8.
* `NDIGITS` must be a multiple of `GROUP_DIGITS`; elaboration stops with an
  error otherwise.
* Operands must be valid BCD (digits 0..9). Other codes give undefined
  digits.

## Where this RTL makes its own choices

These points are not fixed by the adder's definition:

* **Stage 1 adder.** The 4-bit adder is a flat textbook carry-lookahead adder.
  The Kogge-Stone network is the standard form.
* **8-digit group lookahead.** The lookahead equation for 8-digit groups
  extends the 4-digit nesting.
* **Joining groups.** Groups are joined by passing each group CLA's carry
  straight to the next group, so the carry ripples at group level.
* **Carry in.** There is a carry in, `cin`, at the least significant digit.
* **Correction.** The correction is encoded as `{0, V, V, Cp}`, and the final
  adder is a plain 4-bit adder that ignores its carry out.
* **Suppressor neighbour at a group boundary.** `Pp` for a group's lowest
  digit comes from the group below.
* **No clock and no registers.** The reported figures of merit for this kind
  of adder are delay, area and power, not latency in cycles.

No area, delay or power figures are given here beyond the structural
argument above.

## Verification

Every module has a self-checking testbench in `tb/`. Reference results come
from plain integer decimal arithmetic in `tb/bcd_ref_pkg.sv`: digit by digit,
`d = a + b + c`, `c = d > 9`. They do not come from generate and propagate
signals.

| testbench | what it covers |
|---|---|
| `tb_cla4_adder` | all 256 input pairs |
| `tb_digit_analyzer` | every stage-1 sum 0..18 |
| `tb_group_cla`, `tb_ks_carry_network` | exhaustive over all flag patterns, for 4 and 8 digits, plus a 5-digit network |
| `tb_carry_suppressor`, `tb_correction_logic` | exhaustive |
| `tb_group_adder_analyzer`, `tb_bcd_group_adder` | random operands, biased toward digit sums of 9 so carry chains are frequent, for 4- and 8-digit groups |
| `tb_hs_bcd_adder` | all four configurations: 64/128 bits × 16/32-bit groups, random and all-nines operands |
| `tb_hs_bcd_adder_top` | end-to-end test at the default size, about 20,000 additions |

`tb_hs_bcd_adder_top` also counts, from the operands, how often each mechanism
occurred. It fails if any of them never did:

* a digit generating a carry;
* a carry propagating through a digit;
* each correction value (0, 1, 6 and 7);
* the `Pn·Pp·Cp` term;
* a carry crossing a 16-bit and a 32-bit group boundary;
* a carry running through a whole group;
* a carry in;
* an overflow out of the top digit.

Each testbench prints `TB_RESULT checks=N failures=M`.

### Running a testbench

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bcd_pkg.sv tb/bcd_ref_pkg.sv tb/tb_hs_bcd_adder_top.sv \
    --top-module tb_hs_bcd_adder_top
./obj_dir/Vtb_hs_bcd_adder_top
```

To run another testbench, change the name in both places. Some testbenches
raise width warnings from their reference arithmetic; `-Wno-fatal` lets them
build. Every testbench finishes in well under a second.
