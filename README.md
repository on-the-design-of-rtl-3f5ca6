# Modulo 2^n ± 1 subtractors and adders/subtractors

A residue number system (RNS) splits a wide integer into small residues, one
per modulus. Each residue channel then does its arithmetic independently and
carry-free. Moduli of the form 2^n + 1 and 2^n − 1 are the usual choice.
Addition circuits for them are well known. Subtraction usually costs a
separate, heavier circuit. This RTL turns every modulo subtraction into a
modulo *addition* of the one's complement plus a small correction term. The
correction is folded into logic the adder needs anyway. The same idea gives
cheap combined adders/subtractors: one mode bit `m` picks addition (0) or
subtraction (1).

Three residue channels are covered:

| channel | residue format | subtractor | adder/subtractor |
|---|---|---|---|
| modulo 2^n + 1, normal | (n+1)-bit value 0 … 2^n | `norm_sub` | `norm_addsub` |
| modulo 2^n + 1, diminished-one | n-bit field X* = X − 1 plus zero flag | `dim1_sub` (no zero handling), `dim1_sub_zh` | `dim1_addsub_zh` |
| modulo 2^n − 1 | n-bit value 0 … 2^n − 2 | `mod2nm1_sub` | `mod2nm1_addsub` |

All units are purely combinational. They have no clock, no reset and no
registers. An output settles one parallel-prefix adder delay (about
2·log2 n + a few gate levels) after its inputs change. The width is the
parameter `N` (n). It defaults to 8 through `modpm1_pkg::N_DEFAULT`. The
units have been simulated at n = 4, 8 and 16.

## The shared engine: the IEAC adder

Every modulo 2^n + 1 unit ends in an **inverted end-around-carry (IEAC)
adder** (`ieac_adder`). It adds two n-bit vectors X and Y. If the binary sum
has no carry-out, it adds 1 more; if it has one, the carry-out is dropped.
The result is |X + Y + 1| mod (2^n + 1) in every case except one: X + Y =
2^n − 1, when X and Y are bitwise complementary. The true result is then 2^n,
which needs n + 1 bits. The n low bits come out as 0, so an extra output bit
`s[n]` (the AND of all bit propagates) flags that case. `{s[n], s[n-1:0]}`
is therefore the full (n+1)-bit normal-representation result.

Inside, a Kogge–Stone prefix tree (`ks_prefix`) forms the group
generate/propagate signals. A carry-increment stage then applies the
end-around carry `~G[n-1:0]` to every bit position. The modulo 2^n − 1 adder
(`mod2nm1_adder`) and the zero-handling diminished-one adder
(`dim1_zh_adder`) reuse the same tree. Only their carry-in rule differs:

| adder | end-around carry-in |
|---|---|
| `ieac_adder` | `~G` (increment when there is no carry-out) |
| `mod2nm1_adder` | `G \| P` (carry-out, or all bits propagate) |
| `dim1_zh_adder` | `~G & ~A_z & ~B_z` |

## Normal representation: subtraction as a corrected addition

A normal residue is an (n+1)-bit value A = a_n·2^n + A_L, with A_L the n low
bits. Because a residue is at most 2^n, **a_n = 1 forces A_L = 0**. Most of
the simplifications below rely on this rule. Inputs above 2^n are not
residues, and the units' outputs for them are undefined.

Modulo 2^n + 1 we have 2^n ≡ −1, and the n-bit complement satisfies
−B_L ≡ ~B_L + 2. So

    A − B ≡ A_L + ~B_L + 2 + (b_n − a_n).

An IEAC carry-save stage (n cells, with the carry of the top cell inverted
and wrapped to bit 0) and the IEAC adder each add 1. The carry-save stage
therefore needs a third input C' ≡ b_n − a_n. That is 0…01 when only b_n is
set, 0 when neither or both are set, and −1 = 2^n when only a_n is set. In
the last case the carry-save stage is skipped: A_L = 0, so the IEAC adder
only needs 0 and ~B_L.

`norm_sub` reduces this to:

* **bits n−1 … 1:** half adders on a_i and ~b_i, because the correction has
  zeros there;
* **bit 0:** one simplified cell, a full adder on a_0, ~b_0 and
  (~a_n & b_n) reduced under the residue rule:
  `s = ~(a_0 ^ (b_0 | b_n)) | (a_n & ~b_0)`,
  `c = (a_0 & ~b_0) | (~a_n & b_n)`;
* **the bypass:** n AND gates, enabled by ~(a_n & ~b_n), on the carry
  vector. When the bypass is active they clear it. The sum vector needs no
  multiplexer, because with a_i = 0 the half-adder sums are already ~b_i;
* **the result MSB:** `d[n]` is the complementary-input flag of the IEAC
  adder.

Worked check (n = 8): A = 85, B = 12. The carry-save sum is 10100110 and the
carry 10100011. The IEAC adder returns 01001001 with MSB 0, so D = 73.

### The combined adder/subtractor `norm_addsub`

Addition needs the correction C ≡ −(a_n + b_n + 2), which is
1…1 ~(a_n∧b_n) ~(a_n⊕b_n). Subtraction needs C' as above. `norm_addsub`
merges them into one (n+1)-bit term C'':

| bit | value |
|---|---|
| c''_n (bypass enable) | M ∧ a_n ∧ ~b_n |
| c''_{n−1} … c''_2 | ~M |
| c''_1 | ~M ∧ ~(a_n ∧ b_n) |
| c''_0 | ~M ∧ ~(a_n ⊕ b_n) ∨ M ∧ ~a_n ∧ b_n |

XOR gates invert b_i when M = 1. Bits n−1 … 2 are full adders on a_i,
b_i ⊕ M and ~M. Bits 0 and 1 are simplified cells that absorb the XOR and
c''_0 or c''_1:

    s0 = a_n b_n | a_0 b_n | a_0 b_0 | ~M a_n b_0 | M a_n ~b_0 | ~(a_n|b_n|a_0|b_0)
    c0 = M ~a_n b_n | ~b_n a_0 ~b_0 | ~M ~a_n b_0
    s1 = a_1 b_1 | ~a_1 ~a_n b_n | M a_n ~b_1 | ~(a_1|b_n|b_1)
    c1 = a_1 ~b_1 | ~M b_1

The bypass AND gates are enabled by ~c''_n. `norm_addsub` needs n ≥ 3, so
that at least one full adder sits between the two simplified cells;
`norm_sub` needs n ≥ 2.

## Diminished-one representation and zero handling

In diminished-one form a non-zero residue X (1 … 2^n) is stored as the n-bit
field X* = X − 1. A separate flag X_z marks the value zero. Here a zero
value is always carried as **flag 1 with an all-zero field**. Every unit
produces this form for a zero result and expects it for a zero operand.

The diminished-one difference is D* = |A* + ~B* + 1| mod (2^n + 1). That is
exactly the IEAC addition of A* and ~B*, so `dim1_sub` is n inverters and an
`ieac_adder`. Its complementary-input flag (A = B) is the zero flag `d_z`.
It does not accept zero operands.

The zero-handling units follow this table (D = A − B):

| A_z | B_z | D | D_z | D* |
|---|---|---|---|---|
| 0 | 0 | A − B | 1 iff A = B | \|A* + ~B* + 1\| |
| 0 | 1 | A | 0 | A* |
| 1 | 0 | −B | 0 | ~B* |
| 1 | 1 | 0 | 1 | 0 |

These cases are not selected by a result multiplexer, which would lengthen
the critical path. They come out of `dim1_zh_adder`, an adder that handles
zero operands in its carry logic. It adds the two fields as they are. Its
end-around carry-in is forced to 0 when either flag is set. Its zero flag
is `A_z & B_z`, or the complementary-input flag when neither operand is
zero. Because a zero operand's field is all zeros, the sum is then the other
field, untouched.

`dim1_sub_zh` drives the adder's second input with NOR(b*_i, B_z). For a
non-zero B this is the complement ~B*. For a zero B it is all zeros, as the
adder's convention needs. Plain inverters would give all ones and break the
rows with B_z = 1.

`dim1_addsub_zh` puts an n-bit 2-to-1 multiplexer in front of the adder:
B* when adding, NOR(b*_i, B_z) when subtracting.

## Modulo 2^n − 1

Here ~B = (2^n − 1) − B, so A − B ≡ A + ~B. `mod2nm1_sub` is n inverters and
a modulo 2^n − 1 adder. `mod2nm1_addsub` replaces the inverters by XOR gates
controlled by M.

The adder's end-around carry-in is `carry-out | all-propagate`. An
all-propagate sum (the all-ones pattern, the second code of zero) therefore
wraps to 0. Results, including A − A, always lie in 0 … 2^n − 2.

## Top level

`modpm1_top` places the three channels side by side. Each channel has its
own operand and mode ports (`norm_*`, `dim1_*`, `m2_*`), and the units of a
channel share them:

* normal channel: `norm_sub` and `norm_addsub`;
* diminished-one channel: `dim1_sub`, `dim1_sub_zh` and `dim1_addsub_zh`;
* modulo 2^n − 1 channel: `mod2nm1_sub` and `mod2nm1_addsub`.

Mode ports are plain bits: 0 adds, 1 subtracts. The typed form is
`modpm1_pkg::mode_e`. `dim1_sub_d_*` is only meaningful when both
diminished-one operands are non-zero.

## Files

| file | contents |
|---|---|
| `rtl/modpm1_pkg.sv` | default width, `mode_e` |
| `rtl/ks_prefix.sv` | Kogge–Stone group generate/propagate tree |
| `rtl/ieac_adder.sv` | IEAC adder with complementary-input MSB |
| `rtl/norm_sub.sv`, `rtl/norm_addsub.sv` | normal-representation units |
| `rtl/dim1_sub.sv`, `rtl/dim1_zh_adder.sv`, `rtl/dim1_sub_zh.sv`, `rtl/dim1_addsub_zh.sv` | diminished-one units |
| `rtl/mod2nm1_adder.sv`, `rtl/mod2nm1_sub.sv`, `rtl/mod2nm1_addsub.sv` | modulo 2^n − 1 units |
| `rtl/modpm1_top.sv` | the three channels side by side |
| `tb/tb_ref_pkg.sv` | integer reference models used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Each unit's testbench compares the outputs against plain integer arithmetic
(`%` on 64-bit values). Each one instantiates the unit at n = 4, 8 and 16.
For n = 4 and 8 it applies every operand pair in every mode; for n = 16 it
applies corner operands plus 100,000–200,000 random pairs. The testbenches
of `norm_sub` and `dim1_sub` also check the n = 8 worked example,
85 − 12 mod 257 (D = 73 and D* = 72).

`tb_modpm1_top` runs the top at its default width through all operand pairs
of all three channels, in both modes. It also counts each mechanism:

* add mode and subtract mode;
* the carry-save bypass;
* a result of 2^n;
* all four zero-flag combinations;
* a zero result from non-zero operands;
* the modulo 2^n − 1 end-around carry and a zero result.

It fails if any of them never happened. Every testbench ends with a line
`TB_RESULT checks=<n> failures=<n>`.

To run one with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
      -y rtl -y tb rtl/modpm1_pkg.sv tb/tb_ref_pkg.sv tb/tb_norm_sub.sv \
      --top-module tb_norm_sub -o sim && ./obj_dir/sim

To change the width, set `N` on the module you instantiate, or change
`N_DEFAULT` in `modpm1_pkg`.

## Choices made here and points to watch

* **Adder insides.** The IEAC, modulo 2^n − 1 and zero-handling adders are
  specified here by their function. Published fast versions fold the
  end-around carry into the prefix tree itself (cyclic prefix structures).
  This RTL uses a Kogge–Stone tree plus a separate carry-increment stage,
  which is simpler and correct, though not the fastest.
* **Zero-handling adder.** How `dim1_zh_adder` handles zero (carry-in gating
  plus the all-zero-field convention for zero operands) is this design's
  own. A zero flag with a non-zero field is not a valid input.
* **Bit-0 cell of `norm_sub`.** The cell uses `b_n`, not its complement, in
  `~(a_0 ^ (b_0 | b_n))`. This is what the full adder it replaces reduces
  to, and it reproduces the worked example.
* **Addition corrections.** c''_1 and c''_0 of `norm_addsub` carry the
  inversions ~(a_n∧b_n) and ~(a_n⊕b_n) that the arithmetic requires.
* **Zero codes.** The modulo 2^n − 1 units return zero as 0, never as all
  ones. Zero results of the diminished-one units have an all-zero field.
* **Not built.** The unsimplified forms are not built as separate modules:
  the carry-save stage with full adders and two n-bit multiplexers, and the
  diminished-one subtractor with a 4-to-1 result multiplexer. The simplified
  units compute the same functions.
* **Not modelled.** Power, area and delay figures are outside the RTL.
