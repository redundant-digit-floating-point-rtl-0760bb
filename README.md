# SUT floating-point adder: redundant radix-16 addition with a stored rounding value

This is synthesizable SystemVerilog for a floating-point adder/subtractor that keeps
its results in a redundant radix-16 format called SUT, for *stored unibit transfer*.
Three ideas make it fast:

1. **Carry-free significand addition.** Each digit lies in [-9, 8] instead of [0, 15].
   Two numbers are added with no carry running further than one digit. A chain of
   additions therefore never waits for a word-long carry. Only the final result is
   converted back to binary.
2. **Embedded sign.** Negative numbers are held as negated digits, not as
   sign-magnitude. The adder only ever adds. There is no operand swap, no
   add-or-subtract decision and no post-complementation.
3. **Rounding without an increment.** The least-significant digit of a sum has an empty
   transfer slot. Round-to-nearest stores its rounding value (-1, 0 or +1 ulp) in that
   slot, together with a one-bit adjustment. This takes three gate levels. No rounding
   adder and no exponent re-adjustment after rounding are needed.

The unit takes IEEE 754 operands, or SUT numbers that earlier additions produced.
It returns an SUT number. The default build (`IW = 32`) takes single precision; with
`IW = 64` the same unit takes double precision (see "Double precision" below).

## The number format

### Digits

A digit has five two-valued bits ("twits"). Their weights are:

| twit | kind                        | value when 0 | value when 1 |
|------|-----------------------------|--------------|--------------|
| n3   | negabit, weight 8           | -8           | 0            |
| p2   | posibit, weight 4           | 0            | 4            |
| p1   | posibit, weight 2           | 0            | 2            |
| p0   | posibit, weight 1           | 0            | 1            |
| u    | unibit, weight 1            | -1           | +1           |

`n3 p2 p1 p0` is a 4-bit two's-complement main part in [-8, 7], with its sign bit
stored inverted. The unibit `u` is the transfer that the digit received from its right
neighbour during the last addition. The digit value is
`8*(n3-1) + 4*p2 + 2*p1 + p0 + (2u-1)`, which lies in [-9, 8]. Zero has two
encodings: main part 1 with u = 0, or main part -1 with u = 1.

### Numbers

In single precision a number has seven digits γ6..γ0 (`sut_pkg::NDIG = 7`). The radix point sits right of
γ6. The sign is embedded in the digits. There is also a radix-16 exponent of seven
twits:

* `e7`: a posibit of weight 32.
* `n[4:0]`: negabits of weights 16..1.
* `n2b`: an extra negabit of weight 1.

The exponent value is `32*e7 + Σ(n[k]-1)·2^k + (n2b-1)`, in [-32, 32]. The number's value is
`Σ γi·16^(i-6) · 16^exponent`. The packed struct `sut_num_t` holds the exponent (7 bits)
followed by the seven digits (35 bits). The top module's SUT ports are plain vectors
with the same packing, `{exponent, γ(N-1), ..., γ0}`, each digit `{n3, p2, p1, p0, u}`.

### Double precision

For `IW = 64` the same rules give a number of 15 digits and a 10-twit exponent.

* The exponent is `{e10, e9..e2, e1}`: a posibit of weight 256, eight negabits of
  weights 128..1, and the extra negabit. Its range is [-256, 256].
* The significand window holds 4 integer bits and 56 fraction bits. These are the
  53-bit significand, the extension bit and two zero bits of padding.
* An SUT number is 85 bits wide.

All modules take the digit count `N` and the exponent width `EW` as parameters. The
top module derives both from `IW`.

## Converting from IEEE (`ieee_to_sut`)

Conversion takes constant time: two shift levels, one XOR level and one OR level.

* **Exponent.** The biased bits e7..e0 are reused as they are. Read with e6..e0 as
  negabits, they already equal e-127. Bits e7..e2 become the radix-16 exponent.
  (Double: e10..e0 and e-1023 in the same way; e10..e2 become the exponent.)
* **Shift.** The low pair e1 e0 is absorbed by shifting the significand `1.x` (extended
  by one 0 bit) within a 28-bit window (60 bits for double, zero padded):
  * none for e1e0 = 11,
  * one right for 10,
  * two left for 01,
  * one left for 00.
  
  The two left shifts would lower the exponent by one. That is recorded in `n2b`, so no
  decrement is needed.
* **Sign.** For a negative number every window bit is inverted. The missing +1 ulp
  enters at the lowest digit.
* **Restructuring.** Each group of four bits b3..b0 becomes a digit:
  * `n3 = ~b3`, `p2 = b2`, `p1 = b1`,
  * `p0 = XNOR(b0, b-1)` and `u = OR(b0, b-1)`.
  
  Here b-1 is the top bit of the group to the right. Its weight is half a unit in its
  own digit. This pair of gates moves it into the digit above, with the opposite
  correction.

Converted digits never have `p0 = u = 0`. This is what lets `sut_negate` negate them
digit by digit with no carry. It inverts n3, p2 and p1, keeps p0, and sets
`u = NAND(p0, u)`.

## The carry-free adder (`sut_sig_adder`)

The adder works on each digit in two rows:

* **Row 1** forms `a+b` in [-18, 16]. It splits this into an outgoing transfer T in
  {-1, 0, 1} and an interim digit W in [-8, 7]:
  * T = -1 below -8,
  * T = +1 above 7,
  * T = 0 otherwise.
  
  T leaves as a posibit c and a negabit n, so its value is `c + n - 1`.
* **Row 2** is a single full adder at the low end of each digit. It adds W's low bit to
  the incoming pair (c, n). Because `w0 + c + (n-1) = sum + (2·carry - 1)`, the sum bit
  becomes the new `p0` and the carry becomes the stored unibit `u`. The upper bits of W
  are kept as they are.

Nothing travels further than one digit, so the delay does not depend on the word
length. The least-significant digit has no right neighbour and gets the neutral pair
c = 0, n = 1. It then carries `u = w0, p0 = ~w0`, which is worth the same as w0. Its
transfer slot is "empty", and that is where rounding writes.

## The dual-path datapath (`sut_fp_adder`)

```
 eps  eta           mu1        mu2 --[negate if sub]
  |    |             |          |
 [exponent difference]--f1_ge-->[mux L] [mux S]   (L: larger exponent, S: smaller)
  |  |D|<=1  |D|=0  |D|         |        |
  |                     +-------+--------+----------------+
  |                     |  alignment path (|D| >= 2)      |  normalization path (|D| <= 1)
  |                     |  S >> |D| digits -> guard,      |  S >> 1 digit if |D| = 1 -> guard
  |                     |       round, sticky             |  L + S
  |                     |  L + S                          |  top transfer != 0 -> 1-digit right
  |                     |  top transfer != 0 -> right 1   |  else leading-zero count, left shift
  |                     |  top digit zero    -> left 1    |       (guard digit shifted in first)
  +----- select -------[mux]------------------------------+
                        |  exponent of L + (+1 | 0 | -1 | -count)
                     [rounding: rewrite p0 and u of the last digit]
```

Both paths are always computed, and the exponent difference picks one. When |D| >= 2,
the larger operand has a nonzero leading digit. The smaller one has been shifted at
least two digits, so the sum needs at most a one-digit shift. When |D| <= 1, a long
cancellation is possible. Because SUT sums have at most one insignificant leading digit
(a lone 1 or -1), an ordinary leading-zero-digit detector is enough (`sut_lzd_norm`).

`sut_exp_diff` inverts the second exponent, which negates it because the exponent range
is symmetric. It then adds with a 6-bit ripple-carry adder (9-bit for double). The
fourth bit at the weight-1 position is kept beside the sum. The magnitude therefore
leaves as a 6-bit field plus one extra unit bit, and the alignment shifter uses both
directly.

## Guard, round and sticky digits

What lies right of the kept digits matters only through three items:

* the **guard digit**, which a left shift can bring back;
* the **round digit**, classified as -9, -8, [-7, 7] or 8 (`r1 r0` = 00, 01, 10, 11);
* the **sticky digit**: the sign of everything further right, coded as
  `s' s''` = 00 (negative), 01 (zero) or 11 (positive).

Leading digits decide the sign of a redundant fraction: one nonzero digit outweighs all
digits to its right. `sut_sticky_cell` therefore keeps the old sticky value for a zero
digit and takes the digit's sign otherwise. The alignment shifter chains these cells
from the least-significant shifted-out digit upward.

The round digit and sticky digit depend on the post-shift:

| path          | post-shift   | round digit              | sticky takes           |
|---------------|--------------|--------------------------|------------------------|
| alignment     | none         | guard                    | old round digit        |
| alignment     | right 1      | digit shifted out of sum | round, then guard      |
| alignment     | left 1       | round (guard re-enters)  | unchanged              |
| normalization | none         | guard (if D = ±1), else zero | zero                   |
| normalization | right 1      | digit shifted out of sum | guard                  |
| normalization | left k       | zero                     | zero                   |

## Rounding by a stored value (`sut_round`)

After normalization, the last digit's low posibit `l_b` and unibit `u''` are worth
`V = l_b + (2u''-1)`, which is one of -1, 0, 1 or 2. The rounding logic replaces them
with `l_a` and `r''`, whose value `l_a + (2r''-1)` is `V + round/16 + ε·sticky` rounded
to the nearest integer, with ties to even. Here sticky is -1, 0 or +1 and ε is a tiny
positive amount. A tie can only happen when the round digit is
±8 and the sticky digit is zero. The digit's other bits all have even weight, so the
parity of V is the parity of the digit. The logic is two sums of products:

```
r'' = r1·lb·r0·s'  +  u''·(r1 + lb + r0·s')
l_a = NOR(r1 xor lb, r0·s')  +  (r1 xor lb)·r0·s''  +  r1·lb·~r0
```

Of the 64 input combinations, 21 can occur; the rest are don't-cares. For example,
V = -1 never meets a round digit of -8 or -9. Since the rounding value does not change
the exponent, nothing after it needs to wait.

## How far to trust it, and where it departs

The verification is simulation only; nothing has been run on silicon or an FPGA.
Every module has a self-checking testbench that compares against values computed
independently. Each testbench has been shown to fail on a deliberately broken copy of
its module.

The end-to-end test `tb_sut_fp_add_top` runs 30,000 additions and subtractions at full
size. Many of them are chains that feed the redundant result back in as operand 1 or
operand 2. Every result is checked to lie within half a unit of its last digit of the
exact value, which is the round-to-nearest bound. The test also counts each mechanism and requires every one to occur:

* both paths, and D = 0 and D = 1 in the normalization path;
* right and left post-shifts in the alignment path;
* a right shift and a multi-digit normalization shift in the normalization path;
* subtraction, chained operands on both sides, inexact results and zero results;
* the operand-2 negation flag.

`tb_sut_fp_add_top_dp` does the same for the double-precision build. It runs 20,000
operations whose chains start from binary exponents of up to ±200, beyond the single
range. Its reference is exact: every value is expanded into a 1536-bit fixed-point
integer.

The following behaviour is this implementation's own choice, or a limit of the scheme:

* **Double precision.** The 15-digit, 10-twit layout applies the single-precision
  rules to the longer format. It is derived here, not taken from a published layout.
* **Subtracting a redundant operand.** Carry-free negation is exact only for digits
  with `p0` or `u` set, and all converted operands qualify. A result of an earlier
  addition may hold a digit with `p0 = u = 0`. Subtracting such a number raises
  `neg_invalid`, and the result is then not valid. The workaround is to subtract it
  as operand 1 with the roles swapped, or to convert it first.
* **Adder row 1.** The split of a digit sum into transfer and interim digit is written
  as arithmetic on the digit values. No particular gate network is prescribed for it.
  Row 2, the low full adder, is as described above.
* **Sticky cells.** The sticky update is unrolled into a chain of cells. It is not a
  cell iterated over time.
* **Alignment shift.** The shifter uses the full shift amount, clamped at N+2. If only
  the low three magnitude bits steered it, a shift of exactly eight digits would lose
  the round digit.
  When every digit of the smaller operand is shifted out, the addition is not skipped.
  The adder adds zero digits instead, which gives the same sum and keeps one datapath.
* **Overlap with the next operation.** The exponent difference of the next addition
  could start while the current one is still rounding. That needs a pipeline around the
  unit and is not built here.
* **IEEE conformance.** Results are rounded to nearest in value (within half a unit of
  the last digit), but they are not bit-identical to IEEE rounding. Rounding happens
  before conversion to binary, and the conversion can move the binary leading one by
  one or two places. In those "bad rounding positions", the rounded redundant value
  can differ from what IEEE rounding of the converted value would give. Only
  round-to-nearest-even is provided.
* **Not provided:**
  * special values (zero, subnormals, infinities, NaN), which convert as if normal;
  * conversion from SUT back to binary or IEEE;
  * prediction of the rounding position.
* **Exponent range.** A result exponent outside [-32, 32] ([-256, 256] for double) is clamped and flagged by
  `ovf` or `unf`. An exact zero sets `zero`.
* **Timing.** The unit is purely combinational, with no clock and no reset. Registers,
  if needed, go around `sut_fp_add_top`.

## Files

| file | contents |
|------|----------|
| `rtl/sut_pkg.sv`           | digit, exponent and number types, constants, decode helpers |
| `rtl/ieee_to_sut.sv`       | IEEE single or double to SUT conversion |
| `rtl/sut_negate.sv`        | carry-free negation of converted operands |
| `rtl/sut_exp_diff.sv`      | radix-16 exponent difference and path flags |
| `rtl/sut_sig_adder.sv`     | carry-free SUT significand adder |
| `rtl/sut_sticky_cell.sv`   | sticky-digit update |
| `rtl/sut_align_shifter.sv` | alignment shifter with guard, round and sticky |
| `rtl/sut_lzd_norm.sv`      | leading-zero-digit count and normalization shift |
| `rtl/sut_round.sv`         | rounding decision (stored unibit and adjusted posibit) |
| `rtl/sut_fp_adder.sv`      | dual-path adder core |
| `rtl/sut_fp_add_top.sv`    | top: IEEE or SUT operands in, SUT result out |
| `tb/sut_tb_pkg.sv`         | reference decoding of the formats for the testbenches |
| `tb/tb_<module>.sv`        | one self-checking testbench per module |
| `tb/tb_sut_fp_add_top_dp.sv` | end-to-end test of the double-precision build |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With Verilator 5,
from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/sut_pkg.sv tb/sut_tb_pkg.sv rtl/*.sv tb/tb_sut_fp_add_top.sv \
  --top-module tb_sut_fp_add_top -o sim
./obj_dir/sim
```

Replace `tb_sut_fp_add_top` with any other `tb_*` module to test a single block. Each
testbench finishes in well under a second.
