# Complex multipliers on Vedic ("vertically and crosswise") multiplication

A complex product (a + jb)(c + jd) = (ac − bd) + j(ad + bc) costs four real
multiplications, one subtraction and one addition. The multiplications
dominate the delay, so this design makes each of them with the
Urdhva‑Tiryagbhyam ("vertically and crosswise") scheme from Vedic arithmetic.
In that scheme every column of partial products is formed at once, and the
columns are then combined with one carry pass. The scheme is used at two levels. Bits are
multiplied crosswise to form word products, and the word products are summed
crosswise into the full product.

The main design is an IEEE‑754 single‑precision (binary32) complex
multiplier. Four floating‑point multipliers each contain a 24×24‑bit Vedic
significand multiplier, and one floating‑point subtractor and one adder
combine the four products. Beside it, and sharing only clock and reset,
stands an integer complex multiplier for 16‑bit two's‑complement operands
(8 bits by parameter). It is built from signed Vedic multipliers.

The design follows the paper *Design and Implementation of Floating Point
Complex number Multiplier Using Modified Vedic Algorithm*. That paper describes
the multiplication scheme and the floating‑point multiplier's units and
algorithm. It gives no timing, no interfaces and no adder. Those parts are this
design's own choices, listed under "Departures and open points" below.

## Vertically and crosswise

For two 3‑digit numbers a2 a1 a0 and b2 b1 b0 the product columns are:

| column | "lines" drawn between the digits | terms                |
|--------|----------------------------------|----------------------|
| 0      | one vertical                     | a0·b0                |
| 1      | one cross                        | a1·b0 + a0·b1        |
| 2      | a star (cross plus vertical)     | a2·b0 + a1·b1 + a0·b2|
| 3      | one cross                        | a2·b1 + a1·b2        |
| 4      | one vertical                     | a2·b2                |

In general, column k holds every aᵢ·b₍ₖ₋ᵢ₎. All columns are independent, so
they are all formed in parallel. They are then resolved from column 0 upward.
Column k plus the carry from column k−1 gives the product digit k, and the
rest of that sum moves on to column k+1. The last column keeps whatever is
left as the top digits.

**`urdhva_mult`** applies this to single bits (digits are 0 or 1, so each
term is an AND). A column of a WIDTH‑bit multiplier holds up to WIDTH ones,
and the carry between columns is a small binary number, not a single bit.

**`vedic_mul`** applies the same pattern one level up. The operands are split
into N = WIDTH/DIGIT words in radix 2^DIGIT. Each word product aᵢ·bⱼ comes
from its own `urdhva_mult` of DIGIT bits. The word products are summed per
column i+j, and the carry moves one word per column. With the default
DIGIT = 8:

* the 16‑bit integer multiplier is two words per operand, so four 8×8
  bit‑level blocks and three columns;
* the 24‑bit significand multiplier of the floating‑point unit is three words
  per operand. This is exactly the a2 a1 a0 × b2 b1 b0 table above, with
  nine 8×8 blocks and five columns.

Both modules are purely combinational. Synthesis is free to rebuild the column
sums into any adder tree. The RTL describes the arithmetic structure, not a
gate netlist.

**`signed_vedic_mul`** wraps `vedic_mul` for two's complement. It takes the
magnitudes, multiplies them, and negates the product when the signs differ.
The magnitude of −2^(WIDTH−1) still fits in WIDTH unsigned bits, so every
input pair is exact.

## The floating‑point multiplier (`fpmul_vedic`)

A binary32 word is sign | 8‑bit exponent (bias 127) | 23‑bit fraction. The
multiplier has the four units the source names, plus normalisation and
rounding between them:

| unit                          | module             | work                                                                                     |
|-------------------------------|--------------------|------------------------------------------------------------------------------------------|
| sign calculation unit         | `fp_sign_unit`     | sign = sa XOR sb                                                                         |
| exponent calculation unit     | `fp_exponent_unit` | e = ea + eb − bias, with a zero field used as 1 (denormal scale); signed, 11 bits        |
| mantissa calculation unit     | `fp_mantissa_unit` | hidden bit = (exponent field ≠ 0); 24×24 → 48‑bit product on `vedic_mul`                 |
| normalisation                 | `fp_normalizer`    | leading‑one search; shift so it lands on top; exponent += 1 − shift                      |
| rounding and assembly         | `fp_round_pack`    | denormalise tiny results, round in one of four modes, pack without the hidden bit        |
| control unit                  | `fp_control_unit`  | NaN / infinity / zero operands override the datapath; result class outputs               |

### Normalisation

The 48‑bit product of two normal significands lies in [1, 4). Its binary point
sits between bits 46 and 45. A product of 2 or more therefore moves right by one place, and
the exponent goes up by one. A product with a denormal operand can have its
leading one much lower, so the normaliser shifts left by as many places as
needed, and the exponent goes down by the same amount. Both cases come from one
leading‑zero count: the shift is `lz` and the exponent changes by `1 − lz`. The
result is 27 bits: the hidden bit, 23 fraction bits, then guard, round and a
sticky bit, which is the OR of all 21 bits below the round bit.

### Rounding, underflow and overflow

`fp_round_pack` first handles results below the normal range. If the exponent
is 0 or negative, the 27‑bit significand is shifted right by 1 − exponent,
with everything shifted out collected into the sticky bit. The result is then
encoded as a denormal, or as zero if nothing is left. This gives gradual
underflow. The four rounding modes are selected per operation by the 2‑bit
`rm` input (`fp_pkg::round_mode_t`):

| rm | mode                 | increment when                          |
|----|----------------------|-----------------------------------------|
| 00 | nearest, ties to even| guard & (round \| sticky \| lsb)        |
| 01 | up (toward +∞)       | positive & (guard \| round \| sticky)   |
| 10 | down (toward −∞)     | negative & (guard \| round \| sticky)   |
| 11 | toward zero          | never                                   |

The rounded 24‑bit significand is added to (exponent − 1) placed in the
exponent field. Because the hidden bit is worth one unit of the exponent
field, a rounding carry needs no extra logic. When 1.11…1 rounds up to 10.0,
or the largest denormal rounds up to the smallest normal, the exponent
increments on its own. An exponent field of 255 or more after this addition
is an overflow. The result is then ±infinity, or the largest finite number
when the mode rounds toward zero.

The flags, in `fp_pkg::fp_flags_t`, are:

* `overflow`;
* `underflow` (tiny before rounding and inexact);
* `inexact`;
* `invalid` (0 × ∞ here, or ∞ − ∞ in the adder).

The class outputs are `is_nan`, `is_inf` and `is_zero`. A NaN operand gives
the quiet NaN `7FC00000`.

### Pipeline

| stage | logic                                               | register                                |
|-------|-----------------------------------------------------|-----------------------------------------|
| 1     | sign, exponent and mantissa units (the 24×24 multiply) | sign, exponent, 48‑bit product, both operands, rm |
| 2     | normaliser, rounding, control unit                  | result, flags, class                    |

A result appears two clocks after `in_valid`, and one operation can enter
every clock. `out_valid` follows `in_valid` through the pipeline. There is no
back‑pressure. `rst_n` is an active‑low asynchronous reset that clears the
valid bits and the output register.

### Other formats

`fpmul_vedic` and its sub‑units take `EXP_W` and `FRAC_W` parameters, with
defaults 8 and 23. Its testbench also runs binary16 (5, 10) and an 8‑bit
format with 4 exponent and 3 fraction bits. These are the "16‑bit" and "8‑bit"
floating‑point sizes. The bias is 2^(EXP_W−1)−1, and the internal exponent has
EXP_W+3 bits. A significand width that is not a multiple of the Vedic word size
(11 bits for binary16) is zero‑extended to the next multiple.

## The complex multipliers

**`fp_complex_mult`** instantiates four `fpmul_vedic` (a_re·b_re, a_im·b_im,
a_re·b_im, a_im·b_re) and two `fp_addsub`: one subtracts for the real part and
one adds for the imaginary part. Each product and each sum is rounded
separately in the same mode, so the result is
`round(round(ar·br) − round(ai·bi))`, not a fused result. Latency is three
clocks (two in the multipliers, one in the adders), with one operand set per
clock. `flags_re` and `flags_im` are the OR of the flags of the two products
and the adder behind each part.

**`fp_addsub`** is a conventional single‑precision adder. The source only
names the addition and subtraction. The adder:

1. swaps the operands so the larger magnitude comes first;
2. aligns the smaller significand into a 27‑bit field with guard, round and sticky;
3. adds or subtracts;
4. renormalises with the same `fp_normalizer`;
5. rounds with the same `fp_round_pack` and the same four modes.

An exact zero sum is +0, or −0 when rounding down. ∞ − ∞ gives NaN with the
invalid flag. It has one output register.

**`complex_vedic_mul`** is the integer version. It has four `signed_vedic_mul`,
one subtraction and one addition, with results of 2·WIDTH+1 bits so that none
can overflow. It has one output register, so the latency is one clock.

**`vedic_complex_top`** puts the two side by side with their own ports
(`fp_*` and `int_*`).

## Files

| file                         | contents                                                      |
|------------------------------|---------------------------------------------------------------|
| `rtl/fp_pkg.sv`              | rounding‑mode enum, flag struct, binary32 quiet NaN           |
| `rtl/urdhva_mult.sv`         | bit‑level vertically‑and‑crosswise multiplier (WIDTH = 8)     |
| `rtl/vedic_mul.sv`           | word‑level Vedic multiplier (WIDTH = 16, DIGIT = 8)           |
| `rtl/signed_vedic_mul.sv`    | two's‑complement wrapper (WIDTH = 16)                         |
| `rtl/complex_vedic_mul.sv`   | integer complex multiplier (WIDTH = 16)                       |
| `rtl/fp_sign_unit.sv`, `fp_exponent_unit.sv`, `fp_mantissa_unit.sv`, `fp_normalizer.sv`, `fp_round_pack.sv`, `fp_control_unit.sv` | floating‑point multiplier units |
| `rtl/fpmul_vedic.sv`         | two‑stage floating‑point multiplier                           |
| `rtl/fp_addsub.sv`           | floating‑point adder/subtractor                               |
| `rtl/fp_complex_mult.sv`     | floating‑point complex multiplier                             |
| `rtl/vedic_complex_top.sv`   | top level                                                     |
| `tb/fp_ref_pkg.sv`           | reference arithmetic for the testbenches                      |
| `tb/tb_<module>.sv`          | one self‑checking testbench per module                        |

## Simulating

Every testbench is self‑checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_vedic_complex_top.sv \
    --top-module tb_vedic_complex_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The include paths let Verilator find
each module in `rtl/<name>.sv`. `tb_vedic_complex_top` runs the whole design at
its default parameters in well under a second. It prints how often each
mechanism occurred:

* each rounding mode;
* a product significand ≥ 2;
* a denormal operand;
* a cancelling subtraction;
* overflow, underflow and invalid;
* NaN and infinite results;
* integer results of either sign;
* the most negative integer operand.

It fails if any of these never happened.

### How the floating‑point results are checked

The testbenches do not reuse the RTL's algorithm. `tb/fp_ref_pkg.sv` carries
values as `real` (IEEE double). The product of two binary32 numbers is exact
in double precision. So is their sum when the exponents differ by at most 29,
and the random operands respect that bound. Rounding that exact double once,
from its bit pattern, to the target format in the requested mode therefore
gives the correctly rounded result. Verilator treats `shortreal` as `real`, so
this rounding is written out in the package rather than taken from
`$shortrealtobits`. The multiplier testbench includes:

* the two operand pairs of the source's simulation (43061000 × C0100000 =
  C396D200 and 40F00000 × 41780000 = 42E88000);
* its worked example −19.0 × 9.5 = −180.5;
* every pair of the 8‑bit format in all four modes.

The integer blocks are checked against integer multiplication: exhaustively
at 8 bits, and at random plus corner values at 16 and 24 bits.

## Departures and open points

These are the points the source leaves open or gets wrong, and the choice made here:

* **Exponent sum.** The algorithm is stated as e = eA + eB. With biased
  exponents, one bias must come off, and the source's own simulation values
  show that (exponent fields 86h and 80h give 87h). The RTL subtracts the bias.
* **Direction of the normalising shift.** The source says the significand is
  shifted left and the exponent incremented with each shift. For the value to
  stay the same, a left shift has to decrement the exponent. The RTL does that,
  and shifts right (incrementing) when the product is 2 or more.
* **Rounding.** The source lists four rounding modes but not how one is
  chosen. Here `rm` is a per‑operation input with the encoding above.
* **Denormals, NaNs, overflow.** The source only asks for special care and an
  overflow indicator. The RTL follows IEEE 754 for these: gradual underflow,
  quiet‑NaN results, 0 × ∞ invalid, overflow to ∞ or the largest finite by
  mode. It does not distinguish signalling NaNs, and NaN payloads are not
  propagated.
* **Timing.** Pipeline depths, valid signals and reset are this design's.
  There is no stall or ready signal.
* **Adder, word size, integer formats.** The floating‑point adder/subtractor,
  the 8‑bit Vedic word size, the sign‑magnitude signed multiplier, the integer
  result width and the 8‑ and 16‑bit floating‑point formats (4/3 and 5/10) are
  this design's choices.
* **Speed claims.** Whether the vertically‑and‑crosswise structure is faster
  than other multipliers after synthesis is not addressed here. A synthesis
  tool is free to restructure the column sums.
