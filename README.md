# Combined binary64 / decimal64 fused multiply-add

This is a single floating-point unit that computes `A × B ± C` with one rounding.
It accepts either IEEE 754-2008 **binary64** or **decimal64** operands (densely packed
decimal, DPD). One input bit chooses the radix. The two formats do not get separate
datapaths. The costly parts, the significand multiplier and the wide final adder,
are one piece of hardware that works in radix 10 or radix 2. Sharing the adder rests
on a redundant digit set, [-6, 6]. Both a decimal digit and an octal (3-bit) binary
digit map onto this set, so the same carry-free adder cells, complementer and
converter serve both formats.

The unit is purely combinational: no clock, no registers, and one result per
evaluation of the inputs. It is written in synthesizable SystemVerilog. It has 26
source files: one package and 25 modules.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `bd` | in | 1 | 1 = binary64, 0 = decimal64 |
| `op` | in | 1 | 0: `A×B + C`, 1: `A×B − C` |
| `opsel` | in | 2 | `00`/`11` fused multiply-add, `01` addition `A ± C`, `10` multiplication `A × B` |
| `rnd_mode` | in | 3 | rounding direction (table below) |
| `opa`, `opb`, `opc` | in | 64 | operands in their interchange encoding |
| `result` | out | 64 | result in the same encoding |
| `flags` | out | 5 | `{invalid, division-by-zero (always 0), overflow, underflow, inexact}` |

| `rnd_mode` | direction |
|---|---|
| 000 | to nearest, ties to even |
| 001 | away from zero |
| 010 | toward +∞ |
| 011 | toward −∞ |
| 100 | toward zero |
| 101 | to nearest, ties away from zero |
| 110 | to nearest, ties toward zero |

Addition is computed as `A × 1 ± C`. Multiplication is `A × B + 0`, where the zero
carries the product's sign and the largest exponent. With these operands the decimal
preferred exponent and the sign of an exact zero come out exactly as for a stand-alone
add or multiply.

## Datapath at a glance

```
 opa opb opc ─► decoders (binary / DPD) ─► sign, exponent, significand, class
                   │                 │
        significands A, B       C and exponents
                   ▼                 ▼
           bd_multiplier         addend_prep ── exponent of window, preferred exponent
     (3 vectors + kcarry)        (aligned, complemented C)
                   └──────┬──────────┘
                 window placement + product sign extension
                          ▼
                4:2 carry-save adder (dec_csa / bin_csa)
                          ▼
         to_redundant ×2 ─► redundant_adder  (digits in [-6,6])
                          ▼
    redundant_converter ─► intermediate sign (dec_sign_detector / MSB)
                          ▼
    redundant_complementer ─► redundant_converter ─► magnitude
                          ▼
     leading zeros (lzd_bin / lzd_base3) ─► rounding position ─► shift
                          ▼
   sticky_detector, dec_rounder / bin_rounder (rounding_cell inside)
                          ▼
   exponent, overflow / clamp / underflow ─► dpd_encoder / binary pack
                          ▼
          special_values overrides NaN and infinity cases
```

## Operand decoding

`bin_decoder` splits binary64 into its sign, exponent and significand. It adds the
hidden bit and gives subnormals the effective biased exponent 1. `dpd_decoder` reads
the 5-bit combination field of decimal64:
- The leading digit is 0–7 or 8–9, depending on the field's first two bits.
- The 10-bit exponent is assembled from whichever combination bits carry it.
- Five `declet_decoder` instances expand the 50-bit continuation into 15 BCD digits.

Both decoders flag zero, infinity, NaN and signalling NaN. They return the common
`operand_t` structure from `bdfma_pkg`.

## The shared multiplier

`bd_multiplier` multiplies two 16-digit BCD coefficients or two 53-bit binary
significands. Each digit of B is recoded into two signed digits:
- **Decimal** (`dec_recoder`, signed-digit radix 5): each BCD digit becomes an upper
  digit from {0, 5, 10} plus a lower digit from {−2 … 2}. The multiples needed are
  A, 2A, 5A and 10A. All are cheap in BCD: 2A comes from doubling in a 5421 code, 5A
  from a shift of a 4221 code.
- **Binary** (`bin_recoder`, signed-digit radix 4): each 4-bit group plus the carry
  from the group below becomes {0, ±4, ±8} plus {0, ±1, ±2}. The multiples are A, 2A,
  4A and 8A, all simple shifts.

A negative partial product is written as the nine's (or one's) complement of its
multiple, extended with 9s (or Fs) to the top column, plus one at its lowest digit.
Every one of the 33 digit columns is then summed into a 9-bit count. The count is
split into units, tens and hundreds (decimal) or into 4-bit slices (binary), giving
three vectors whose sum equals the product modulo R³³.

The complements add a multiple of R³³ that must be removed again. The sum of the
three vectors overflows 33 digits by 0, 1 or 2 units, and the multiplier reports that
count as `kcarry`. The top subtracts it when it places the vectors in the wide window:
the digits above the product are filled with 9s (or 1s), and for `kcarry = 2` the
lowest of them is an 8 (or a 0).

## Alignment window

This is where the design differs most from the usual FMA layout. It is also the part
to read first before changing anything.

All four vectors (three product vectors and the aligned addend) share one fixed-point
window:
- **Decimal:** 101 digits. The product's least significant digit sits at digit 34.
- **Binary:** 273 bits. The product's LSB sits at bit 57.

`addend_prep` computes the exponent difference `d = ExpC − ExpM`. ExpM is the product
exponent; binary exponents are those of the significand LSB, the biased exponent
minus 1075. C is placed at position `34 + d` (decimal) or `57 + d` (binary), clamped
to 0…84 or 0…219. Once C lies more than a full significand beyond the product, only
its existence matters, as a sticky contribution, so the clamp keeps the result correct:
- When C lies far above the product, the window follows C instead: C goes to digit 84
  and the product becomes sticky material at the bottom.
- A zero product lets C be placed by itself.

`addend_prep` also returns `qwin`, the exponent of window position 0. Every later
exponent is `qwin + (shift amount)`. It also returns the decimal preferred exponent,
`min(ExpM, ExpC)`.

With effective subtraction (`eop = signA ⊕ signB ⊕ signC ⊕ op`), the whole window of C
is inverted: each BCD-4221 digit, or each bit. The missing +1 of the ten's (two's)
complement enters later as the carry-in of the conversion to redundant form.

The window is reduced by a 4:2 carry-save adder:
- `dec_csa` works on BCD-4221 digits, where a digit-wise full adder is valid. It
  doubles the carries by recoding 4221 → 5211 and shifting left one bit.
- `bin_csa` is the ordinary two-row full-adder version.

## Redundant addition, sign and magnitude

`to_redundant` turns each BCD digit (or each octal digit of the binary window) into a
digit in [-6, 6] plus a transfer of 0 or 1 into the next digit. Digits above 5
(decimal) or 3 (octal) subtract the radix.

`redundant_adder` is a row of `redundant_adder_cell`s. Each cell:
1. adds its two digits;
2. decides an outgoing transfer of −1, 0 or +1;
3. adds a correction. The correction is the incoming transfer minus 10 or minus 8 times
   the outgoing transfer (mod 16), picked from four precomputed constants by a 4:1
   multiplexer.

No carry ripples: every sum digit depends only on its own digit pair and its right
neighbour.

To get back to BCD or binary, `redundant_converter` treats the redundant vector as a
positive part minus a negative part and resolves borrows with a parallel-prefix
network:
- a negative digit *generates* a borrow;
- a zero digit *propagates* one.

Two results, for a borrow-in of 0 and of 1, are formed, and a multiplexer picks one.

The intermediate sign comes from a first conversion:
- **Decimal:** the window is read as a ten's-complement number. The sum is negative when
  it is larger than 4999…9; the comparison is done by `dec_sign_detector`, a log-depth
  tree of per-digit "greater" and "equal" signals.
- **Binary:** the MSB of the window gives the sign.

When the sum is negative, `redundant_complementer` negates every redundant digit, which
negates the value without any carry. A second conversion then yields the magnitude.

## Normalisation and rounding

Leading zeros are counted on the magnitude:
- **Decimal:** `lzd_bin`, a binary tree of 2-bit cells over the 101 digit-is-nonzero
  flags.
- **Binary:** `lzd_base3`, whose count comes out in base 3, directly usable for shifting
  by octal digits, and also in binary.

The rounding position is the largest of:
- the preferred exponent (decimal only, so that exact results keep it);
- the number of significant digits minus the precision (16 digits or 53 bits);
- the lowest exponent allowed (subnormal limit).

The magnitude is shifted right by that amount, keeping a guard and a round position.
`sticky_detector` ORs everything below them; its sign output matters only for redundant
input and is zero here.

`dec_rounder` and `bin_rounder` form the last digit/bits, the round bit and the sticky
bit. They pass these to `rounding_cell`, which decides between keeping the truncated
value and incrementing it for each of the seven directions. A carry out of the kept
digits increments the rest of the coefficient. A coefficient that rolls over to R^p is
renormalised.

Result assembly:
- The sign is the product sign XOR the intermediate sign.
- An exact zero of two opposite-signed terms is +0, or −0 when rounding toward −∞.
- A decimal exponent above the maximum is first clamped by padding the coefficient with
  zeros if it has room. Otherwise the result overflows to ±∞ or to the largest finite
  number, depending on the direction.
- Binary results with too small an exponent come out subnormal.
- Underflow is raised for a tiny, inexact result; tininess is judged before rounding.
- `dpd_encoder` (with `declet_encoder`) packs decimal results; binary results are
  packed directly.

`special_values` handles NaN and infinity cases and overrides everything else:
- The first NaN among A, B, C is returned quieted, with its payload.
- 0 × ∞, and ∞ − ∞ between product and addend, give the default NaN and raise invalid.
- A signalling NaN raises invalid.
- Otherwise an infinity propagates with its proper sign.

## Departures from the original architecture

The architecture this RTL follows narrows the window with a *selection stage* before
the adder, so that its redundant adder is only about 50 digits wide. It also
*anticipates* the leading zeros from the carry-save vectors in parallel with the
addition, and rounds while the sum is still redundant. This implementation keeps the
algorithms of every block but simplifies how they are connected:
- **No selection stage.** The adder, complementer and converters span the whole
  101-digit / 273-bit window (103 redundant digits). This costs area and delay but no
  accuracy.
- **Leading-zero detection instead of anticipation.** The exact count is taken from
  the converted magnitude, so no one-digit correction step is needed.
- **Rounding after conversion.** The rounding cell and both rounders are used as
  designed, but on the non-redundant magnitude, so the sticky sign is always positive.
- **Product sign extension via `kcarry`.** This replaces the reduced sign-extension
  array of the original multiplier, and the column adders are written as sums rather
  than explicit counter trees.
- **Result sign and operation select.** The result sign is computed as
  `signM ⊕ IntSign`. The operation select is this design's own 2-bit encoding.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. The block testbenches compare
against independent models:
- exhaustive tables for the declet codecs, recoders, rounding cell and the binary
  rounder at all three rounding positions;
- random digits, weighted toward ties, for the decimal rounder at both rounding
  positions, with a positive or negative sticky;
- integer value checks for the carry-save adders, the signed-digit vectors and the
  converter;
- linear scans for the leading-zero detectors.

`tb_bd_fma` runs the top at its default size. Its reference computes the exact value of
`A × B ± C` with 128-bit integers and rounds it in all seven directions:
- operand exponents are kept close enough for that to fit;
- decimal results are encoded by an independent DPD encoder in the testbench;
- binary round-to-nearest results are also compared with the simulator's own
  double-precision arithmetic.

Directed cases cover:
- NaN propagation and invalid operations;
- overflow to infinity and to the largest number;
- subnormal and underflowing results;
- a far-away addend or product;
- exact zeros in two rounding directions;
- the preferred exponent at the top of the decimal range.

The testbench counts each mechanism it exercises (effective subtraction, negative
intermediate sum, rounding increment, product sign extension, the operation selects,
and so on) and fails if any count is zero. It runs about 9,700 checks in under a
second.

Simulation with Verilator 5:

```
verilator --binary -Wno-fatal --top-module tb_bd_fma \
    rtl/bdfma_pkg.sv $(ls rtl/*.sv | grep -v bdfma_pkg) tb/tb_bd_fma.sv
./obj_dir/Vtb_bd_fma
```

Replace `tb_bd_fma` with any other testbench name to run a single block. Some block
testbenches shrink the width parameter of the block under test (to 20 digits) so that
the reference values fit in 128-bit integers.

## Limits

- Only the 64-bit formats; there is no decimal128 or binary32.
- No pipelining. Registers would have to be added around the combinational core by
  the user.
- The decimal encoding is DPD only; the binary-integer decimal encoding is not
  supported.
- The division-by-zero flag is always 0, since no operation here can raise it.
- With the full-width window, the design is considerably larger than the narrowed
  original: roughly 17,000 generic cells after elaboration.
