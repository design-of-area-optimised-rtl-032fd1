# Two-digit BCD multiplier and BCD adder

Decimal (BCD) multiplication is awkward in hardware because each digit only
uses ten of the sixteen codes of its nibble. This design sidesteps that in
the multiplier: it converts both BCD operands to binary, multiplies them with
a binary *vertical-and-crosswise* multiplier, and converts the product back
to BCD. Next to it sits a separate two-digit BCD adder, built at cell level
from full and half adders: a binary add followed by a per-digit decimal
correction.

Both units are purely combinational. There is no clock, no reset and no
handshake: drive the inputs, read the outputs after the logic settles.

The default size throughout is two BCD digits per operand (8-bit BCD words).
Every module is parameterised by the number of digits.

## The multiplier: BCD → binary → vertical-crosswise → BCD

```
 a (BCD) ──► bcd_to_bin ──┐
                          ├──► vc_mult ──► bin_to_bcd ──► p (BCD, 4 digits)
 b (BCD) ──► bcd_to_bin ──┘
```

For two digits the sizes are:

| stage | width |
|---|---|
| BCD operand | 8 bits (00..99) |
| binary operand | 7 bits (0..99), zero-extended to 8 for the multiplier |
| binary product | 16 bits out of the multiplier, low 14 used (max 9801) |
| BCD product | 16 bits, 4 digits |

The package `bcd_pkg` computes these widths from the digit count:
`bin_width(D) = clog2(10**D)` and `mult_width(D)`, which is the next power of
two.

**BCD to binary (`bcd_to_bin`).** Horner's rule from the top digit,
`v = v*10 + digit`. Each multiply-by-ten is `(v<<3) + (v<<1)`, so the
converter needs only adders.

**Vertical-and-crosswise multiplication (`vc_mult`, `urdhva_mult`).** This is
the hardest part to follow. Split each 8-bit operand into a low half L and a
high half H, 4 bits each. The method then works in three "columns":

1. vertical, right: `ll = aL·bL`
2. crosswise, middle: `x = aL·bH + aH·bL`
3. vertical, left: `hh = aH·bH`

The columns are added from right to left, each taking the carry of the one
before it:

```
p[3:0]  = ll[3:0]
t       = x + ll[7:4]          (9 bits)
p[7:4]  = t[3:0]
p[15:8] = hh + t[8:4]
```

`urdhva_mult` computes each of the four 4×4 products with the same idea at
single-bit level. Column k of the result gathers every bit product
`a[i]&b[j]` with `i+j = k`, plus the carry from column k−1. Its low bit is
`p[k]` and the rest carries on. So the multiplier is a one-level divide and
conquer. The 8-bit split follows the vertical/crosswise steps. The bit-level
inner multipliers are this implementation's choice.

**Binary to BCD (`bin_to_bcd`).** An unrolled shift-and-add-3 ("double
dabble") converter. Binary bits enter from the MSB. Before each shift, every
BCD digit that is 5 or more gets 3 added. Values of `10**DIGITS` and above
come out modulo `10**DIGITS`, which a full product never reaches.

## The BCD adder (`bcd_adder`)

The adder has two rows of one-bit cells (`half_adder`, `full_adder`).

**Row 1 – binary add.** An 8-bit ripple-carry adder: a half adder on bit 0
and full adders above it. There is no carry input. The carry out of bit 3
(`h0`) has already gone into the upper nibble.

**Carry detect, per digit.** For slice `s` of the binary sum:

* low digit: `K0 = h0 | s3&s2 | s3&s1` (nibble carry, or slice 10..15)
* upper digit: `K1 = h1 | s7&s6 | s7&s5 | ci&s7&s4`, where `ci` is the
  correction carry coming from the low digit. The last term covers a 9 that
  becomes 10 once `ci` is added.

**Row 2 – correction.** Each digit gets `ci + (K ? 6 : 0)` added, modulo 16:

* low digit: bit 0 passes straight through, then HA, FA, HA (adding 0110);
* upper digit: HA, FA, FA, HA (adding `ci` on bit 0 and 0110).

The carry out of the low digit's correction slice is that digit's `ci`
output. It is 1 exactly when `K0 = 1` and the binary row has not already
carried (`h0 = 0`). `cout` is `K1`, the hundreds digit.

The first row, the bit-0 bypass and the low-digit correction cells follow the
original structure. The upper digit's detect term `ci&s7&s4` and its
HA-FA-FA-HA correction cells are this implementation's own. The original
lists HA-HA-FA-HA there, which cannot add both the incoming correction carry
and 0110 on every input. With the change, the adder gives the right result
for all 10,000 input pairs. For more than two digits, the upper-digit slice
is repeated.

Inputs with a nibble above 9 are outside the range of both units. Their
outputs have no meaning.

## Top level (`bcd_arith_top`)

The multiplier (`mul_a`, `mul_b` → `mul_p`) and the adder
(`add_a`, `add_b` → `add_sum`, `add_cout`) are instantiated side by side.
They share no signals. The multiplier does not use the BCD adder internally;
its data flow has no decimal addition. The one parameter is `DIGITS`
(default 2).

## Files

| file | contents |
|---|---|
| `rtl/bcd_pkg.sv` | width functions |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | one-bit cells |
| `rtl/bcd_adder.sv` | BCD adder |
| `rtl/bcd_to_bin.sv`, `rtl/bin_to_bcd.sv` | converters |
| `rtl/urdhva_mult.sv`, `rtl/vc_mult.sv` | vertical-crosswise multipliers |
| `rtl/bcd_mult.sv` | BCD multiplier |
| `rtl/bcd_arith_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Example with Verilator 5:

```
verilator --binary --timing --assert rtl/bcd_pkg.sv -y rtl \
    tb/tb_bcd_arith_top.sv --top-module tb_bcd_arith_top
./obj_dir/Vtb_bcd_arith_top
```

What the testbenches cover:

* `tb_bcd_arith_top` runs the top at default size. It tries all 10,000
  multiplier pairs and, in shuffled order, all 10,000 adder pairs. It counts
  how often each mechanism fired: low-digit correction, the 9-plus-carry
  case, binary nibble carries, decimal carry out, carries out of the
  crosswise column, and four-digit products. It fails if any count is zero.
* `tb_bcd_mult` and `tb_bcd_adder` are exhaustive at two digits. They add
  random checks at three digits (multiplier) and four digits (adder).
* `tb_vc_mult` is exhaustive over 8×8 bits, `tb_urdhva_mult` over 4×4 bits,
  and `tb_bin_to_bcd` over 0..9999.

The reference values are computed with integer arithmetic inside the
testbenches.

## Limits and departures

* Everything is combinational. No pipeline registers were added, although
  the structure can take them between the three multiplier stages.
* The insides of the two converters are standard textbook circuits. They were
  not taken from a specific "modified" converter design.
* The upper digit of the BCD adder departs from the original cell list, as
  explained above.
* The BCD adder is not used inside the multiplier.
* No timing or area figures are given for any FPGA. The RTL is
  technology-neutral.
