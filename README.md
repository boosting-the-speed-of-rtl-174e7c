# Booth/Vedic digit multiplier

An 8x8 multiplier that does not work on the binary operands as a whole. Instead
it splits them into 4-bit digits and multiplies the digits "vertically and
crosswise", the Urdhva Tiryakbhyam rule of Vedic mathematics. Every digit
product is formed at the same time by its own small radix-2 Booth multiplier.
Each result column is then added up and split into one result digit and a carry
for the next column. The main configuration works in decimal: the operands are
first unpacked into BCD digits, and the result comes out in decimal digit form.

The whole design is combinational. It has no clock, no reset and no state, and
the result settles after the operands change.

The method is the one of the article "Boosting the Speed of Booth Multiplier
Using Vedic Mathematics"; this is an independent RTL of it.

## The vertical-and-crosswise step

Write operand 1 as digits `a1 a0` and operand 2 as `b1 b0`, with radix R
(10 by default). The product has three columns:

| column | what is added                     | split into            |
|--------|-----------------------------------|-----------------------|
| 0      | `a0*b0` (vertical)                | digit `z1`, carry `c1` |
| 1      | `a1*b0 + a0*b1 + c1` (crosswise)  | digit `z2`, carry `c2` |
| 2      | `a1*b1 + c2` (vertical)           | not split: `z3`        |

A column is split into digit = value mod R and carry = value div R. The last
column is kept whole.

Worked example, 88 x 88. Each operand unpacks to the digits 8, 8:

- column 0: 8*8 = 64, so `z1` = 4 and `c1` = 6
- column 1: 64 + 64 + 6 = 134, so `z2` = 4 and `c2` = 13
- column 2: 64 + 13 = 77, so `z3` = 77

The result is 7744.

With more digits per operand (parameter `DIGITS`), the same rule gives
2·DIGITS−1 columns. Column k collects every product `a[i]*b[j]` with
i + j = k, plus the carry of column k−1.

## Result format

This is the part that is easiest to misread. `result` is **not** the binary
product. It is the concatenation

    result = { z3[8:0], z2[3:0], z1[3:0] }      (17 bits at the default sizes)

where `z1` is the units digit, `z2` the tens digit, and `z3` the value of
everything from the hundreds up, in binary. The product is
`z3*100 + z2*10 + z1`. For 88 x 88 the result is `001001101_0100_0100`
(77, 4, 4). `carries` gives the column carries `c1` and `c2` for inspection.

With general `DIGITS`, `result` holds 2·DIGITS−2 four-bit digits, least
significant at bit 0, and the top column (`TOP_W` bits) above them.

## Operand range and the overflow flag

Two decimal digits hold only 0..99. An 8-bit operand can be as large as 255,
and then its hundreds digit has no place in the digit multiplier. `overflow`
goes high when either operand does not fit into `DIGITS` digits. While it is
high, `result` is not the product. To get a correct product for every 8-bit
operand, use one of these:

- `DIGITS = 3`. Decimal, three digits per operand, and 9-bit `z_top`. This
  also works for 999 x 999.
- `RADIX = 16`. The digits become the hexadecimal nibbles of the operand, and
  the same structure computes P = AH·BH·256 + (AH·BL + AL·BH)·16 + AL·BL.
  `result[15:0]` is then the plain binary product and `result[16]` is always 0.

The default stays at two decimal digits because that is the structure of the
worked example: 4-bit digits a, b, c, d, a 4-bit `c1`, an 8-bit `c2` and a
9-bit `z3`.

## Booth digit multiplier

`booth_mult` multiplies two unsigned W-bit digits (W = 4) with the classic
radix-2 Booth procedure, unrolled into W+1 combinational stages. It models four
registers:

- X, the accumulator, which starts at 0
- Y, the multiplicand
- Z, the multiplier
- E, the bit to the right of Z, which starts at 0

Each stage looks at the pair `{Z[0], E}`:

- `01`: add Y to X
- `10`: subtract Y from X
- `00` or `11`: leave X as it is

Then the stage shifts `{X, Z, E}` right by one bit. The shift is arithmetic:
the sign bit of X is kept. After the last stage, the product is `{X, Z}`.
Booth's method is for two's complement numbers, so each digit gets a 0 bit on
top. This keeps it positive, and that extra bit is why there are W+1 stages.

## Unpacking to digits

`bin2bcd` turns the binary operand into BCD with the shift-and-add-3 method
(double dabble). The bits enter most significant first. Before each shift,
3 is added to any digit that is 5 or more. The conversion always uses enough
digits for the whole input width, so it can report overflow. For radix 16 it
just slices the operand into nibbles.

## Modules

| file | role |
|------|------|
| `rtl/bvm_pkg.sv` | digit, carry and column-sum types; widths; `num_digits()` |
| `rtl/bin2bcd.sv` | binary operand to BCD digits or nibbles, plus overflow |
| `rtl/booth_mult.sv` | combinational radix-2 Booth multiplier for one digit pair |
| `rtl/ut_unpack.sv` | column value to result digit and carry (mod / div by radix) |
| `rtl/ut_core.sv` | DIGITS² Booth multipliers, column adders with carry chain, ut_unpack per column |
| `rtl/booth_vedic_mult.sv` | top: two unpackers and the core |

Top-level parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `IN_W` | 8 | operand width |
| `DIGITS` | 2 | digits per operand (2..16) |
| `RADIX` | 10 | 10 for BCD, 16 for nibbles |
| `TOP_W` | 9 | width of the undivided top column `z3` |

Internally, each column sum is 12 bits and each carry is 8 bits. That is
enough for up to 16 digits per operand. `ut_core` asserts that every result
digit is smaller than the radix.

## How closely this follows the method

These parts follow the method as published: the BCD unpacking, the column
order and the widths of the worked example, Booth as the digit multiplier, the
split of each column into a sum digit and a carry, and the digit-form result.

These are choices made for this RTL:

- **Combinational Booth.** The published Booth procedure is register-based.
  Here it is unrolled into a combinational array, because the multiplier is
  meant to work without a clock.
- **No output register.** The method ends with "store the result". There is no
  register here: the result is simply the output port.
- **Conversion method.** The BCD conversion method (double dabble) is this
  design's choice.
- **Radix-16 mode.** The method also describes the binary split into 4-bit
  halves AH/AL, BH/BL. That is offered as `RADIX = 16`. The decimal form is the
  default.
- **Overflow flag.** The `overflow` output is this design's addition.
  Operands above 99 do not fit the default configuration.
- **Timing not reproduced.** Published timing (about 23.7 ns on a Spartan-3,
  against 42.6 ns for a conventional sequential 8x8 Booth multiplier) is not
  reproduced here. The conventional multiplier it was compared with is not
  part of this design.

## Testbenches

Each testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`.

- `tb/tb_booth_mult.sv` runs all 16x16 digit pairs.
- `tb/tb_bin2bcd.sv` runs all 256 inputs with two and three decimal digits
  and with nibbles.
- `tb/tb_ut_unpack.sv` runs every 12-bit value at radix 10 and 16.
- `tb/tb_ut_core.sv` runs all two-digit decimal pairs and all two-nibble
  pairs exhaustively, and random three- and four-digit decimal pairs.
- `tb/tb_booth_vedic_mult.sv` is the end-to-end test. It runs all 256x256
  operand pairs on the default top, on a `RADIX = 16` top and on a
  `DIGITS = 3` top. It also counts
  how often each mechanism occurs: a first-column carry, a carry of 10 or more,
  a zero carry, operand overflow and the nibble mode.
- `tb/tb_booth_vedic_mult_full.sv` uses the top at its defaults. It runs the
  88 x 88 example bit-exactly, all 100x100 in-range pairs, and out-of-range
  operands.

To run one with Verilator, for example:

    verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
        rtl/bvm_pkg.sv tb/tb_booth_vedic_mult.sv --top-module tb_booth_vedic_mult
    ./obj_dir/Vtb_booth_vedic_mult

Every testbench finishes in well under a second.
