# SADHNA: a "vertically and crosswise" 4 x 4 digit multiplier

SADHNA (Systematically Acting Device Helping in Numerical Analysis) multiplies
two four-digit numbers with the Urdhva-Tiryagbhyam rule of Vedic mathematics,
"vertically and crosswise". School multiplication forms one partial product per
multiplier digit, shifts it and adds the rows one after another. Here each digit
of the result is found directly instead: it is the sum of the products of every
digit pair whose positions add up to that result position. All of those sums
are independent, so the whole product comes out of one flat, purely
combinational network: sixteen digit multipliers, one adder per result column,
and a final weighted sum that resolves the carries.

This repository holds a SystemVerilog implementation of that design: the four
arithmetic components it is built from, the top-level multiplier
`vedic_multiplier`, and self-checking testbenches.

## The rule, column by column

Read the operands as polynomials in the radix x (x = 10 for decimal):
multiplicand `a b c d` = a·x³ + b·x² + c·x + d, multiplier `e f g h` =
e·x³ + f·x² + g·x + h. Their product has seven coefficients:

| column | weight | digit products summed           | how it is formed        |
|--------|--------|---------------------------------|-------------------------|
| 6      | x⁶     | a·e                             | vertical, one product   |
| 5      | x⁵     | a·f + b·e                       | crosswise, 2-input adder|
| 4      | x⁴     | a·g + b·f + c·e                 | 3-input adder           |
| 3      | x³     | a·h + b·g + c·f + d·e           | 4-input adder           |
| 2      | x²     | b·h + c·g + d·f                 | 3-input adder           |
| 1      | x¹     | c·h + d·g                       | 2-input adder           |
| 0      | x⁰     | d·h                             | vertical, one product   |

Going down the table, the upper digit moves right while the lower digit moves
left: the crosswise pattern "rises" to the middle column (four products) and
"falls" again. Example from the two-digit case: 12 × 13 gives columns
1 | 1·3 + 2·1 = 5 | 2·3 = 6, that is 156.

## From column sums to one integer

A column sum can exceed 9 (column 3 of 9999 × 9999 is 324), so the columns
are not yet the digits of the result. By hand, each column's excess carries into
the next. This implementation does not propagate carries digit by digit.
Instead it multiplies column k by the constant x^k and adds the seven weighted
columns:

    i = col6·x⁶ + col5·x⁵ + col4·x⁴ + col3·x³ + col2·x² + col1·x + col0

This equals (abcd) × (efgh) exactly, and it gives the single integer output the
design's interface calls for. The weighting reuses the same component kinds:
six 2-input multipliers by a constant, then a 4-input adder over columns 6..3,
a 3-input adder over columns 2..0, and a 2-input adder to join the two. The
constants x^k come from a function evaluated at elaboration, so synthesis turns
those multipliers into shift-and-add networks.

The output is therefore a binary integer (the value 3451, not four decimal
digits 3, 4, 5, 1). If a digit-per-port result is wanted, a binary-to-decimal
stage would have to be added after `i`.

## Ports and number format

`vedic_multiplier` has eight inputs `a`..`h` and one output `i`, each a signed
W-bit integer (W = 32 by default):

| port      | meaning                                   |
|-----------|-------------------------------------------|
| a b c d   | multiplicand digits, `a` most significant |
| e f g h   | multiplier digits, `e` most significant   |
| i         | the product, two's complement, W bits     |

A digit is just an integer: nothing restricts it to 0..9. Negative digits and
digits above the radix are weighted like any other, so for example
`a b c d = 0 0 1 -3` means 10 − 3 = 7. The arithmetic is modulo 2^W. The result
is exact whenever the true product fits in W signed bits, and it wraps
otherwise. Every product of two four-digit decimal numbers fits: 9999 × 9999 =
99 980 001 < 2³¹. There is no overflow flag.

Timing: no clock, no reset, no registers. `i` settles one combinational delay
after the inputs. The critical path is one digit multiplier, a 4-input adder,
a constant multiplier and two more adders.

Parameters of `vedic_multiplier`:

| parameter | default | meaning                                  |
|-----------|---------|------------------------------------------|
| `W`       | 32      | width of every port and internal value   |
| `RADIX`   | 10      | base x of the digits                     |

With `RADIX = 2` each port carries one bit and the circuit is an ordinary
4 × 4 bit array multiplier. With `RADIX = 16` the ports are hex digits. The
number of digits per operand (4) is fixed in `sadhna_pkg` and in the explicit
column wiring.

## Components

| module        | function                 | used for                               |
|---------------|--------------------------|----------------------------------------|
| `sadhna_mul2` | y = x0 · x1 (W bits)     | 16 digit products, 6 column weightings |
| `sadhna_add2` | y = x0 + x1              | columns 5 and 1, final sum             |
| `sadhna_add3` | y = x0 + x1 + x2         | columns 4 and 2, lower weighted sum    |
| `sadhna_add4` | y = x0 + x1 + x2 + x3    | column 3, upper weighted sum           |

`sadhna_pkg` holds the shared defaults: width 32, 4 digits, radix 10. Each
component is one combinational expression: the component's function is
specified but its internal structure is left to synthesis. The 4-input adder
is written as (x0 + x1) + (x2 + x3).

## What follows the published design and what is chosen here

Taken from the published SADHNA design:
- the entity name `vedic_multiplier`;
- the ports a..h and i, all 32 bits;
- four digits per operand;
- the vertical-and-crosswise column rule;
- decimal radix;
- the four component kinds, 32-bit signed integers in all of them.

Chosen here because the design leaves them open:
- the mapping of ports to digits (a..d multiplicand, e..h multiplier, most
  significant first);
- weighting the columns by RADIX^k to form the single output;
- two's complement wrap-around on overflow;
- a purely combinational circuit, no clock;
- the internal form of each component.

The original was implemented on a Xilinx QPro VirtexE xqv600e FPGA, using
about 60 % of its slices, 58 % of its 4-input LUTs and 86 % of its bonded I/O.
Its timing and area are not reproduced here.

## Verification

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_sadhna_mul2`, `tb_sadhna_add2`, `tb_sadhna_add3`, `tb_sadhna_add4`: about
  2 500 vectors each. These cover corner values (0, ±1, ±(2³¹−1)), small
  digit-sized values and full-range random values. Each result is compared with
  64-bit arithmetic truncated to 32 bits.
- `tb_vedic_multiplier`: the top at its default parameters. It checks
  12 × 13 = 156, 3451 × 0001 = 3451 and 9999 × 9999 = 99 980 001. It then
  tries every digit position of one operand against every position of the
  other, followed by 3 000 random four-digit decimal pairs, 1 000 vectors of
  signed digits and 1 000 of full-range integer digits. The reference builds
  both operands as integers and multiplies them, independent of the column
  rule. The testbench counts how often a column carries, how often the widest
  column has all four products non-zero, how often a digit is negative and how
  often the product wraps. Each of these must occur at least once.
- `tb_vedic_multiplier_radix`: checks `RADIX = 2, W = 16` on all 256 pairs of
  4-bit operands, and `RADIX = 16` on 2 000 random 16-bit operand pairs.

To run one with Verilator 5 (from the directory holding `rtl/` and `tb/`):

    verilator --binary --timing -Wall -Wno-fatal --top-module tb_vedic_multiplier \
        -y rtl +libext+.sv rtl/sadhna_pkg.sv tb/tb_vedic_multiplier.sv
    ./obj_dir/Vtb_vedic_multiplier

Each testbench finishes in well under a second.
