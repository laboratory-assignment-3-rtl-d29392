# FPCVT: 12-bit linear to 8-bit floating-point compressor

Audio samples that are stored or sent as 8-bit linear numbers lose either the
quiet passages or the loud ones. Companding fixes this by sending something
close to the logarithm of the sample instead. This design does the compression
half of such a scheme. It takes a 12-bit two's-complement sample and turns it
into one byte:

```
  7   6   5   4   3   2   1   0
+---+-----------+---------------+
| S |     E     |       F       |
+---+-----------+---------------+
```

The byte stands for the value `V = (1 - 2S) * F * 2^E`. S is the sign, E is a
3-bit exponent (0..7) and F is a 4-bit significand (0..15). The circuit picks
the byte whose value is nearest to the input. It is purely combinational and
has no clock.

Examples:

| input D | byte (S E F) | value |
|---|---|---|
| 0 | 0 000 0000 | 0 |
| 422 | 0 101 1101 | 416 |
| 125 | 0 100 1000 | 128 |
| -40 | 1 010 1010 | -40 |
| 56 | 0 010 1110 | 56 |
| 46 | 0 010 1100 | 48 |

A value can have several encodings. For example, 56 is both 0 011 0111 and
0 010 1110. The circuit always gives the *normalized* one, whose significand
has its top bit set, unless the value is below 16. Values below 16 use E = 0
and F equal to the value. These are the *denormalized* encodings.

## Interface

```systemverilog
module fpcvt #(parameter bit SATURATE = 1'b0) (
  input  logic [11:0] D,   // two's complement, D[11] is the sign
  output logic        S,
  output logic [2:0]  E,
  output logic [3:0]  F
);
```

The output settles combinationally from D; there is no latency in cycles. S is
simply D[11].

## How the conversion works

There are three stages, each a module of its own:

```
D --> fpcvt_sign_mag --S---------------------------------------------> S
            |
            +--mag[10:0]--> fpcvt_lzc ----exp-----+--> fpcvt_round --> E
            |                                     |         ^
            +-------------> fpcvt_extract <-------+         |
                                 |  sig, fifth -------------+------> F
```

**1. Sign and magnitude (`fpcvt_sign_mag`).** A negative input is negated: all
bits are inverted and one is added. The result is an 11-bit magnitude from 0
to 2047.

**2. Exponent and leading bits (`fpcvt_lzc`, `fpcvt_extract`).** The exponent
comes from the number of leading zeroes in the 12-bit word `{0, mag}`. The
zero sign bit counts as one of them.

| leading zeroes | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 or more |
|---|---|---|---|---|---|---|---|---|
| E | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |

Put another way, if the highest set bit of the magnitude is at position p ≥ 4,
then E = p − 3. Otherwise E = 0. `fpcvt_lzc` is a priority encoder over
magnitude bits 10 to 4.

The significand is the four bits just below the leading zeroes:
`F = mag[E+3:E]`. The bit under it is the *fifth bit*, `mag[E-1]`, and it
decides rounding. When E = 0 the significand is the low four bits and the fifth
bit is 0. `fpcvt_extract` builds each of these five bits as an 8-to-1
multiplexer, with E as the select. That amounts to a right shift of the
magnitude by E places.

**3. Rounding (`fpcvt_round`).** This is the stage that needs the most care.
The fifth bit is added to the significand. If it is 1, the remainder below the
significand is at least half a step, so adding one gives the nearest value.
Ties round away from zero. For example, inputs 44 to 47 give 1011, 1011, 1100
and 1100 at E = 2.

A significand of 1111 plus one is 10000, which does not fit in four bits. The
adder's carry does two things when this happens:

- the 5-bit sum is shifted right one place, giving 1000;
- the exponent is incremented to compensate.

For example, 125 has E = 3, F = 1111 and fifth bit 1. It becomes E = 4,
F = 1000, which is 128, the nearest representable value. Overflow is detected
from the carry after the addition. It could also have been predicted from
"F = 1111 and fifth bit = 1" before the addition; the two give the same
result.

With this rounding, every input whose magnitude is 0 to 1983 maps to a nearest
representable value. The testbench checks this against a brute-force search
over all 128 exponent and significand pairs.

## Edge cases

**Exponent overflow (magnitudes 1984 to 2047).** Here rounding would need
E = 8. `SATURATE` chooses what happens:

- `SATURATE = 0` (default) ignores the problem. The 3-bit exponent wraps to 0,
  so 2047 gives 0 000 1000, which stands for 8. This is the behaviour the
  method prescribes.
- `SATURATE = 1` clamps the result to the largest magnitude, E = 111 and
  F = 1111, which is ±1920, and keeps the input's sign. 1920 is the nearest
  representable value to these inputs, so with this setting every input except
  -2048 gets its nearest value.

**D = −2048.** This input has no positive counterpart in 12 bits, and the
method leaves it unhandled. Here its magnitude, 2048, is truncated to 11 bits,
so the output is 1 000 0000, which stands for "−0".

## Departures from the method and choices made here

- The method describes only the wrap-around behaviour as the one to build. The
  `SATURATE` option is an addition taken from the alternative the method
  mentions. The method prints that alternative as 1 111 1111. Here the sign is
  kept from the input rather than forced to 1.
- The −2048 result above is this design's choice, since the method ignores
  that input.
- The method names the X74_148 priority encoder as one possible part. The
  priority encoder here is written as a behavioural loop instead, and
  synthesis chooses the gates.
- The method allows the hierarchy to be split as the designer likes. The split
  into `fpcvt_lzc` and `fpcvt_extract`, and using E as the multiplexer select,
  are this design's choices.
- Not included:
  - the reverse operation (expansion from the byte back to a linear value);
  - the μ-law and A-law telephone encodings;
  - a "hidden bit" variant of the format.

  The method mentions these only as background or alternatives.

## Files

| file | contents |
|---|---|
| `rtl/fpcvt_pkg.sv` | widths, the field types and the packed byte struct `fp_byte_t` |
| `rtl/fpcvt_sign_mag.sv` | stage 1, two's complement to sign-magnitude |
| `rtl/fpcvt_lzc.sv` | stage 2a, leading-zero count to exponent |
| `rtl/fpcvt_extract.sv` | stage 2b, significand and fifth bit, as 8-to-1 multiplexers |
| `rtl/fpcvt_round.sv` | stage 3, round, renormalize, handle exponent overflow |
| `rtl/fpcvt.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `fpcvt_full_tb` |

Each testbench tries every possible input of its block and compares the
outputs with values computed by plain integer arithmetic:

- `fpcvt_tb` tests both `SATURATE` settings. It checks:
  - each result against a reference conversion;
  - the nearest-value property;
  - the worked examples above.

  It also counts how often each case occurs: negative input, denormalized
  result, truncation, rounding up, significand overflow, exponent wrap and
  saturation. If any of these never occurs, the test fails.
- `fpcvt_full_tb` runs the top at its default parameters.

Each testbench prints `TB_RESULT checks=N failures=M` at the end.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl --top-module fpcvt_tb \
    rtl/fpcvt_pkg.sv rtl/fpcvt_sign_mag.sv rtl/fpcvt_lzc.sv \
    rtl/fpcvt_extract.sv rtl/fpcvt_round.sv rtl/fpcvt.sv tb/fpcvt_tb.sv
./obj_dir/Vfpcvt_tb
```

To test a single stage, replace the top module and the testbench file, for
example `--top-module fpcvt_round_tb` with `tb/fpcvt_round_tb.sv`. Every
testbench finishes in well under a second. Synthesized, the whole compressor
is a handful of word-level cells: an 11-bit negator, a priority encoder, two
multiplexers, and 5-bit and 3-bit incrementers.

## Changing it

The field widths are in `fpcvt_pkg`. The stages are written in terms of
`LIN_W`, `MAG_W`, `EXP_W` and `SIG_W`. However, the exponent-table mapping
(E = p − 3) and the 8-way multiplexers assume that a 12-bit input maps onto a
3-bit exponent and a 4-bit significand. If you change the widths, keep
`MAG_W = SIG_W + 2^EXP_W - 1`, and the testbenches' hard-coded examples will
also need updating.
