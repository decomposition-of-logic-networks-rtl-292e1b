# Signed-digit arithmetic with residue-coded digits

High-radix signed-digit (SD) arithmetic adds in constant time: a carry never
travels more than one digit. It also processes addition, subtraction and
magnitude comparison in the same direction, most significant digit first. That
is what a grey-scale morphological filter needs, since it mixes sums with
max/min searches. The catch is the digit adder. A radix-53 SD digit needs
6 bits, so a digit adder is a 12-input function, far too wide for 4- to
6-input logic cells.

This design solves that with a two-level number format:

* **word level: signed digits.** A word is `sum(d_i * R^i)` with digits from
  the symmetric set `{-A..A}`, radix `R`.
* **digit level: residues.** Each digit is stored as its residues modulo two
  coprime moduli `P1` and `P2`, `<d mod P1, d mod P2>`. Residue arithmetic has
  no carries between channels. Each channel of the digit adder therefore sees
  only two 3-bit residues, which is 6 inputs.

The default configuration is **radix 53** with digits `{-27..27}` and moduli
**7 and 8**: 6 bits per digit, and 5 digits to a 32-bit word.

## The number format

With `n = P1*P2`, a residue pair names one value in `-(n/2) .. n/2-1`. The
digit set must fit in that range (`n >= 2A+1`). The four natural choices are:

| bits/digit | moduli | n  | largest A | largest radix with a minimally redundant set (`2A-1`) |
|-----------:|:------:|---:|----------:|--------------------------------------------------:|
| 3          | 2, 3   | 6  | 2         | 3                                                  |
| 4          | 3, 4   | 12 | 5         | 9                                                  |
| 5          | 4, 7   | 28 | 13        | 25                                                 |
| 6          | 7, 8   | 56 | 27        | 53                                                 |

The digit set must be redundant: `floor(R/2)+1 <= A <= R-1`. The threshold `T`
that decides the carry must satisfy `R-A <= T <= A-1`. For radix 53 with
`A = 27` this forces `T = 26`.

Example (radix 10, digits `{-9..9}`, moduli 4 and 7): `9 = <1,2>`,
`-9 = <3,5>`, `-1 = <3,6>`.

In every port, digit `i` (weight `R^i`) is element `[i]` of a packed array.
Residues are plain unsigned binary.

## Adding two digits

Signed-digit addition of `X_i + Y_i` works in two stages:

1. `S = X + Y`. The transfer digit is `C = +1` if `S > T`, `-1` if `S < -T`,
   else `0`. The corrected sum is `S' = S - R*C`.
2. `SUM = S' + C_in`, where `C_in` is the transfer from the position below.

Because `|S'| <= A-1`, adding `C_in` never leaves the digit set, so no carry
ripples.

In residues, `S` comes from two independent modular adders. `S'` adds the
residues of `-R` or `+R`. The final step adds the residues of `C_in`.
All of this is carry-free.

The only hard step is finding `C` from `<S mod P1, S mod P2>`.

### Why the carry needs the argument signs (`sdnr_rns_region`)

`S` ranges over `-2A..2A`, that is `4A+1` values. The code only separates `n`
values. Whenever `n < 4A+1`, some codes stand for a positive and a negative
sum at once.

For radix 10 with `n = 28`, sums 10..18 share codes with -18..-10. For
radix 53 with `n = 56`, the overlap is larger still. A code that decodes to
`v = 5` might mean `S = 5` or `S = -51`.

The signs of the two operands remove the doubt:

* **Mixed signs:** `|S| <= A < n/2`, so `S = v`.
* **Both >= 0:** `S` lies in `0..2A`. A negative `v` can only mean `S = v + n`,
  which is at least `n/2`. That is above `T`, so `C = +1`.
* **Both < 0:** symmetrically, a positive `v` means `S = v - n`, so `C = -1`.

The detector is split into two parts of at most six inputs each:

* **Magnitude test:** `(sp1, sp2)` gives `c0` (the carry if `S = v`) and the
  sign of `v`.
* **Resolver:** `(c0, v<0, v>0, x_neg, y_neg)` gives `C`.

The operand signs come from `rns_digit_sign`, one per argument.

The rule is exact whenever `n >= 2A+1` and `T <= A-1`. One structure
therefore serves every radix from 3 to 53. `tb_sdnr_rns_radix_sweep` checks
this exhaustively for 75 configurations. For each radix 3..53 it uses the
minimal set, and also the maximal set where the moduli allow it.

`sdnr_rns_digit_adder` puts it together. It has six modular adders (sum,
correction and carry-in, two channels each), two sign detectors and the
region detector. Its `ambiguous` output flags the sums the resolver had to
reinterpret.

### Simplified adder for disjoint digit sets (`sdnr_rns_digit_adder_dj`)

If `n >= 4A+1`, every sum has its own code. The sign detectors and the
resolver then drop out: the carry comes from the decoded sum alone. The
defaults are radix 10 with the minimally redundant set `{-6..6}` and moduli
4 and 7 (`28 >= 25`). An elaboration-time `$error` rejects parameters that
break `n >= 4A+1`.

### The modulo-8 adder as two small networks (`rns_mod8_adder_dec`)

`(a + b) mod 8` has six inputs, one too many for a 5-input cell. It is split
as `s = G(H(a[2:1], b[2:1]), a[0], b[0])`:

* `h = (a[2:1] + b[2:1]) mod 4`
* `s[0] = a[0] ^ b[0]`
* `s[2:1] = h + (a[0] & b[0])`

`H` maps the 16 combinations of the upper operand bits onto 4 classes, so
2 internal lines suffice. These are the classes `{0,7,10,13}`, `{1,4,11,14}`,
`{2,5,8,15}` and `{3,6,9,12}`, with column `= 4*a[2:1] + b[2:1]`.

Such splits come from a partition-product search. For each choice of bound
inputs, the search takes the product of the row partitions of the function
table. The number of blocks then gives the number of lines `H` needs. Only
the resulting circuit is part of this RTL.

`rns_mod_adder` uses this network whenever `P = 8`. For other moduli it adds
and subtracts `P` once.

## Words, subtraction, sign and comparison

* `sdnr_rns_word_adder`: a row of digit adders. Each position passes its
  transfer digit one position up, so the delay does not depend on the word
  length.
  * `sub = 1` negates every residue of `Y` first (`p - y`), which negates the
    digit.
  * The sum has one more digit than the operands. The top digit is the last
    transfer.
  * `DISJOINT = 1` selects the simplified digit adder.
* `sdnr_rns_word_sign`: the sign of an SD word is the sign of its most
  significant non-zero digit. A priority chain from the top digit finds it.
  `zero` means every digit is zero.
* `sdnr_rns_comparator`: computes `X - Y` and reads its sign, giving `lt`,
  `eq` and `gt`. The digits of two equal numbers may differ (redundancy);
  `eq` compares values, not digit patterns.

Radix-10 check value, with digits written most significant first:

```
  (-9 3 -7 3) + (1 8 -6 4) = (0 -7 0 -3 7)
  i.e. -8767 + 1744 = -7023
```

The RNS sum digits are `<0,0> <1,0> <0,0> <1,4> <3,0>`.
`tb_sdnr_rns_word_adder` reproduces every one of these codes.

## Radix-4 adder with direct sign-magnitude digits

`sdnr4_digit_stage1` and `sdnr4_adder` are a conventional radix-4 SD adder
with digits `{-3..3}`.

* Each digit has 3 bits: bit 2 is the sign, bits 1:0 the magnitude. `100`
  reads as 0 and is never produced.
* Stage 1 is the 6-input, 3-output function `(X, Y) -> S`, with `S` in
  `{-2..2}`. This function is the standard example for the decomposition
  method.
* Stage 2 adds the transfer from the position below.

The adder is included as the direct-coded counterpart of the residue-coded
adders.

## Top level (`sdnr_rns_top`)

`sdnr_rns_top` holds three independent datapaths. They share only `clk`,
`rst_n`, `in_valid` and `sub`.

| group | ports | function |
|---|---|---|
| radix 53, 5 digits | `x1 x2 y1 y2` (residues mod 7 / mod 8) | `s1 s2` = X ± Y (6 digits), `s_dig` = the same digits as 7-bit two's complement, `res_neg res_zero` = sign of the result, `lt eq gt` = X compared with Y, `carry_pos carry_neg ambiguous` = per-digit status |
| radix 10, 8 digits, simplified adder | `dx1 dx2 dy1 dy2` (mod 4 / mod 7) | `ds1 ds2` = X ± Y, `dcarry_pos dcarry_neg` |
| radix 4, 8 digits, sign-magnitude | `qx qy` | `qs` = X + Y |

Timing:

* All arithmetic is combinational. The results are registered once, so
  `out_valid` follows `in_valid` by exactly one clock.
* While `in_valid` is low, the registers hold the last result.
* `rst_n` is an asynchronous, active-low reset that clears every register.

Synthesised with yosys (coarse, technology-independent), the top is about
6.9k word-level cells and 187 flip-flops.

## Parameters and their limits

The following parameters appear on the adders, the comparator and the top.
The top has a second set (`DJ_*`, `Q_DIGITS`) for the side datapaths.

| parameter | default | meaning |
|---|---|---|
| `R` | 53 | radix |
| `A` | 27 | largest digit magnitude |
| `T` | 26 | carry threshold |
| `P1`, `P2` | 7, 8 | moduli |
| `DIGITS` | 5 | operand length |

A valid configuration needs:

* coprime `P1`, `P2` with `n = P1*P2 <= 64`;
* `n >= 2A+1`, or `n >= 4A+1` for the simplified adder;
* `floor(R/2)+1 <= A <= R-1`;
* `R-A <= T <= A-1`.

The residue decoder (`sdnr_rns_pkg::rns_value`) searches at most 64 code
points. This is the reason for the `n <= 64` limit.

## Files

| file | content |
|---|---|
| `rtl/sdnr_rns_pkg.sv` | carry type, `mod_p`, `rns_value` |
| `rtl/rns_mod_adder.sv`, `rtl/rns_mod8_adder_dec.sv` | residue adders |
| `rtl/rns_digit_encode.sv`, `rtl/rns_digit_decode.sv`, `rtl/rns_digit_sign.sv` | conversions and sign of one digit |
| `rtl/sdnr_rns_region.sv`, `rtl/sdnr_rns_digit_adder.sv`, `rtl/sdnr_rns_digit_adder_dj.sv` | digit adders |
| `rtl/sdnr_rns_word_adder.sv`, `rtl/sdnr_rns_word_sign.sv`, `rtl/sdnr_rns_comparator.sv` | word level |
| `rtl/sdnr4_digit_stage1.sv`, `rtl/sdnr4_adder.sv` | radix-4 sign-magnitude adder |
| `rtl/sdnr_rns_top.sv` | top level |
| `tb/tb_sdnr_ref_pkg.sv` | reference model used by the testbenches: CRT decoding, carry rule, random digits |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_sdnr_rns_radix_sweep.sv` | unified adder at every radix 3..53 |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends a hung run with a failure. For example, to run the end-to-end test at
the default parameters:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/sdnr_rns_pkg.sv tb/tb_sdnr_ref_pkg.sv tb/tb_sdnr_rns_top.sv \
    --top-module tb_sdnr_rns_top
./obj_dir/Vtb_sdnr_rns_top
```

Replace `tb_sdnr_rns_top` with any other testbench name to run that test.

What the testbenches cover:

* **Exhaustive:** the modular adders, the digit conversions, the region
  detector, both digit adders (every digit pair and carry-in), the radix-4
  stage, and the radix sweep.
* **Random:** the word-level units, 3000 to 4000 operations each.
* **End to end:** `tb_sdnr_rns_top` runs 3000 operations at the default
  parameters. It checks:
  * every result value;
  * that every digit lies in its set;
  * the decoded digits, the sign flags and the comparison;
  * the one-cycle latency and result holding.

  It also counts that each mechanism occurs: ±1 carries, sign-resolved sums,
  subtraction, `lt`/`eq`/`gt`, idle cycles, radix-10 carries and radix-4
  top-digit carries.

## What this RTL is, and where it departs from the method

* **Carry-detector circuits:** the arithmetic (digit sets, residues, the
  two-stage addition, the region/sign rule, the simplified adder, the
  modulo-8 split, the sign-of-leading-digit rule) is the published method.
  The circuits inside the region detector, sign detectors and converters are
  this design's own. They are built for correctness at any radix 3..53, not
  hand-mapped to 5-input cells, so the cell counts of an FPGA mapping are not
  reproduced.
* **Residue decoding:** decoding is a search over the code points, which
  synthesises to a small table. The converter `rns_digit_encode` is a
  constant table as well.
* **Not provided:**
  * the partition-product decomposition algorithm itself, which is a
    synthesis program, not hardware;
  * the FPGA cell mapping;
  * the morphological processor that motivates the arithmetic.
* **Choices of this design** where nothing was prescribed:
  * the word length: 5 digits, from 32-bit words;
  * the top-level output register and handshake;
  * the carry coding: 2-bit two's complement;
  * the configurations of the radix-10 simplified adder and the radix-4
    adder;
  * the subtract input.
