# Parallel BCD multiplier, 8 x 8 digits

Decimal arithmetic (banking, billing, financial software) wants results that
are exact in base ten, which binary floating point cannot give. This design
multiplies two 8-digit binary-coded-decimal numbers (32 bits each) into a
16-digit BCD product (64 bits) in a single combinational pass.

Two things make decimal multiplication harder than binary: a multiplier digit
can take ten values, so many multiples of the multiplicand are needed, and
BCD addition needs a decimal correction on every digit. The design attacks
both:

* **Signed-digit recoding.** Multiplier digits 6..9 are rewritten as -4..-1,
  so only the five multiples 1A..5A ever have to be made.
* **Parallel partial products.** All eight partial products are formed at the
  same time and summed in a three-level adder tree.
* **A choice of BCD adder.** Every addition uses one of three BCD adders,
  picked with one parameter: ripple carry, carry lookahead with
  pre-correction, or a Kogge-Stone prefix adder. The Kogge-Stone adder is the
  default because it has the shortest carry path. Reported FPGA results for
  this architecture (Spartan-6) give the longest combinational path as about
  54 ns with the ripple adder, 52 ns with carry lookahead and 41 ns with
  Kogge-Stone.

## Number format

A number is packed BCD, with digit *i* in bits `[4i+3:4i]` and the least
significant digit at the bottom. `32'h12345678` is the number 12,345,678.
All inputs must be valid BCD (each nibble 0..9). The design does not detect
the codes 10..15, and the results for them mean nothing.

## Data path

```
           A (8 digits)                         B (8 digits)
               |                                     |
      +------------------+                     +-----------+
      | evaluation_block |  1A..5A (9 digits)  |  recoder  |  per digit: neg, sel[5:1]
      +------------------+                     +-----------+
               |                                     |
               +-------------+-----------------------+
                             |   x 8, one per digit of B
                  +-----------------------+
                  | multiple_mux          |  |d|*A         (P1..P8)
                  | partial_product       |  b_i*A         (PP1..PP8)
                  +-----------------------+
                             |
                  +-----------------------+
                  | accumulation_block    |  sum of PP_i * 10^i, binary tree
                  +-----------------------+
                             |
                       P (16 digits)
```

| module | role |
|---|---|
| `evaluation_block` | 2A = A+A, 3A = 2A+A, 4A = 2A+2A, 5A = 4A+A. Each multiple is 9 digits wide. |
| `recoder` | For every digit of B: a sign bit and a one-hot magnitude 1..5. A zero digit gives all zeros. |
| `multiple_mux` | An AND-OR selector that picks the multiple for the magnitude. |
| `partial_product` | Turns the magnitude multiple into b_i * A. See the next section. |
| `accumulation_block` | Shifts partial product *i* up by *i* digits and adds all eight: 4 + 2 + 1 adders of 16 digits. |
| `bcd_adder` | Builds the adder style chosen by `KIND`. Every adder above is one of these. |
| `decimal_multiplier` | The top level. |

## Recoding without transfer digits

The recoder maps each multiplier digit to a signed digit on its own:

| digit b | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| recoded d | 0 | +1 | +2 | +3 | +4 | +5 | -4 | -3 | -2 | -1 |
| `sel` bit | none | 1 | 2 | 3 | 4 | 5 | 4 | 3 | 2 | 1 |

A negative digit stands for d = b - 10. In a textbook signed-digit scheme the
missing 10 would be passed as a +1 to the next digit position. That ripple
would make the recoding of each digit depend on the digit below it. This
design avoids it: the 10 is put back inside the same partial product,

```
b * A = (d + 10) * A = 10*A - |d|*A        (for b = 6..9)
```

`partial_product` computes this with one BCD adder and the ten's complement.
It adds A shifted up one digit (10A), the nine's complement of |d|*A, and a
carry-in of 1, and keeps 9 digits. The result is never negative and always
fits in 9 digits (at most 9 x 99,999,999 = 899,999,991). So every partial
product leaving this stage is the plain unsigned value b_i * A, and the
accumulation tree never sees a sign.

So for B = 12345678, with digits 8,7,6,5,4,3,2,1 from the bottom:

* the selected multiples P1..P8 are 2A, 3A, 4A, 5A, 4A, 3A, 2A, 1A;
* the partial products PP1..PP8 are 8A, 7A, 6A, 5A, 4A, 3A, 2A, 1A.

Digit 5 could equally be recoded as -5, since 10A - 5A = 5A. Here it stays +5.

## The three BCD adders

All three adders have the same ports (`a`, `b`, `cin`, `s`, `cout`) and the
same N-digit parameter, and they give identical results. Only their speed and
size differ.

**`bcd_adder_ra`, ripple carry.** Each digit is a 4-bit ripple adder made from
full-adder equations. When the 5-bit digit sum is above 9, the digit adds 6
and sends a decimal carry to the next digit. The carry passes through every
bit of every digit, so the delay grows linearly with the width.

**`bcd_adder_ma`, carry lookahead with pre-correction.** Here the decimal
correction is done before the carries are known:

1. Each digit forms z = a + b (0..18) and adds 6 if z >= 8. The result w now
   behaves like a binary nibble:
   * z >= 10 overflows four bits, so the digit generates a carry;
   * z = 9 becomes 1111, so the digit propagates an incoming carry;
   * z = 8 becomes 1110.
2. A two-level carry lookahead makes every digit carry from the digit
   generate and propagate terms. Digits are in groups of four, and inside a
   group each carry is a sum of products.
3. Each digit adds its carry-in to w modulo 16. The only non-BCD results are
   1110 and 1111, which stand for 8 and 9. Clearing bits 2 and 1 turns them
   into 8 and 9. No correction waits for the carries.

**`bcd_adder_rda`, Kogge-Stone, the default.** It works in three stages:

1. *Pre-processing.* Each digit of `a` gets +6, so digit values 0..9 become
   6..15 and still fit in four bits. A binary carry out of a digit now happens
   exactly when the decimal digit sum reaches 10. The stage forms bit
   generate and propagate for all 4N bits. The carry-in enters as one extra
   generate bit below bit 0.
2. *Carry network.* A Kogge-Stone prefix tree of ceil(log2(4N+1)) levels
   computes every bit carry at once. That is 6 levels for the 9-digit adders
   and 7 for the 16-digit ones.
3. *Post-processing.* The sum bits are the propagate bits XOR the carries. A
   digit that sent no carry out still holds the +6 bias. Adding 10 modulo 16
   removes it.

## Worked example

These are the values a simulation shows at the outputs, in hex-coded BCD.

| signal | A = B = 99999999 | A = 99968999, B = 12345678 |
|---|---|---|
| `mult[1..5]` (M1..M5) | 099999999, 199999998, 299999997, 399999996, 499999995 | 099968999, 199937998, 299906997, 399875996, 499844995 |
| `sel_mult[i]` (P1..P8) | 099999999 for every i | 2A, 3A, 4A, 5A, 4A, 3A, 2A, 1A |
| `pp[i]` (PP1..PP8) | 899999991 for every i | 799751992, 699782993, ..., 099968999 |
| `p` | 9999999800000001 | 1234185071636322 |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 8 (`bcd_pkg::DIGITS`) | digits per operand. The product has 2N digits. |
| `KIND` | `ADDER_RDA` | adder style used everywhere: `ADDER_RA`, `ADDER_MA` or `ADDER_RDA` |

`N` is generic. The testbenches check N = 8, and the adders also at 9 and 16
digits. The integer reference model in the testbenches holds 16 digits, so it
cannot check products wider than N = 8 without changes.

## Timing and interface

`decimal_multiplier` has no clock and no reset. `p` is valid one
combinational delay after `a` and `b` settle. To pipeline it, register `a`,
`b` and `p` outside the module. For observation, the top also brings out the
multiples (`mult`), the selected multiples (`sel_mult`) and the partial
products (`pp`). Leave them unconnected if they are not needed.

## Design choices beyond the reference architecture

The overall structure, the recoding rule and the three adder styles follow
the published architecture. The points below are choices of this
implementation:

* how 2A..5A are built from adders (the adder graph in `evaluation_block`);
* the balanced-tree shape of the accumulation, with all tree adders 16
  digits wide;
* the complement form: ten's complement through an adder carry-in;
* the two-level, four-digit grouping of the lookahead adder;
* the +6 bias and -6 post-correction that let a binary Kogge-Stone network
  add BCD;
* the choice of leaving digit 5 as +5;
* making the design purely combinational. The FPGA implementation it was
  derived from also reported some flip-flops, whose role is not known.

The FPGA delay and LUT figures quoted above belong to that implementation.
This RTL has not been timed on an FPGA.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
outputs with results from ordinary integer arithmetic (`tb/tb_bcd_pkg.sv`
converts between binary and BCD). Each prints `TB_RESULT checks=N
failures=M` at the end.

| testbench | what it covers |
|---|---|
| `tb_bcd_adder_ra`, `_ma`, `_rda` | 16- and 9-digit adders: all single-digit pairs with both carry-ins, long carry chains, 3000 random pairs |
| `tb_evaluation_block` | 1A..5A with all three adder styles |
| `tb_recoder` | every digit in every position |
| `tb_multiple_mux` | every selection, including none |
| `tb_partial_product` | every multiplier digit 0..9 with all three adder styles |
| `tb_accumulation_block` | random and all-maximum partial products |
| `tb_decimal_multiplier` | default top. Checks every stage against the worked example above, corner cases and 3000 random pairs. Also counts zero, positive and negative digits and each magnitude 1..5, and fails if any never occurred. |
| `tb_decimal_multiplier_styles` | the top built with each adder style, 2000 random products |

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_decimal_multiplier \
  rtl/bcd_pkg.sv tb/tb_bcd_pkg.sv rtl/bcd_adder_ra.sv rtl/bcd_adder_ma.sv \
  rtl/bcd_adder_rda.sv rtl/bcd_adder.sv rtl/evaluation_block.sv rtl/recoder.sv \
  rtl/multiple_mux.sv rtl/partial_product.sv rtl/accumulation_block.sv \
  rtl/decimal_multiplier.sv tb/tb_decimal_multiplier.sv
./obj_dir/Vtb_decimal_multiplier
```

For another testbench, change `--top-module` and the last file. The packages
must come first.

## Files

* `rtl/bcd_pkg.sv`: the shared package (digit count, number of multiples,
  adder-style enum, nine's complement function).
* `rtl/`: one module per file, named after the module.
* `tb/`: one testbench per module, plus the reference helper package
  `tb_bcd_pkg.sv`.
