# 4-bit complex multiplier: Vedic (Urdhva Tiryakbhyam) and Booth-Wallace

A complex product needs four real multiplications and two additions:

    (A + jB)(C + jD) = (AC - BD) + j(BC + AD)

so the delay of a complex multiplier is set mainly by its real multipliers.
This design builds the same complex multiplier twice. The two copies differ
only in the real multiplier:

* **Vedic**: the *Urdhva Tiryakbhyam* ("vertically and crosswise")
  multiplier. It forms every column of bit products at once and ripples
  only short carry words from column to column. This is the primary design.
* **Booth-Wallace**: the conventional reference it is compared with. It uses
  radix-4 modified Booth encoding, a Wallace carry-save tree and a final
  carry-propagate adder.

Each copy has 4-bit real and imaginary input parts, an 8-bit real output and
a 9-bit imaginary output. That is 33 pins per copy. Everything is
combinational, with no clock and no reset. The operand width `N` is a
parameter; every block also works at other widths.

## Structure

```
complex_mult_top
├── complex_mult #(KIND = MULT_VEDIC)     u_vedic
│   ├── urdhva_mult × 4                   AC, BD, BC, AD
│   ├── ripple_subtractor (2N bits)       R = AC - BD
│   └── ripple_adder (2N bits, carry out) I = BC + AD
└── complex_mult #(KIND = MULT_BOOTH)     u_booth
    ├── booth_wallace_mult × 4
    │   ├── booth_encoder                 multiplier -> radix-4 digits
    │   ├── booth_ppgen                   digits × multiplicand -> rows
    │   ├── wallace_tree                  rows -> sum row + carry row
    │   └── ripple_adder                  final carry-propagate add
    ├── ripple_subtractor
    └── ripple_adder
```

`ripple_subtractor` and `ripple_adder` are chains of `full_adder` cells.
`cmul_pkg` holds the shared types: `booth_digit_t` (one Booth digit) and
`mult_kind_t` (which multiplier to use).

## The vertical-and-crosswise multiplier (`urdhva_mult`)

The multiplier works on N-bit unsigned operands and writes the product one
column at a time, from the least significant column upwards. Column `k`
(k = 0 … 2N-2) holds all the bit products `a[i]·b[j]` with `i + j = k`:

* in the two end columns this is one "vertical" product, `a0b0` or `a3b3`;
* in the columns between, it is several "crosswise" products.

Each column adds its bit products to the carry word left by the column
below:

```
s[k] = c[k-1] + Σ_{i+j=k} a[i]·b[j]
p[k] = s[k] mod 2
c[k] = s[k] div 2            (c[-1] = 0)
p[2N-1] = c[2N-2]
```

For N = 4 there are seven column steps. The middle column adds four bit
products plus the carry from below. A carry can be more than one bit wide:
its largest value is N. A column sum therefore fits in `clog2(2N+1)` bits.

Every bit product exists as soon as the operands do. Only the narrow carry
words move between columns, so no full-width carry has to propagate through
a row of adders.

The RTL writes each column as a small word-level sum inside one
`always_comb` loop, and leaves the choice of counters to synthesis. It does
not build a fixed tree of half and full adders. Operands and product are
unsigned: `p = a·b` exactly, in 2N bits.

## The Booth-Wallace multiplier (`booth_wallace_mult`)

The Booth-Wallace multiplier has three stages.

1. **Modified Booth encoding** (`booth_encoder`). The multiplier `y` is
   two's complement. It is sign-extended to an even width and a 0 is
   appended below bit 0. Each overlapping triplet `y[2i+1] y[2i] y[2i-1]`
   then becomes one digit in {-2, -1, 0, +1, +2}:

   | triplet | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
   |---------|-----|-----|-----|-----|-----|-----|-----|-----|
   | digit   | 0   | +1  | +1  | +2  | -2  | -1  | -1  | 0   |

   This gives ceil(N/2) partial products instead of N. For example,
   `y = 4 = 0100` gives the digits {0, +1}. A digit is carried as
   `{neg, two, one}`.

2. **Partial products** (`booth_ppgen`). Each digit selects 0, X or 2X,
   inverts the selection when the digit is negative, and shifts it left by
   2i. Negation in two's complement is `~m + 1`. The `+1` of every negative
   row goes into one extra correction row, as a single bit at weight
   2^(2i). All rows are 2N bits wide and the arithmetic is modulo 2^(2N),
   so no sign-extension bits are needed. For N = 4 this gives three rows.

3. **Reduction and final add**. `wallace_tree` reduces the rows with layers
   of 3:2 carry-save adders:
   * the XOR of each group of three rows stays in place;
   * the majority of the group moves one bit to the left;
   * rows left over pass on unchanged.

   The layers repeat until two rows remain. A ripple-carry adder then adds
   these two rows. For N = 4, one carry-save layer is enough. The tree has
   parameters `ROWS` and `W`, and is tested with up to 9 rows.

## Number formats (read this before using the outputs)

| output | Vedic copy | Booth copy |
|---|---|---|
| real multiplier operands | all unsigned | A, B (multiplicands) unsigned; C, D (Booth-recoded multipliers) two's complement |
| each real product | exact, 2N bits | (unsigned × signed) modulo 2^(2N) |
| `*_re` (2N bits) | (AC − BD) mod 2^(2N) | (AC − BD) mod 2^(2N) |
| `*_im` (2N+1 bits) | BC + AD, top bit = adder carry | sum of the two 2N-bit product words, top bit = carry |

So the two copies do **not** compute the same function. Booth recoding
reads the multiplier as a signed number, while the vertical-and-crosswise
method reads both operands as plain binary. The mixed convention of the
Booth copy (unsigned multiplicand, signed multiplier, 8-bit products)
reproduces every value of the reference Booth simulation. That simulation
uses the vectors A = 15-k, B = k, C = k, D = 15-k for k = 0…7:

| k | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| booth_re | 0 | 16 | 32 | 48 | 64 | 80 | 96 | 112 |
| booth_im | 241 | 229 | 221 | 217 | 217 | 221 | 229 | 241 |

The real output is only 2N bits wide:

* A negative real part comes out in two's complement.
* In the Vedic copy, AC − BD can reach −225 for N = 4, and the values
  below −128 wrap.
* The subtractor has a `no_borrow` flag (1 when AC ≥ BD as unsigned words),
  but the complex multiplier leaves it unconnected, to keep the 33-pin
  interface.
* If you need the full signed real part, bring `no_borrow` out as a ninth
  bit. This is a one-line change in `complex_mult`.

## Timing

Every block is purely combinational: outputs are valid one propagation
delay after the inputs change. The design has no registers, handshakes or
latency in cycles. In a clocked system, put registers around
`complex_mult` as your timing needs.

## What is this design's own choice

These points follow the reference design:

* the equations of the complex product;
* the 4-bit operands and the 8-bit and 9-bit outputs;
* the column recurrence of the Vedic multiplier;
* the three-stage Booth / Wallace / final-adder organisation;
* the ripple-carry adder on the output.

These points are choices made here:

* the radix-4 recoding table and the `{neg, two, one}` digit code;
* negation through a separate correction row;
* the Wallace grouping of rows;
* the unsigned multiplicand of the Booth multiplier, inferred from the
  reference simulation values;
* word-level column sums in the Vedic multiplier;
* building the subtractor as `a + ~b + 1`;
* generic `N`.

`complex_mult_top` puts the two copies on shared inputs, so you can compare
them from one set of sources. In the original work they were two separate
designs. For a single multiplier, use `complex_mult` directly and set
`KIND`.

The published FPGA figures (about 84 versus 100 slices, 147 versus 174
4-input LUTs, and about 18.4 ns versus 19.7–20 ns delay, Vedic versus Booth)
depend on the technology. This RTL does not claim to reproduce them.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench:

* computes its reference values with integer arithmetic;
* prints `TB_RESULT checks=… failures=…`;
* has a watchdog that ends the run.

| testbench | what it covers |
|---|---|
| `tb_urdhva_mult` | N=4 exhaustive (including 3×4=12 and 15×15); N=5, 8 random |
| `tb_booth_encoder` | digits well formed and Σ dᵢ4ⁱ = y, for N=4, 5, 8, all values; 0100 → {0,+1} |
| `tb_booth_ppgen` | each row, the correction row, and the row sum; N=4 exhaustive, N=6 random |
| `tb_wallace_tree` | 2, 3, 5 and 9 rows: sum + carry equals the row sum; 3-row case is one CSA layer |
| `tb_booth_wallace_mult` | N=4 exhaustive (including 3×4=12); N=5, 8 random |
| `tb_ripple_adder`, `tb_ripple_subtractor` | 8 bits exhaustive; 16 and 12 bits random |
| `tb_complex_mult` | both variants, N=4 all 65536 inputs, the Booth waveform vectors; N=6 random |
| `tb_complex_mult_top` | top at default size, all 65536 inputs, both copies, the waveform vectors; counts mechanisms |

`tb_complex_mult_top` counts how often each mechanism happens and fails if
any count is zero. It counts:

* every Booth digit value;
* negated multiplicands;
* Urdhva carries of two or more;
* negative real parts in each copy;
* imaginary carry-outs in each copy.

To run a testbench with Verilator 5, for example the end-to-end one:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/cmul_pkg.sv tb/tb_complex_mult_top.sv --top-module tb_complex_mult_top
./obj_dir/Vtb_complex_mult_top
```

Replace the testbench name to run any other. Each run takes well under a
second.

To change the size, set `N` on `complex_mult_top` or `complex_mult`. The
outputs widen to 2N and 2N+1 bits. The Booth stages size themselves to
ceil(N/2) digits and ceil(N/2)+1 rows.
