# Redundant binary inner-product processor

An inner product (sum of A_i * B_i) is made of carries: every partial product of
every multiplication has to be added, and in ordinary 2's-complement arithmetic
each addition waits for a carry to travel across the word. This processor keeps
all intermediate values in **redundant binary (RB)** form. Each digit is -1, 0 or
+1, and an RB adder settles in constant time regardless of word width, because a
carry never moves more than one position. The partial products of all
multipliers, the adder tree that combines them and the accumulators all work in
RB. Only a value that leaves the processor passes through one carry-propagating
step: a fast RB to 2's-complement converter.

The same adder tree can be tapped at several levels. This lets one piece of
hardware act as:

- an 8-element inner-product unit;
- two 4-element or four 2-element units;
- eight parallel multipliers;
- a complex-number inner-product unit;
- an inner-product unit whose operands are themselves RB numbers.

A Goldschmidt divider is built from the same multiply-add units. It uses the RB
multiplier to keep the whole division loop free of carry propagation. A complex
divider puts three multiply-add units, converters and normalizers in front of
two such dividers.

Default size: 8 lanes of 8-bit operands, 24-digit accumulators, and an 8-bit
divider.

## Redundant binary digits

A digit is two wires `{m, p}` (`rb_pkg::rb_digit_t`) with value `m + p - 1`:

| m p | value |
|-----|-------|
| 0 0 | -1 |
| 0 1 | 0 (the code used by reset and constants) |
| 1 0 | 0 |
| 1 1 | +1 |

With this code:

- Negating a digit means swapping and inverting its two wires (`rb_neg`).
- A number is `sum(d_i * 2^i)`. Another way to read it is as the difference of
  two ordinary bit vectors: `X = P - ~Mn`, where P is the vector of `p` wires
  and Mn the vector of `m` wires.

The **RB full adder** (`rb_adder`, one cell per digit) adds two digits and an
incoming carry digit. Its carry digit depends only on the two operand digits
and on the carry from the position below, never further down. The sum digit
of position i is therefore final after two cell delays, at any word width.
All RB words in the design are modulo 2^W: the carry out of the top digit is
dropped, as in a 2's-complement adder.

## From 2's-complement operands to RB partial products

The key trick (`rb_ppg`) is that two ordinary binary vectors X and Y together
form one RB number, with no logic at all:

- Put x_i on one wire and ~y_i on the other, and the digit is `x_i - y_i`.
  Invert the sign position appropriately and the RB word is exactly
  `X - Y` for 2's-complement X, Y.
- Put x_i and y_i on the wires, and the RB word is `X + Y + 1`. The surplus 1
  is cancelled by a correction.

An N-bit multiplication has N AND-gate partial products, PP_k = A * b_k * 2^k.
Adjacent pairs (PP_2j, PP_2j+1) are merged into one RB partial product this
way. So an 8x8 multiplier has four RB partial products instead of eight bit
vectors, before any adder.

- **Unsigned products** (`sign = 0`): A is zero-extended and every pair uses
  the sum form.
- **Signed products** (`sign = 1`): A is sign-extended. In 2's complement the
  top partial product has negative weight, so the last pair uses the
  difference form.

The -1 digits that cancel the surplus of each sum-form pair are gathered into
one **correction word**. The adder tree treats it as an extra operand. For N = 8
the tree therefore adds five RB words in three levels (`rb_multiplier`,
`rb_adder_tree`).

### Booth option

Setting `BOOTH = 1` on `rb_multiplier`, `rb_ip2`, `rb_ip_core` or the top
swaps in `booth_rbppg`, which recodes B into radix-4 Booth digits in
{-2, -1, 0, +1, +2}:

- Each digit selects 0, A, 2A or the bitwise inverse of A or 2A, giving a
  word C_k. A negative digit owes a +1, since ~X = -X - 1.
- Booth words are paired exactly as above, `C_2p + 4*C_2p+1` in the sum form.
  An 8x8 product therefore has only two RB partial products.
- Each pair's leftovers (its two owed +1s and the -1 of the sum form) become
  two correction digits, at positions 4p and 4p+2.
- For unsigned operands, B is recoded as if signed. The missing
  A * b(N-1) * 2^N is added by correction digits at positions N..2N-1.

All correction digits land on distinct positions and travel as one word. The
multiplier tree then has three operands and two levels instead of five and
three. The products are identical, so the default is the plain generator; the
pipeline stage budget below is stated for it.

`rb_ip2` computes `AB + CD` or `AB - CD` (`real_img = 1` subtracts) with two
such multipliers and one more RB adder. Subtraction costs nothing, since the
CD product is negated digit by digit. This pair unit is the building block of
everything else: the real and imaginary parts of a complex product are
`AB - CD` and `AB + CD`.

## The reconfigurable inner-product core (`rb_ip_core`)

```
 a[0..7], b[0..7]
      |
  operand routing by fmt
      |
  4 x rb_ip2  (units 0..3: eight multipliers, P0±P1 ... P6±P7)
      |                                                   <- stage-1 registers
  level 1: unit0+unit1, unit2+unit3
  level 2: root
      |
  split selects what feeds the 8 accumulator segments
      |
  8 x rb_accumulator  -> 8 x rbnb_converter -> result[0..7]
```

**`split`** chooses the point of the tree that feeds the accumulator segments:

| split | segments used | content |
|-------|---------------|---------|
| SPLIT_ONE | 0 | one 8-element inner product (root) |
| SPLIT_TWO | 0, 1 | two 4-element inner products (level-1 sums) |
| SPLIT_FOUR | 0..3 | four 2-element inner products (unit outputs) |
| SPLIT_EIGHT | 0..7 | eight single products |

**`accumulate`** controls what the segments do with the selected values:

- `accumulate = 1`: add them to the segments.
- `accumulate = 0`: load the segments with them. This starts a new inner
  product, or gives plain parallel multiplication.

**`fmt`** chooses how the eight lanes are read:

- **FMT_REAL**: lane k is the element (a[k], b[k]). `sign` selects signed or
  unsigned operands for the whole pass.
- **FMT_COMPLEX**: two complex elements, X_m = a[2m] + j*a[2m+1] and
  Y_m = b[2m] + j*b[2m+1].
  - Units 0 and 1 compute the real parts (AB - CD). Units 2 and 3 compute the
    imaginary parts (AB + CD).
  - SPLIT_TWO gives Re and Im of X0Y0 + X1Y1 in segments 0 and 1.
  - SPLIT_FOUR gives Re X0Y0, Re X1Y1, Im X0Y0 and Im X1Y1 in segments 0..3.
    This is two independent complex multiply-accumulates, or two complex
    multipliers with `accumulate = 0`.
- **FMT_RB**: the operands are RB numbers. RB element m has its p wires on
  a[2m] and its m wires on a[2m+1] (b likewise), so X = a[2m] - ~a[2m+1].
  - From `X = P - ~Mn`, an RB product is
    `XY = (X_P*Y_P - ~X_Mn*Y_P) + (~X_Mn*~Y_Mn - X_P*~Y_Mn)`. That is two
    unsigned `AB - CD` units and one adder, and a level-1 sum is exactly one
    RB product.
  - SPLIT_ONE gives X0Y0 + X1Y1. SPLIT_TWO gives the two products separately.

**Pipeline.** The core has two stages:

- Stage 1 covers operand mapping and the four `rb_ip2` units, whose longest
  path is four RB adders.
- Stage 2 covers the remaining two tree levels, the accumulator adder and the
  segment registers.

A new operand set can enter every clock. Operands presented with `in_valid`
at clock edge e are in the segments after edge e+1, and `out_valid` is high
from then on. `result` is the combinational 2's-complement conversion of the
segments. `acc_rb` exposes the raw RB segment contents, for example to feed an
RB-format pass.

**Widths.** Tree, segments and results are `ACC_W = 24` digits wide and wrap
modulo 2^24. One hundred products of two signed 8-bit numbers need about 22
bits. No overflow or saturation flags are produced.

## RB to 2's-complement conversion (`rbnb_converter`)

Converting `X = P - ~Mn` is a subtraction, so it needs a carry chain. The
converter is built as a carry-lookahead subtractor using Ling's trick: it
propagates `h_i = c_i + c_(i-1)` instead of the carry itself. Per digit it
needs:

- a NOR, for generate: the digit is -1;
- a NAND, for transfer: the digit is not +1;
- a 3-input XNOR, for the output bit.

The blocks are:

- **`rbnb_ling4`**: converts four digits given the Ling carry into them. It
  also exports that slice's block generate and transfer.
- **`rbnb_cla_gen`**: a 4-way lookahead generator over four slices. It
  delivers the carry into each slice at once, which makes 16 digits a
  two-level lookahead converter.
- Wider words chain 16-digit groups; a 24-digit word is one full group and
  half a group.

The output is the exact 2's-complement code of the RB value modulo 2^W. Worked
check: the 12-digit word `[-1 1 0 -1 0 -1 1 0 -1 0 0 0]` is -1320 and converts
to `0xAD8`.

## Goldschmidt division (`gs_divider`)

Division Q = Z / D uses the iteration

```
F = 2 - D_i ;  D_(i+1) = D_i * F ;  Z_(i+1) = Z_i * F
```

D converges quadratically to 1, and Z to the quotient.

**Datapath.**

- Z and D stay in RB form between iterations, so the loop contains no carry
  propagation at all.
- `rb_two_minus` forms 2 - D by negating every digit and adding the constant 2
  to the integer digits. This is a single RB adder over two digits.
- Two `rb_rb_multiplier`s form D*F and Z*F in parallel. Each is the RB x RB
  product described above: two `rb_ip2` units plus an adder.

**Format and timing.**

- Values have 2 integer digits and N + 2 fractional digits; the two extra
  digits are guard digits.
- Products are cut back to that format each clock.
- log2(N) + 1 iterations are needed for an N-bit quotient: 4 clocks for
  N = 8.
- Only the final Z is converted to binary.

**Interface.**

- `start` loads `z` and `d`. Both are N-bit fractions; `d` must be normalized
  to [0.5, 1), with its top bit set.
- `done` pulses ITER clocks later.
- `q` holds the quotient until the next start. It has 2 integer bits and N
  fraction bits. It differs from the exact quotient truncated to N fraction
  bits by at most one unit of 2^-N (tested).

The cut-back of a product drops digits above the integer part. Because every
loop value lies in [0, 2), a top digit of -1 after the cut can only mean that a
dropped +1 digit was removed. That digit is restored by recoding -1 as +1, so
no carry is needed.

## Complex division (`complex_divider`, `normalizer`)

(A + jB) / (C + jD) equals (AC + BD) / (C^2 + D^2) + j (BC - AD) / (C^2 + D^2).

**Datapath.**

- Three signed `rb_ip2` units form AC + BD, BC - AD and C^2 + D^2. The last
  one uses A = B = C and C = D = D.
- Three converters take the results back to binary.
- The numerators can be negative, so their magnitudes are taken, and the sign
  is kept aside.
- A `normalizer` shifts each value left until its top bit is set, keeping the
  top 8 bits as a fraction in [0.5, 1) and reporting the shift count. This is
  a leading-one search followed by a barrel shift.
- Two `gs_divider`s divide the two normalized numerators by the normalized
  denominator at the same time.

**Result format.** Each quotient part comes out as sign `neg_x`, mantissa
`q_x` (2 integer + 8 fraction bits) and exponent `exp_x`:

```
X = (-1)^neg_x * q_x * 2^-8 * 2^exp_x,   exp_x = shift(denominator) - shift(numerator)
```

Because operands are truncated to 8 significant bits, a result carries about
8 significant bits.

**Special cases and timing.**

- A zero numerator gives q = 0.
- C = D = 0 raises `div_zero`.
- `start` captures the operands. Products, conversion and normalization take
  the following cycle. `done` pulses 5 clocks after the start edge.

## Top level (`rb_ip_processor`)

Three units stand side by side on one clock and one asynchronous active-low
reset, and run at the same time:

- the inner-product core (`ip_*` ports);
- the real divider (`div_*` ports);
- the complex divider (`cdiv_*` ports).

## Departures from the original design and limits

- **RB-format inner products handle two elements per pass, not four.** Each RB
  product takes two of the four pair units. Four parallel RB multipliers would
  need a second set of units, so that mode is not provided.
- **Complex segment placement.** The assignment of complex real and imaginary
  parts to segments (table above) is this design's choice.
- **The divider has its own multipliers.** It does not reuse the
  inner-product core, so a division does not stall the core.
- **Divider number format.** The divider works with 2 integer digits (not 4),
  truncating products, and gives its quotient unrounded.
- **Correction words.** All pair corrections enter the adder tree as one extra
  operand. They are not folded into a partial product or a carry-in.
- **Complex divider hardware count.** In the original scheme the two
  divisions share one divisor iteration, giving six multiply-add units in
  all. Here each division has its own `gs_divider`, and the three front-end
  products have their own units. The arithmetic is the same.
- **Normalizer.** The normalizer circuit is this design's own (leading-one
  search and shift). The sign/mantissa/exponent form of the complex quotient
  is also this design's choice.
- **Not built:**
  - the cross-partial-product variant of the multiply-add unit (an
    alternative to the inline scheme used here);
  - overflow and saturation handling in the accumulators.
- **Widths.** 24-digit accumulators and a 24-digit product width are choices
  of this design.
- **Operand size.** The default operand width is 8 bits. The original design
  was also compared at 16 bits for A0B0 ± A1B1. `rb_ip2` with `N = 16` is
  tested, but the core and the top are only run at 8 bits.

## Files

- `rtl/rb_pkg.sv`: digit type, constants, mode enums.
- `rtl/rb_adder.sv`: W-digit RB adder.
- `rtl/rb_ppg.sv`: inline RB partial products and correction word.
- `rtl/booth_rbppg.sv`: the same with modified-Booth recoding.
- `rtl/rb_adder_tree.sv`: pairwise tree of RB adders.
- `rtl/rb_multiplier.sv`: signed/unsigned 2's-complement multiplier with RB
  output.
- `rtl/rb_ip2.sv`: AB ± CD unit.
- `rtl/rb_accumulator.sv`: one accumulator segment.
- `rtl/rbnb_ling4.sv`, `rtl/rbnb_cla_gen.sv`, `rtl/rbnb_converter.sv`: RB to
  2's-complement converter.
- `rtl/rb_two_minus.sv`: 2 - A in RB.
- `rtl/rb_rb_multiplier.sv`: RB x RB multiplier.
- `rtl/gs_divider.sv`: Goldschmidt divider.
- `rtl/normalizer.sv`: leading-zero normalizer.
- `rtl/complex_divider.sv`: complex divider.
- `rtl/rb_ip_core.sv`: reconfigurable inner-product core.
- `rtl/rb_ip_processor.sv`: top.

Each file opens with a comment on its function, structure, interface and
timing.

## Simulation

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=... failures=...` and stops through a watchdog if it hangs.
The testbenches share:

- `tb/tb_rb_util.sv`: RB value, random words, wrapping;
- `tb/tb_ip_model.sv`: a reference model of the core's modes.

A run with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_rb_ip_processor rtl/rb_pkg.sv tb/tb_rb_util.sv tb/tb_ip_model.sv \
  tb/tb_rb_ip_processor.sv
./obj_dir/Vtb_rb_ip_processor
```

`tb_rb_ip_processor` runs the top at its default size, with no parameter
overrides:

- The core gets 20000 random cycles covering every format/split combination,
  signed and unsigned operands, load and accumulate, idle cycles and
  wrap-around.
- The divider runs 2000 divisions concurrently.
- The complex divider runs 1500 complex divisions concurrently, some of them
  by zero.
- It checks every result against a software model, and checks the pipeline
  latency (2 clocks) and the division latencies (4 and 5 clocks).
- It counts how often each mode and event occurred, and fails if any never
  did.

`tb_rb_multiplier` checks all 65536 operand pairs of the 8-bit multiplier, in
both signed and unsigned mode, with both partial product generators.

Two testbenches cover the document's workload sizes:

- `tb_rb_ip_core` ends with two 100-element inner products of signed 8-bit
  operands, accumulated over 13 passes. One uses random operands. The other
  uses the extreme case, 100 × (−128 × −128) = 1638400. Both sums are
  checked exactly.
- `tb_rb_ip2` also builds 16-bit instances, with both generators. It checks
  A0B0 + A1B1 and A0B0 − A1B1, signed and unsigned, including the
  −2^15 corner.
