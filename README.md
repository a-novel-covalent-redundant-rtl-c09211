# Covalent redundant binary Booth-2 multiplier

A signed N x N-bit multiplier (N = 8 by default) that accumulates its partial
products in redundant binary (RB) form and generates them with a *covalent*
RB Booth-2 encoder (CRBBE-2).

High-radix Booth recoding cuts the number of partial products, but it needs
"hard" multiples such as 3M, 6M and 7M, and these take a carry-propagate
adder to make. In RB arithmetic most hard multiples come almost for free as
the difference of two shifted copies of the multiplicand: 3M = 4M - M,
7M = 8M - M. The catch is that a plain RB Booth encoder spends one RB
partial product, which is two binary words, on every Booth digit. That
doubles the row count compared with a normal Booth-2 design, which packs two
binary rows into one RB row.

The covalent encoder gets the rows back. It treats two adjacent Booth-2
digits as one radix-16 coefficient

    C = 4*d(i+1) + d(i),     d in {-2..2},  C in {-8..8}

and writes C*M as a single RB row: the positive bits carry one power-of-two
multiple and the negative bits carry the other. Booth-2 digit pairs nearly
always have opposite signs, so this works in almost every case. The one
exception is C = +-5, which uses a precomputed RB copy of 5M. The result:

* N/4 RB partial product rows, the same count as normal Booth-2 with RB
  accumulation;
* no correction vector, because RB numbers carry their sign in the digits;
* only one non-trivial multiple, 5M, made once by a carry-free RB adder
  and shared by all rows.

For 8 x 8 bits that means two rows, one RB adder and one 16-bit subtraction.

## Number formats

**RB digits.** Each digit takes a value in {-1, 0, 1}. It is stored as a pair
of bits `(p, n)` whose value is `p - n` (`rb_pkg::rb_digit_t`); `(1,1)` is a
second code for 0. A W-digit RB number has the value `sum (p_j - n_j) * 2**j`,
which is the positive word X+ minus the negative word X-. An RB number is
signed without a sign bit, so a row is widened by adding zero digits.

**Two's complement words as RB numbers.** A W-bit two's complement word V is
an RB number whose top digit has negative weight. Bits `0..W-2` go to the
positive side and bit `W-1` goes to the negative side. Every block in the
design uses this rule to bring binary multiples into RB form without sign
extension logic.

**Booth-2 digits.** The multiplier bits `b(2i+1) b(2i) b(2i-1)` give
`d(i) = -2 b(2i+1) + b(2i) + b(2i-1)`, with `b(-1) = 0`. The sign of a digit is
taken from `b(2i+1)`, so `000` is +0 and `111` is -0. The covalent encoder
needs this signed zero.

## The covalent duplet table

Row k of the multiplier reads the five bits `b(4k+3) .. b(4k-1)`. The lower
Booth digit is `d(i) = d(2k)` and the upper one is `d(i+1) = d(2k+1)`. They
overlap in `b(4k+1)`, which is the sign of `d(i)` and the weight-1 bit of
`d(i+1)`. That overlap limits which pairs can occur:

* `d(i+1) = +2` only occurs with a negative `d(i)`.
* `d(i+1) = -2` only occurs with a positive `d(i)`.
* The sign of a zero `d(i+1)` always equals the sign of `d(i)`.

Every row is coded as an *upper* multiple U in {0, 4M, 8M} and a *lower*
multiple L in {0, M, 2M}, plus a `swap` flag:

    C*M = U - L     (swap = 0, "positive-negative pair")
    C*M = L - U     (swap = 1, "negative-positive pair")

| upper bits b(i+3..i+1) | d(i+1) | d(i) can be | C            | U, L                          | swap |
|------------------------|--------|-------------|--------------|-------------------------------|------|
| 011                    | +2     | -0, -1, -2  | 8, 7, 6      | 8M, {0, M, 2M}                | 0    |
| 010                    | +1     | +2, +1, +0  | 6, 5, 4      | **8M, 2M** / **5M** / 4M, 0   | 0    |
| 001                    | +1     | -0, -1, -2  | 4, 3, 2      | 4M, {0, M, 2M}                | 0    |
| 000                    | +0     | +2, +1, +0  | 2, 1, 0      | 0, {2M, M, 0}                 | 1    |
| 111                    | -0     | -0, -1, -2  | 0, -1, -2    | 0, {0, M, 2M}                 | 0    |
| 110                    | -1     | +2, +1, +0  | -2, -3, -4   | 4M, {2M, M, 0}                | 1    |
| 101                    | -1     | -0, -1, -2  | -4, -5, -6   | 4M, 0 / **5M** / **8M, 2M**   | 1    |
| 100                    | -2     | +2, +1, +0  | -6, -7, -8   | 8M, {2M, M, 0}                | 1    |

Three rules cover the table:

* **Swap.** `swap` is the sign of `d(i+1)`. When `d(i+1)` is zero, `swap` is
  the complement of that sign. A zero upper digit then lets the sign of
  `d(i)` decide the sign of C.
* **6M rewrite.** The same-sign pairs (1, 2) and (-1, -2) give C = +-6. They
  are rewritten as (2, -2) and (-2, 2), so C*M = +-(8M - 2M): the upper
  magnitude is converted from 1 to 2.
* **5M.** The same-sign pairs (1, 1) and (-1, -1) give C = +-5, which has no
  power-of-two difference form. The row takes the RB multiple 5M, and `swap`
  gives its sign.

### Encoder equations (`crbbe2_reformat`)

Each Booth-2 encoder (`booth2_enc`) outputs `1m`, `2m` (one-hot magnitude)
and `sgn`. The reformatting logic is:

    same    = sgn(i) XNOR sgn(i+1)
    conv    = 1m(i+1) & 2m(i) & same                 // 6M rewrite
    swap    = (1m(i+1) | 2m(i+1)) XNOR sgn(i+1),  swap_n = ~swap
    2M(i+1) = ~conv XNOR 2m(i+1)                     // = 2m(i+1) XOR conv
    1M(i+1) = conv XOR 1m(i+1)
    5M      = same & 1m(i+1) & 1m(i)

`2M(i+1)` and `1M(i+1)` select 8M and 4M as the upper multiple. `1m(i)` and
`2m(i)` select M and 2M as the lower multiple. The resulting control word is
`rb_pkg::crbbe_ctrl_t`.

## Partial product generation and sign handling

`rb_ppg` is a row of N+3 `rb_ppg_slice` digits. N+3 is the width of 8M in
two's complement. M, 2M, 4M and 8M are the multiplicand, sign-extended to
N+3 bits and shifted by 0 to 3 places. Slice j works in two stages:

1. **Input stage.** AND-OR gates pick bit j of the selected upper multiple
   (`h`) and of the selected lower multiple (`l`). When the row's 5M flag is
   set, the slice uses digit j of the RB multiple 5M instead: its positive
   bit as `h` and its negative bit as `l`.
2. **Output stage.** A two-way swap, driven by `swap` and `swap_n`, outputs
   `(p, n) = (h, l)` or `(l, h)`. Negating an RB number is just exchanging its
   two words, so this one stage covers every negative coefficient.

U and L are two's complement words, so their sign bits have negative weight.
For that reason the most significant slice (parameter `MSD = 1`) exchanges
its binary `h` and `l` before the swap. The row is then the exact RB number
U - L (or L - U). There is no sign extension inside the tree and no
correction constant. The digits of 5M are already proper RB digits, so they
skip this exchange.

### The 5M multiple (`rb_5m_gen`)

5M = 4M + M. Both operands are put into RB form by the rule above, each
N+2 digits wide, and added by one carry-free `rb_adder`. The result is an
(N+3)-digit RB number whose value is exactly 5M. It depends only on the
multiplicand, so one generator serves every row, and its delay runs in
parallel with the encoders.

## Accumulation and conversion

**`rb_adder`** is a carry-free RB adder. At each position the digit sum
s in {-2..2} is split as `s = 2*t + w`, using one bit of look-ahead: whether
either digit at the next lower position is negative. The look-ahead fixes
the sign of the transfer that will arrive, so `z = w + t_in` always stays in
{-1, 0, 1}. The delay is constant whatever the width. A W-digit adder returns
W+1 digits.

**`rb_sum_tree`** places row k at digit offset 4k (weight 16**k) in a 2N-digit
field and reduces rows pairwise, 2:1 per level. If a level has an odd number
of rows, the last one passes through unchanged. The sum is kept modulo
2**(2N), which is exact because the product fits in 2N bits. For N = 8 the
tree is one adder. N = 12 and 16 exercise the odd-row and two-level cases.

**`rb2nb`** converts the result with one subtraction, `P = X+ - X-`. This is
the only carry-propagate step in the multiplier.

## Modules and interfaces

| file                  | role                                                        |
|-----------------------|-------------------------------------------------------------|
| `rb_pkg.sv`           | `rb_digit_t`, `crbbe_ctrl_t`, `rb_digit_val()`              |
| `booth2_enc.sv`       | Booth-2 digit encoder (1m, 2m, sgn)                         |
| `crbbe2_reformat.sv`  | covalent reformatting logic, the equations above            |
| `crbbe2_enc.sv`       | CRBBE-2 = two `booth2_enc` + `crbbe2_reformat`              |
| `rb_adder.sv`         | carry-free RB adder, parameter `W`                          |
| `rb_5m_gen.sv`        | shared 5M generator, parameter `N`                          |
| `rb_ppg_slice.sv`     | one PPG digit, parameter `MSD`                              |
| `rb_ppg.sv`           | one PPG row (N+3 slices), parameter `N`                     |
| `rb_sum_tree.sv`      | RBA tree, parameters `N`, `NPP = N/4`, `PPW = N+3`          |
| `rb2nb.sv`            | RB to two's complement, parameter `W`                       |
| `crbbe_mult.sv`       | top: `a`, `b` (N-bit signed) in, `p` (2N-bit signed) out    |

The whole design is combinational: no clock, no reset and no state. The
testbench applies one operand pair every 10 ns (a 100 MHz input rate) and
checks the product within the same cycle. How fast it actually runs depends
on the technology it is mapped to. `N` must be a multiple of 4; any other
value stops elaboration with an error.

## Verification

Every module has a self-checking testbench in `tb/`. Expected values are
computed in the testbench from integer arithmetic, not from the RTL. Each
testbench prints `TB_RESULT checks=<n> failures=<n>`.

* `tb_booth2_enc`, `tb_crbbe2_reformat`, `tb_crbbe2_enc`: all 8 and all 32
  input patterns. The coded coefficient and the (U, L, swap) choice are
  checked against the duplet table.
* `tb_rb_adder`: exhaustive over all digit codes at 2 digits, then corner
  cases and 20 000 random pairs at 16 digits. It also checks that no output
  digit uses `(1,1)`.
* `tb_rb_5m_gen`: all 256 multiplicands. `tb_rb_ppg`: all multiplicands
  times all 32 multiplier fields. `tb_rb_ppg_slice`: all inputs, both slice
  kinds.
* `tb_rb_sum_tree`: random rows for 2, 3 and 4 rows. `tb_rb2nb`: random and
  corner inputs.
* `tb_crbbe_mult`: the default 8 x 8 design. It runs 4096 random pairs at the
  100 MHz input rate, then all 65 536 pairs. It also counts how often each
  encoder mechanism occurs (+-5M, both 6M rewrites, pos-neg and neg-pos
  pairs, +0 and -0 upper digits, the 8M multiple) and fails if any of them
  never occurs.
* `tb_crbbe_mult_wide`: the same RTL at 16 x 16 bits, with corner and random
  operands.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/rb_pkg.sv tb/tb_crbbe_mult.sv --top-module tb_crbbe_mult
    ./obj_dir/Vtb_crbbe_mult

To run another testbench, swap in its file and module name. At `-Wall`, the
only lint message is an unused-bit warning in `rb_sum_tree`: the transfer
out of each tree adder's top digit is dropped on purpose (modulo 2**(2N)).

## What is specified and what is chosen here

These parts follow the published encoder directly: the Booth-2 encoders, the
swap rule, the 6M rewrite, the 5M condition, sharing one RB partial product
between two Booth digits, and the PPG structure of a selecting input stage
followed by a swap output stage. Two of the printed encoder equations needed
interpretation:

* The 1M(i+1) equation has XOR as its outer operator. This is the only
  reading that clears the upper 1 when it becomes a 2.
* The 5M condition compares the signs of the two digits, sgn(i) and sgn(i+1).

The following are this design's own choices:

* **Operand format.** Both operands are two's complement. This gives exactly
  N/4 rows.
* **Sign handling.** Sign bits are moved to the negative side in the top PPG
  slice. Multiples are sign-extended to N+3 bits.
* **5M generator.** 4M + M is formed with the same general carry-free RB
  adder that the tree uses.
* **RB adder, tree and converter.** These are textbook versions. A production
  design would likely use a faster RB adder cell and a carry-lookahead
  RB-to-binary converter. Both have the same function.
* **Parameterisation.** The width N is a parameter, and the tree can take any
  number of rows.

Not modelled:

* transistor-level details: complementary CMOS input gates, transmission-gate
  output stage, drive strength;
* the Booth-1 form of the covalent encoding, which serves only to introduce
  the idea;
* the normal-binary Booth-2 and plain RB Booth-4 multipliers the design is
  compared against.
