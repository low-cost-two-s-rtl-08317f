# Truncated two's complement multiplier with signed binary digits

Many DSP datapaths keep their word length constant: an n-bit by n-bit
multiply must return n bits, not 2n. A full multiplier computes all 2n
product bits and then throws the low half away. This design never builds
the low half. It keeps only the partial-product digits that land in the
upper n columns. To make up for the carries the missing columns would have
sent, it adds a small, input-dependent correction taken from the single
column just below the cut.

The arithmetic uses redundant binary signed digits (RBSD) throughout. Each
digit is -1, 0 or +1, so partial products can be added without carry
propagation. The only carry-propagating step is the final conversion back
to two's complement. The resulting `n x n -> n` multiplier (`trm_c_mult`)
comes close to rounding the exact product: its error is close to that of
cutting the full product. It costs roughly two thirds of the hardware of a
full RBSD multiplier.

This RTL implements the "TRM_C" truncated RBSD multiplier from the paper
*Low-cost Two's Complement Multipliers Using Signed Binary Digits for
High-speed Digital Systems*. Its error statistics reproduce that paper's
published figures: means and maxima match, variances agree to within
0.1 % (see *Accuracy*).

## Signed digits on two wires

A digit is a `rbsd_pkg::rbsd_t` struct, `{p, m}`, with value `p - m`. The
three encodings used are (0,0) = 0, (1,0) = +1 and (0,1) = -1. (1,1) also
reads as 0, but nothing in the design produces it. An RBSD word is a packed
array of digits. Its value is `P - M`, where `P` is the word formed by the
`p` wires and `M` the word formed by the `m` wires.

Two properties make the front end cheap:

* **Negation is free.** Swapping the `p` and `m` wires of every digit
  negates a word.
* **Two's complement is already an RBSD number.** The multiplicand X is read
  digit by digit: digit j < n-1 is `(x[j], 0)`, and the sign digit is
  `(0, x[n-1])`, which has weight -2^(n-1). A Booth multiple therefore needs
  no sign extension and no "+1" row for negation.

## Datapath

```
 x ──┬──────────────┬── ... ──┐
     │              │         │
 y ─►[Booth enc 0] [enc 1] ... [enc R-1]       R = ceil(n/2) rows, n+1 digits each
     │   │          │   │         │   │
     │   └─ column n-1 digits ────┴───┴──►[comp_tree]──► R-1 carry digits
     │                                          │
     └─ columns n..2n-1 ──►[rb_adder_tree] ◄────┘ (one carry per adder, lowest digit)
                                 │
                           [rbsd_to_nb] ──► p  (n bits)
```

* **`rbsd_booth_encoder`** (one per row). The standard radix-4 Booth table
  applied to the triplet `{y[2i+1], y[2i], y[2i-1]}` selects 0, ±X or ±2X.
  Here y[-1] = 0, and the bits above y[n-1] repeat the sign. 2X is a
  one-digit shift and -X is the wire swap. Row i has n+1 digits. Its digit
  j sits in product column 2i+j.
* **Truncation.** Only columns n..2n-1 reach the adder tree. For n = 8 the
  rows cover these columns:

  ```
  column:  15 14 13 12 11 10  9  8 | 7  6 ... 0
  row 0 :                  .  .  . | p0,7 ...          digits j = 0..8
  row 1 :            .  .  .  .  . | p1,5 ...
  row 2 :      .  .  .  .  .  .  . | p2,3 ...
  row 3 :   .  .  .  .  .  .  .  . | p3,1 p3,0
                                     ^ column n-1 = 7: compensation input
  ```

  Nothing at or below column n-1 is added. The encoders are written in
  full, and synthesis drops the digits that are never used.
* **`rb_adder_tree`**: R-1 word adders (`rba_word`, built from `rba_cell`)
  in a binary tree. Adder j adds nodes 2j and 2j+1 and writes node R+j, so
  the tree has ceil(log2 R) levels. Each adder is carry-free: every digit
  looks at one lower digit only, so adding costs a few gate delays at any
  width.
* **`rbsd_to_nb`**: `p = P - M (mod 2^n)`, a plain subtractor.

Everything is combinational. There are no registers, no clock and no
handshake.

### The carry-free adder cell (`rba_cell`)

The cell splits `a + b` (from -2 to 2) into `2*c_out + s`. An odd sum can be
split two ways, and the cell picks using `h_in`, a flag from the next lower
digit that is set when both of that digit's operands are non-negative:

| a+b | h_in = 1 (lower carry is 0 or +1) | h_in = 0 (lower carry is 0 or -1) |
|-----|-----------------------------------|-----------------------------------|
| +2  | c=+1, s=0                         | c=+1, s=0                         |
| +1  | c=+1, s=-1                        | c=0,  s=+1                        |
|  0  | c=0,  s=0                         | c=0,  s=0                         |
| -1  | c=0,  s=-1                        | c=-1, s=+1                        |
| -2  | c=-1, s=0                         | c=-1, s=0                         |

Then `z = s + c_in` always stays in {-1, 0, 1}. The carry pair passed upward
is `(c_out, h_out)`, with `h_out = (a >= 0) && (b >= 0)`. The carry out of
the top digit is dropped. Each word adder therefore computes its sum modulo
2^n, and that is all the final n-bit result needs.

The lowest digit of every adder has no lower neighbour, because the columns
below were cut away. Its carry input is free, and this is where the
compensation enters. For a carry `c` placed there, `h_in = (c != -1)`
satisfies the rule above.

## Compensation: estimating the missing carries

This is the part that needs the most care.

Let q be the signed sum of the R digits in column n-1, so q runs from -R to
R. The correction added at column n is

```
l = int(q / 2) + rem(q, 2)        (integer part toward zero, remainder with the sign of q)
  = q/2 rounded half away from zero:   q = 3 -> 2,  q = 1 -> 1,  q = -1 -> -1,  q = -3 -> -2
```

The full product is `P = H + V`, where H is the value of the kept columns
and V the value of the dropped ones. The bit that rounding would add is
about `floor(V / 2^(n-1))` halved. Column n-1 carries half of V's weight, so
its sum is a good stand-in. A fixed correction constant does not work here:
signed digits are symmetric about zero, so the average correction would be
0. With l the result is

```
p = (H / 2^n + l) mod 2^n
```

Read with floor instead, as `floor(q/2) + (q mod 2)` = ceil(q/2), the same
formula is clearly worse: for n = 8 the mean error rises to 112 and the
maximum to 555. The half-away-from-zero reading is the one that matches the
published results.

### Delivering l as carries (`comp_tree`)

The tree does not add l as an extra row. It emits l as **R-1 separate carry
digits**, one for each adder of `rb_adder_tree`, each entering that adder's
free lowest-digit carry input. The tree of cells has the same shape as the
adder tree. Its last cell, which produces the rounding decision, feeds the
last adder, so its later arrival fits the timing. The nodes are numbered as
in the adder tree: cell j takes nodes 2j and 2j+1.

* **`rha1`** (first level, two raw column digits). A sum of ±2 becomes carry
  ±1. A sum of ±1 stays in the column as sum digit ±1, which keeps the sign
  of the odd part.
* **`rha2`** (middle levels). Same rule applied to the sum digits from
  above. It also passes on a *sign hint* `g = sign(ga + gb + c)`: an
  estimate of the sign of all carries already sent from its subtree. A raw
  digit has hint 0, and the hint of an `rha1` node is its own carry.
* **`rha3`** (last cell, carry only). Two sum digits a and b are left, and
  `q = 2C + a + b`, where C is everything already sent.
  * If a+b = ±2, the cell sends ±1.
  * If a+b = ±1, q is odd and must be rounded away from zero. The cell sends
    ±1 when q has the same sign as a+b, and 0 otherwise.
  * The sign of q comes from `G = sign(ga + gb)` when G ≠ 0, because |2C|
    then outweighs a+b. Otherwise it comes from a+b.

The sign hint is a sign of a sum of signs, not an exact sum. All inputs were
simulated for R <= 6 (n <= 12) and for odd n = 11, and the carries add up to
exactly l every time. At n = 14 the hint can miss: about 1 result in 100 000
of 8 million random pairs is one unit off l. This is expected from a small
tree whose cells see only their own neighbours.

## Accuracy

Error is measured as e = |x*y - p*2^n| over all input pairs, or over random
samples for n = 14. The published figures are for the same multiplier.

| n  | inputs            | mean e (RTL / published) | variance (RTL / published) | max e (RTL / published) |
|----|-------------------|--------------------------|----------------------------|-------------------------|
| 8  | all 2^16          | 101.06 / 101.1           | 5473.7 / 5470              | 459 / 459               |
| 10 | all 2^20          | 425.53 / 425.5           | 97928 / 97922              | 2219 / 2219             |
| 12 | all 2^24          | 1786.01 / 1786.0         | 1747895 / 1747885          | 10923 / 10923           |
| 14 | 8 M random pairs  | 7474.8 / 7476.0          | 3.0984e7 / 3.0981e7        | 49146 (sampled) / 51883 |

For comparison, with l = 0 (cutting the columns and not compensating) the
n = 8 multiplier has mean 149.1 and maximum 938. Those figures also match
the published ones and confirm the partial-product layout.

## What follows the source design and what is this design's own

Follows the source:

* the RBSD positive/negative digit encoding;
* Booth-2 rows of signed digits without correction rows;
* a tree of carry-free RB adders and a final RBSD-to-binary converter;
* truncation of columns 0..n-1;
* compensation from column n-1 as l = int(q/2) + rem(q,2);
* a compensation tree with distinct first, middle and last cells whose
  carries enter the adders of the truncated tree;
* n = 8 as the main size.

This design's own choices:

* the gate-level logic of every cell. The adder cell is a logic form of the
  standard carry-free rule, not a transistor-level circuit;
* the sign hint that lets `rha3` round away from zero;
* the in-order pairing of both trees;
* the mapping "carry j → adder j";
* the plain subtractor used as converter;
* sign extension of y for odd n;
* a fully combinational datapath.

Not included: the DCT circuit the multiplier was evaluated in. Its
structure is not specified, so its image-quality results cannot be
reproduced here.

## Files

| file | contents |
|------|----------|
| `rtl/rbsd_pkg.sv` | digit type `rbsd_t` and small helper functions |
| `rtl/rbsd_booth_encoder.sv` | one Booth row of RBSD digits |
| `rtl/rba_cell.sv`, `rtl/rba_word.sv` | carry-free RB adder digit and word |
| `rtl/rb_adder_tree.sv` | tree of word adders with free carry inputs |
| `rtl/rha1.sv`, `rtl/rha2.sv`, `rtl/rha3.sv` | compensation cells |
| `rtl/comp_tree.sv` | compensation tree |
| `rtl/rbsd_to_nb.sv` | RBSD to two's complement converter |
| `rtl/trm_c_mult.sv` | top: `x`, `y` (n bits, signed) → `p` (n bits, signed) |
| `tb/tb_trm_pkg.sv` | integer reference model and error statistics |
| `tb/tb_<block>.sv` | one self-checking test per block |
| `tb/tb_trm_c_mult.sv` | top at its default n = 8, all input pairs |
| `tb/tb_trm_c_n10.sv` … `tb_trm_c_n14.sv`, `tb_trm_c_n11.sv` | top at n = 10, 11, 12, 14 |

The only parameter of the top is `N` (default 8, at least 4). The number of
rows, the number of compensation carries and all widths follow from it.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. For
example, the top at its default size:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rbsd_pkg.sv tb/tb_trm_pkg.sv rtl/*.sv tb/tb_trm_c_mult.sv \
  --top-module tb_trm_c_mult -Mdir obj_top
./obj_top/Vtb_trm_c_mult
```

For another testbench, swap in its file and module name. Run times on one
core: n = 8 and 10 take under a second, and n = 12 (all 16.7 M pairs) and
n = 14 (8 M samples) take about 20 s each. The top-level tests also count
how often each mechanism was used: positive and negative compensation,
odd column sums rounded each way, Booth rows selecting 2X, and negated rows.
A mechanism that never occurred counts as a failure.
