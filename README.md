# Fused add-multiply with sum-to-Modified-Booth recoding

This RTL computes **Z = X · (A + B)** for two's complement operands. It does
not add A and B first. The usual way is a carry-propagating adder that forms
Y = A + B, then a radix-4 Modified Booth (MB) encoder on Y, then a multiplier.
Here the adder is *fused* into the multiplier instead: a **sum-to-MB (S-MB)
recoder** turns the two addends straight into the MB digits of their sum. No
carry in the recoder travels further than one digit position, so the adder's
full carry chain leaves the critical path. From then on the unit is an
ordinary radix-4 MB multiplier: partial products, a carry-save tree and one
final carry-lookahead addition.

Three recoders are provided: S-MB1, S-MB2 and S-MB3. They have the same
function and differ only in the signed-bit adder cells they use. Each is
built for both even and odd operand widths. The top level, `fam_top`, holds
one complete fused unit per recoder, side by side on the same inputs.

```
 A ─┐
    ├─► S-MB recoder ─► ND digits ─► mb_encoder ×ND ─► sign/one/two ─┐
 B ─┘                                      │ carry                    │
                                           ▼                          ▼
                                    correction_term          pp_generator ◄── X
                                           │ CT row            │ ND rows
                                           └──────► csa_tree ◄─┘
                                                    │ S, C
                                                    ▼
                                                cla_adder ─► Z
```

With N-bit operands there are ND = N/2 + 1 digits (integer division). The
tree therefore adds ND + 1 rows: the partial products plus one correction
row. A radix-2 array would add about N rows.

## Digits and signed bits

An MB digit takes a value in {-2, -1, 0, +1, +2} and has weight 4^j. Every
block here passes a digit as a *Booth triple* `(hi, mid, lo)` of bits, with
value `-2·hi + mid + lo`. The classic Booth window `(y[2j+1], y[2j], y[2j-1])`
of a binary number has this same weighting. The S-MB recoders produce their
digits directly in this form, so one encoder serves every digit.

The recoders work in *signed-bit* arithmetic. A bit may carry a negative
weight. The MSBs of two's complement numbers do, and so do some internal sums
and carries. The cells are ordinary full and half adders with some inputs
and outputs inverted. Each one keeps an arithmetic identity:

| cell | identity | gates |
|------|----------|-------|
| FA   | x + y + z = 2c + s | full adder |
| HA   | x + y = 2c + s | half adder |
| FA*  | p + q − n = 2c − s | FA on (p, q, ¬n); carry as is, sum inverted |
| FA** | −n1 − n2 + p = −2c + s | FA on (¬n1, ¬n2, p); carry inverted |
| HA*  | x + y = 2c − s | c = x ∨ y, s = x ⊕ y |
| HA** | −n + p = 2c − s | c = ¬n ∧ p, s = n ⊕ p |

When HA* is fed the two negatively weighted MSBs, the same gates give a
negative carry and a positive sum. All these functions are in `fam_pkg.sv`.

## The three recoders

Recoding cell j takes bits 2j and 2j+1 of A and B. It produces the sum bits
s[2j] (positive) and s[2j+1] (negative), and passes carries to cell j+1
*only*. Each digit is formed from the cell's own two sum bits and one carry
from the cell below.

**S-MB1** (`smb1_recoder.sv`) uses an FA and an FA* per cell. Bit b[2j+1] is
split as `b·2^(2j+2) − b·2^(2j+1)`:
- Its negative half enters the FA* with a[2j+1] and the FA carry c[2j+1].
- Its positive half is the third input of the FA of cell j+1.

The cell's digit is `y_j = −2·s[2j+1] + s[2j] + c[2j]`. Here c[2j] is the
FA* carry of cell j−1.

**S-MB2** (`smb2_recoder.sv`) uses an HA, an FA and an HA* per cell:
- The HA adds a[2j+1] and b[2j+1]. Its carry c[2j+2,1] goes to the next
  cell's FA.
- The FA adds a[2j], b[2j] and c[2j,1].
- The HA* adds the HA sum and the FA carry. It gives the negative s[2j+1] and
  the carry c[2j+2,2].

The digit is `y_j = −2·s[2j+1] + s[2j] + c[2j,2]`, with c[0,1] = c[0,2] = 0.

**S-MB3** (`smb3_recoder.sv`) works like S-MB2, but the upper half adder is
an HA*, whose sum is negative. The lower cell is therefore an HA**: it
combines that negative sum with the positive FA carry.

**The top of the word** depends on parity:
- **Even N = 2k.** The top cell sees the negatively weighted a[2k−1] and
  b[2k−1]. One extra *signed digit* y_k ∈ {−1, 0, +1} appears:
  - S-MB1: `c[2k] − b[2k−1]`
  - S-MB2 and S-MB3: `c[2k,2] − c[2k,1]`

  It is passed as the triple `(neg, neg, pos)`.
- **Odd N = 2k+1.** An FA** adds −a[2k], −b[2k] and the cell's positive
  carry in, giving an ordinary MB digit `−2·c[2k+1] + s[2k] + c[2k(,2)]`.

The digits need not match those of a plain Booth encoding of the sum, and
the three recoders do not always agree with each other. For A = 4, B = 2,
S-MB3 gives (−2, −2, +1), digit 0 first. A Booth encoding of 6 gives
(−2, +2, 0). Both are valid MB representations of 6.

## Partial products and the correction term

`mb_encoder` maps a triple to `sign`, `one`, `two` and `carry`. The mapping
is the standard MB table. `carry` is 1 for the negative triples 100, 101 and
110, and **0 for 111**, which is the digit −0.

`pp_generator` forms each N+1-bit row as
`p = one & (X ^ sign) | two & (2X ^ sign)`. A zero digit therefore selects
nothing, whatever its sign bit. That is what makes `carry = 0` for 111
correct.

Two things are left out of the rows:
- the +1 that completes the two's complement of a negative row, and
- the sign extension.

Each row's top bit is inverted instead, and the row is placed at bit 2j. The
correction term (`correction_term`, "CT") then adds one constant row:
`−Σ 2^(N+2j) + Σ carry_j·4^j` (mod 2^(2N+1)). The constant's lowest set bit
is bit N. For an even N, the top digit's carry also lands on bit N. This is
the only place where the CT row needs a (short) carry chain.

## Carry-save tree and final adder

`csa_tree` reduces ROWS rows with rows of full adders (3:2 compressors). Each
level replaces every group of three rows by their bitwise sum and their
majority carry shifted up one bit. Left-over rows pass through unchanged.
Eight-bit operands give 6 rows, which take three levels to reach S and C. The
tree is exact modulo 2^W.

`cla_adder` adds S and C in 4-bit carry-lookahead blocks. Each bit forms its
own propagate and generate signals. Each carry inside a block is one
AND-OR term of the block's carry in, so no bit waits on the bit below it.
Blocks are chained by their carry out.

## Widths

| name | value |
|------|-------|
| N    | operand width, default 8 |
| ND   | N/2 + 1 digits (5 at N = 8: four MB digits plus the signed digit) |
| W    | 2N + 1 product bits |

W is exact for every input. The extreme case is (−2^(N−1))·(−2^(N−1) − 2^(N−1)) = 2^(2N−1), which needs 2N+1 bits.

Unsigned operands fit if you use N + 1 and zero-extend them. `fam_unsigned_tb`
runs unsigned 8-bit operands this way, on a 9-bit instance.

## Files

| file | content |
|------|---------|
| `rtl/fam_pkg.sv` | digit and code types, size functions, signed-bit cell functions |
| `rtl/smb1_recoder.sv`, `smb2_recoder.sv`, `smb3_recoder.sv` | the three S-MB recoders, parameter `N` |
| `rtl/mb_encoder.sv` | digit triple to sign/one/two/carry |
| `rtl/pp_generator.sv` | partial product rows |
| `rtl/correction_term.sv` | CT row |
| `rtl/csa_tree.sv` | carry-save tree, parameters `ROWS`, `W` |
| `rtl/cla_adder.sv` | carry-lookahead adder, parameters `W`, `GROUP` |
| `rtl/fam.sv` | one fused add-multiply unit, parameters `N`, `SCHEME` (`SMB1`/`SMB2`/`SMB3`) |
| `rtl/fam_top.sv` | the three units side by side, parameter `N` |

Everything is combinational. There is no clock, no reset and no register. If
you need throughput, place registers around `fam` or between its stages
(after the recoder, after the tree) yourself.

## Simulating

Each block has a self-checking testbench `tb/<module>_tb.sv`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/fam_pkg.sv tb/fam_top_tb.sv \
          --top-module fam_top_tb -o sim && ./obj_dir/sim
```

Swap in any other testbench name. The package must come first on the command
line.

What the testbenches cover:
- **Recoders**: every operand pair at N = 8, 7, 4, 3 and 2. They check that
  Σ y_j·4^j = A + B and that every digit is in range. They also check the digit
  sequences of these 8-bit examples:

  | scheme | sum | digits (digit 0 first) |
  |--------|-----|------------------------|
  | S-MB1 | 8+4 | 0, −1, +1, 0, 0 |
  | S-MB1 | 5+3 | 0, −2, +1, 0, 0 |
  | S-MB1 | 5+8 | +1, −1, +1, 0, 0 |
  | S-MB2 | 8+2 | −2, −1, +1, 0, 0 |
  | S-MB3 | 4+2 | −2, −2, +1, 0, 0 |
- **`fam_tb`**: all operand triples at N = 5 and N = 4, random operands and
  extremes at N = 8, and the products 10·(8+4) = 120, 10·(5+3) = 80,
  10·(5+8) = 130, 15·(8+2) = 150 and 21·(4+2) = 126.
- **`fam_top_tb`**: the full-size test. It runs every (A, B) pair at N = 8
  with a random X, plus X sweeps. It requires that all three products agree
  with X·(A+B). It counts, per scheme, each digit value, non-zero and negative
  top digits, and −0 triples, and fails if any of them never occurs.
- **`fam_unsigned_tb`**: unsigned 8-bit operands on a 9-bit instance (odd
  width).

## Where this RTL makes its own choices

The adder-cell structure of the three recoders and the encoding table are
the published ones. The following are this design's own choices:
- **Arithmetic.** All operands are two's complement. The recoders are also
  simulated at odd widths.
- **Digit form.** A digit is passed as its three recoder bits. The published
  waveforms show digits as 3-bit two's complement values, for example
  `111` for −1.
- **Negative input of FA\*.** In the middle S-MB1 cells, b[2j+1] is the
  negative input of the FA\*. In the even-width top cell it is a[2k−1]. The
  schematic does not mark which input is negative.
- **Product width.** The product is 2N+1 bits. Published simulations show
  2N-bit values, which overflow only at the most negative inputs.
- **CT and partial products.** Their contents (inverted sign bits, one
  constant row) are not specified in the source. The published simulation
  shows each partial product as the exact, fully sign-extended value
  d·X·4^j: for X = 10 and digit −1 at j = 1 it shows
  `1111111111011000` (−40). The rows here differ from those values bit for
  bit, but together with the CT row they add to the same product. The tree shape (3:2
  Wallace grouping) is not either.
- **Carry-save vs. carry-select.** Parts of the source text describe the
  carry-save stage in terms of a carry-select adder, with sums computed for
  carry-in 0 and 1. This RTL follows the block diagram: a carry-save tree
  producing S and C, then a carry-lookahead adder.
- **CLA width.** Above 4 bits, the 4-bit lookahead blocks are chained by
  ripple between blocks. There is no second-level lookahead.
- **Baseline not built.** The conventional unit (separate adder, then MB
  encoding of the sum) is a baseline only and is not included.

No area or delay figures are claimed here. The RTL has only been checked
for function, by simulation.
