# 5×5 Wallace tree multiplier: carry-save cells versus MUX full adders

This is a combinational multiplier for two 5-bit unsigned numbers. It produces a
10-bit product by reducing the partial-product array column by column in a
Wallace tree. Every adder in it is a one-bit full adder. The design comes in two
versions that differ only in how that full adder is built:

* **CSA version.** It uses the conventional full adder: two XOR, two AND and one
  OR gate. Here it serves as a *carry save adder* (CSA) cell.
* **MUX version.** It uses a full adder made of one XOR gate and two 2:1
  multiplexers (the *MUX FA*).

The two versions compute the same function. They exist so that their area, power
and delay can be compared. The reference 45 nm synthesis of this structure found
the CSA version clearly better, and it is the default here.

| version | cell area | power (nW) | delay (ps) |
|---|---|---|---|
| CSA cells | 245 | 28775 | 812 |
| MUX FA cells | 367 | 43769 | 1099 |

These figures come from that synthesis, which used a commercial 45 nm library.
The RTL here cannot reproduce them. They are listed only to show why the two
versions are kept.

## Full-adder cells

| cell | sum | carry |
|---|---|---|
| `fa_csa` | `(a^b)^c` | `(a^b)&c \| a&b` |
| `fa_mux` | `sel ? ~a : a` | `sel ? a : b`, with `sel = b^c` |

`fa_csa` reuses the first XOR for both outputs. That is why it needs only five
gates.

In `fa_mux` the XOR of `b` and `c` selects both multiplexers:

* If `b == c`, the sum is `a` and the carry is `b` (both equal to `c`).
* If `b != c`, exactly one of `b` and `c` is 1. The sum is then `~a` and the
  carry is `a`.

`fa_cell` picks one of the two cells with the parameter
`FA_STYLE` (`wtm_pkg::FA_CSA` or `wtm_pkg::FA_MUX`). Every adder in the tree
is an `fa_cell`.

## Partial-product columns (`pp_gen`)

The 25 partial products are `x[j] & y[r]`. Each one has weight `2^(j+r)`, so it
belongs to column `i = j + r`, for columns 0 to 8. Each column is presented as
5 bits, indexed by row:

    cols[i][r] = x[i-r] & y[r]   if 0 <= i-r <= 4, else 0

This is the zero padding the structure calls for:

* Columns 0 to 3 have four, three, two and one zeros *below* their products.
* Column 4 is full.
* Columns 5 to 8 have one, two, three and four zeros *above* their products.

That gives 9 × 5 = 45 bits, the input of the tree.

## The five-input Wallace tree (`wt5`)

Each column goes through a 5:3 compressor built from three full adders in series:

```
 a2 a1 a0            a4 a3                 0
  \  |  /             \  |                 |
  [ FA1 ]--sum------->[ FA2 ]              |
     |carry             |carry   sum->s[0] |
     +------------------+-------------->[ FA3 ]--> s[1] (sum), s[2] (carry)
```

FA2's sum has weight 1. FA1's and FA2's carries both have weight 2, and FA3 adds
them: its sum has weight 2 and its carry weight 4. So `s` is the number of ones
among the five inputs, as a binary number from 0 to 5. FA3 has a constant-0
input, so it is really a half adder. Synthesis reduces it to one.

## Three-stage reduction (`wallace_mult5`)

This is the hardest part of the design to follow.

**Stage 1.** Nine `wt5` trees, one per column, turn column `i` into a count
`w[i]`. Its bits have weights `2^i`, `2^(i+1)` and `2^(i+2)`. After stage 1,
column `j` holds at most three bits: `w[j][0]`, `w[j-1][1]` and `w[j-2][2]`.

**Stage 2.** Nine full adders sum those three bits.

| stage-2 adder | column | inputs a, b, c | outputs |
|---|---|---|---|
| j = 0 … 7 | j+1 | `w[j+1][0]`, `w[j][1]`, `w[j-1][2]` (0 if j = 0) | sum in column j+1, carry into column j+2 |
| 8 | 9 | `0`, `w[8][1]`, `w[7][2]` | sum in column 9, carry into column 10 |

**Stage 3.** A nine-adder ripple-carry adder performs the final addition.

| stage-3 adder | column | inputs a, b, c |
|---|---|---|
| k = 0 … 7 | k+2 | stage-2 carry from column k+1, stage-2 sum of column k+2, ripple carry of adder k-1 (0 if k = 0) |
| 8 | 10 | stage-2 carry from column 9, `w[8][2]`, ripple carry of adder 7 |

**Result.**

```
sum_w[0]     = w[0][0]              (column 0 has a single bit)
sum_w[1]     = stage-2 sum, column 1
sum_w[10:2]  = stage-3 sums, columns 2..10
sum_w[11]    = carry out of the last stage-3 adder
product      = sum_w[9:0]
```

The tree produces a 12-bit raw result, `sum_w`. The largest product is
31 × 31 = 961, which is below 2^10, so `sum_w[11:10]` is always zero. Dropping
those two bits gives the 10-bit product. Some tools may report these two
outputs, and the padding zeros of `pp_gen`, as constant. That is expected.

Per version, the multiplier uses:

* 25 AND gates,
* 9 × 3 full adders in the trees,
* 9 full adders in stage 2,
* 9 full adders in stage 3.

In the CSA version the critical path ends in the ripple chain of stage 3. It
runs from the carry of the stage-3 adder of column 3 through column 9 to
`sum_w[9]`.

## Versions side by side (`wtm_top`)

`wtm_top` instantiates `wallace_mult5` twice, once with each cell. Both get the
same `x` and `y`. Each brings out its own `sum_w_*` and `product_*`. To use a
single multiplier, instantiate `wallace_mult5` directly and set `FA_STYLE`.

Timing: nothing is clocked. Each output settles one propagation delay after
`x` or `y` changes. To pipeline it, register the inputs and outputs outside
the module.

## How far it follows the source structure, and where it departs

These parts follow the source structure:

* the two cell types and their equations;
* the zero-padded 9 × 5 column arrangement;
* the three-adder 5:3 tree with its constant 0;
* the instance counts (9 trees, 9 + 9 adders);
* the ripple-carry final stage;
* the 12-bit raw result reduced to 10 bits;
* the port names `x`, `y` and `sum_w`.

These are this design's own choices:

* **Column-to-adder wiring of stages 2 and 3.** The block diagrams of the source
  show only boxes and lines. The wiring above is the one that uses exactly 9 + 9
  adders and yields 12 bits. Its carry chain, with the sum of the column-9 adder
  driving `sum_w[9]`, matches the reported critical path.
* **Which adder input (a, b or c) each signal takes.** This matters only for the
  MUX FA, whose `a` input is the one that is multiplexed.
* **Stage 2 of the MUX version uses MUX FA cells.** The structural drawing of that
  version labels its stage-2 cells MUX FA, although the prose speaks of carry save
  adders there.
* **x as multiplicand and y as multiplier.** The product is symmetric, so this
  has no visible effect.

Not reproduced: the area, power and delay numbers above. They belong to a
commercial 45 nm cell library and a synthesis flow, not to the RTL.

## Files

| file | content |
|---|---|
| `rtl/wtm_pkg.sv` | `fa_style_e` and the sizes (5-bit operands, 9 columns, 12/10-bit results) |
| `rtl/fa_csa.sv`, `rtl/fa_mux.sv` | the two full-adder cells |
| `rtl/fa_cell.sv` | picks one of the two cells with `FA_STYLE` |
| `rtl/pp_gen.sv` | the partial-product AND array, arranged in columns |
| `rtl/wt5.sv` | the five-input Wallace tree |
| `rtl/wallace_mult5.sv` | the multiplier |
| `rtl/wtm_top.sv` | both versions side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench is exhaustive, so it needs no random seeds:

* `tb_fa_*` tries all 8 input combinations of a cell.
* `tb_wt5` tries all 32 input patterns on both versions.
* `tb_pp_gen`, `tb_wallace_mult5` and `tb_wtm_top` try all 1024 operand pairs.

Each testbench prints one line, `TB_RESULT checks=N failures=M`. `tb_wallace_mult5`
first applies the reference pairs 31×31 = 961, 8×8 = 64 and 11×8 = 88.

`tb_wtm_top` also checks that the two versions agree and that `sum_w[11:10]`
is zero. It counts how often these mechanisms of the tree occur and fails if
one never does:

* a column compressor counting five ones;
* a stage-3 carry rippling through four or more adders;
* a carry reaching column 9;
* the MUX FA taking its `sel = 1` path.

For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
  rtl/wtm_pkg.sv tb/tb_wtm_top.sv --top-module tb_wtm_top -o sim
./obj_dir/sim
```

Replace `tb_wtm_top` with any other testbench name to run that test. Each run
takes well under a second.
