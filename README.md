# Fully parallel 2D DCT/IDCT with a skewed-register transposition

This is an N x N two-dimensional discrete cosine transform (and its inverse)
for image and video coding, computed by row-column decomposition. A 1D DCT
unit transforms one column of the block per cycle. A transposition stage turns
that column stream into a row stream. A second, identical 1D DCT unit
transforms the rows. Three ideas set it apart from a textbook row-column
design:

* **No transposition RAM.** The transpose is done by two triangular arrays of
  shift registers, N^2 + N words in all, and N N:1 multiplexers. The
  multiplexers are steered by one counter value passed down a delay chain.
  Data flows through without stopping: a new block can follow the last one
  with no gap, and one full N x N transform completes every N cycles.
* **One adder per inner product.** Each output of a 1D unit is a vector inner
  product (VIP) of N/2 stored coefficients with N/2 folded samples. Each
  coefficient is cut into four 4-bit digits. Every digit gets its own small
  array multiplier, and no multiplier has an adder at its end. All the
  partial sum and carry words go into one carry-save tree of 4:2 compressors,
  and a single carry lookahead adder finishes the sum.
* **Same hardware both ways.** Switching a 1D unit to the inverse transform
  only reloads its coefficient registers and re-routes its inputs and outputs.
  The mode can change from one block to the next.

The default configuration is N = 8 with 16-bit words (B = 16) and 4-bit
digits (K = 4 digits per coefficient). The RTL is parameterised in N, and the
4 x 4 and 16 x 16 builds are simulated too.

## Block flow and timing

```
 x_in (column j)         row unit            transposition             column unit          y_out (row p)
 N x B bits  ──► [in reg] ─► fold ─► N VIPs ─► cut to B ─► R1 ─► mux ─► R2 ─► [in reg] ─► fold ─► N VIPs ─► cut ─► [out reg]
                                                     (N+1 cycles)
```

In forward mode, input column j carries `x_in[i] = X(i, j)`. Output row p
carries `y_out[q] = Y(p, q)`, where

    Y(p,q) = (2/N) E(p) E(q) sum_i sum_j X(i,j) cos((2i+1)p pi/2N) cos((2j+1)q pi/2N)
    E(0) = 1/sqrt(2), E(k>0) = 1

This is the orthonormal 2D DCT. In inverse mode, input column q carries the
coefficients `Y(., q)` and output row i carries the samples `X(i, .)`.

Latency and throughput:

| path | cycles |
|---|---|
| input register of the row unit | 1 |
| transposition, column p in → row p out | N + 1 |
| input register of the column unit | 1 |
| output register | 1 |
| **first column in → first row out** | **N + 4** (12 for N = 8) |
| one block, in steady state | N |

## The transposition buffer (`transpose_buffer`)

This is the least obvious part of the design.

Every cycle the row unit produces the whole column `Z(0..N-1, j)`. The column
unit needs a whole row `Z(p, 0..N-1)` at once. The buffer has two arrays of
shift registers:

* **First array.** `R1[1..N]`, where `R1[m]` is m words long and is fed by
  row-unit output m-1. Because the lengths differ, the column leaves this
  array skewed. In cycle t, `R1[m]` shows `Z(m-1, t-m)`, which is an element
  of a different column for each m.
* **Second array.** `R2[1..N]`, where `R2[k]` is k words long. Each `R2`
  register has an N:1 multiplexer in front of it. `R2[N-d]` collects only
  column d: in every cycle its multiplexer picks the one `R1` output that is
  then showing an element of column d.

Here is cycle by cycle for N = 4, with column 0 entering in cycle 0:

| cycle | R2[4] gets | R2[3] gets | R2[2] gets | R2[1] gets |
|---|---|---|---|---|
| 1 | Z(0,0) from R1[1] | | | |
| 2 | Z(1,0) from R1[2] | Z(0,1) from R1[1] | | |
| 3 | Z(2,0) from R1[3] | Z(1,1) from R1[2] | Z(0,2) from R1[1] | |
| 4 | Z(3,0) from R1[4] | Z(2,1) from R1[3] | Z(1,2) from R1[2] | Z(0,3) from R1[1] |
| 5 | *row 0 = Z(0,0..3) leaves R2[4], R2[3], R2[2], R2[1]* | | | |

`R2[N-d]` is d words shorter than `R2[N]` but starts d cycles later, so all
elements of one row leave together. The skew from the first array is undone.

The multiplexer of `R2[N]` selects `R1[m]` one cycle after column m-1
entered. That select is simply the block position of the incoming column,
delayed by one register. The multiplexer of `R2[N-d]` needs the same select
d cycles later, so it takes the select through d more delay registers. The
only control in the whole design is a position counter (0..N-1) and this
chain of N registers of log2(N) bits each.

Storage for N = 8 is 72 words of 16 bits (1152 flip-flops), plus 24 flip-flops
for the select chain.

Blocks may be separated by idle cycles. The select travels with the data, so
a gap does not upset the next block. The N columns of one block must still be
contiguous.

## The 1D unit (`dct1d`)

**Forward mode** uses the symmetry `c(p, N-1-i) = (-1)^p c(p, i)`. N/2
adder/subtractor cells (`addsub_cell`) form `X(i) + X(N-1-i)` and
`X(i) - X(N-1-i)`. These are one bit wider than the inputs, so they never
overflow. N/2 "even" VIPs compute the even outputs from the sums. N/2 "odd"
VIPs compute the odd outputs from the differences. That takes N^2/2 products
instead of N^2.

**Inverse mode** is this design's own mapping onto the same units:

* The input folding is bypassed.
* Even VIP k multiplies the even-indexed inputs by `c(2m, k)` and gives E(k).
* Odd VIP k multiplies the odd-indexed inputs by `c(2m+1, k)` and gives O(k).
* A second row of N/2 adder/subtractor cells at the output forms
  `x(k) = E(k) + O(k)` and `x(N-1-k) = E(k) - O(k)`.

**Coefficients** live in registers inside the VIP cells. The registers are
loaded from a table computed at elaboration (`dct_pkg::coef`):

    c(p,i) = round(2^(B-1) * sqrt(2/N) * E(p) * cos((2i+1) p pi / 2N))

so the 2/N E(p)E(q) scale factor is already in the coefficients. The
registers reload on the same clock edge that captures the first vector of the
other mode. Forward and inverse blocks can therefore follow each other with
no gap. In `dct2d` the mode travels alongside the data, so the column unit
switches N+1 cycles after the row unit.

## Inner-product arithmetic (`vip`, `digit_mult`, `cs_tree`, `compressor_4to2`, `cla_adder`)

A VIP computes `W = sum_i c(i) V(i)` over N/2 terms. Each B-bit coefficient
`c(i)` is written in radix 2^(B/K):

    c(i) = sum_r u(r,i) 2^(r n)    (n = B/K = 4 bits per digit, r = 0..K-1)

The summations over i and over r are merged into one sum of N/2 x K digit
products `u(r,i) V(i) 2^(rn)`.

**Digit multiplier (`digit_mult`).** Each digit product comes from a small
array multiplier, an n-bit digit times the (B+1)-bit sample. The product is
left in carry-save form: a sum word and a carry word, with no final adder.

**Two's complement.** Signs follow Baugh and Wooley. A partial-product bit
that pairs one operand's sign bit with a non-sign bit of the other is made
with a NAND. The bit that pairs the two sign bits is made with an AND. Every
other bit is an AND. This makes all partial products positive, and the
product is corrected by the constant `2^(B-1) + 2^(VW-1) - 2^(B+VW-1)`, where
VW = B+1 is the sample width. Only the top digit contains the coefficient's
sign bit.

**Where the correction goes.** The VIP sums the correction of all N/2
products into one constant, taken mod 2^35 for N = 8. It places that
constant without spending an extra word:

* The first carry-save row of a digit multiplier adds two partial-product
  rows and has an empty third input. The constant's low bits are injected
  there, in the top-digit multiplier of cell 0 (parameter `INJ` of
  `digit_mult`).
* The constant's top bit lies above every product word. It is ORed into the
  same multiplier's carry word, which is zero there.

If a size ever needs correction bits elsewhere, `vip` falls back to one extra
constant word. None of N = 4, 8 or 16 needs it.

**Compressor tree (`cs_tree`).** For N = 8 the tree receives
2 x 4 x 4 = 32 words, each shifted to its significance. It reduces them in
four levels of 4:2 compressors (32 → 16 → 8 → 4 → 2). Where a level has three
words left over, a 3:2 row takes them.

**4:2 compressor (`compressor_4to2`).** Each cell is two cascaded carry-save
adders. The carry passed sideways to the next cell depends only on the first
three inputs, so nothing ripples along a row.

**Final adder (`cla_adder`).** A parallel-prefix (Kogge-Stone) carry
lookahead adder adds the last two words. It is 2B + log2(N/2) + 1 bits wide,
35 bits for N = 8.

The whole VIP is combinational from sample to result. Only the coefficients
are registered.

## Number format and accuracy

| point | format (N = 8, B = 16) |
|---|---|
| input `x_in` | 16-bit two's complement integers, full range allowed |
| folded sample | 17 bits, exact |
| coefficient | 16 bits, 15 fraction bits |
| VIP result | 35 bits, exact |
| transposition word | 16 bits with `TRANS_FRAC` = 2 fraction bits |
| output `y_out` | 16 bits with `OUT_FRAC` = 0 fraction bits |

At the transposition word and at the output, the result is shifted right
(rounding toward minus infinity) and saturated. Inputs above about ±2900
(12 bits) can saturate the transposition word. With the default fraction
settings the output cannot overflow.

Accuracy:

* Forward results for 9-bit inputs are within 2 units of the exact
  floating-point DCT.
* A forward-then-inverse round trip returns the input within a few units.
* The truncation bias adds up at the DC corner, so X(0,0) typically comes
  back 4 to 5 units low.

Rounding instead of truncating would remove this bias. That would be a change
in `cut` (`dct2d`).

## Top-level interface (`dct2d`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (clears all registers) |
| `in_valid` | in | 1 | `x_in` carries a column. A block is N consecutive valid cycles. Idle cycles are allowed between blocks. |
| `inverse` | in | 1 | 0 = DCT, 1 = IDCT. Must be constant within a block. |
| `x_in` | in | N x B | input column |
| `out_valid` | out | 1 | `y_out` carries a row. A block's rows come on N consecutive cycles. |
| `out_inverse` | out | 1 | mode of the block the row belongs to |
| `y_out` | out | N x B | output row |

Assertions in `dct2d` flag an idle cycle inside a block and a mode change
inside a block. There is no backpressure: the consumer must take every row.

Parameters of `dct2d`:

* `N` (8): transform size, even.
* `B` (16): word length.
* `K` (4): digits per coefficient.
* `TRANS_FRAC` (2): fraction bits kept in the transposition word.
* `OUT_FRAC` (0): fraction bits kept at the output.

Synthesised (coarse, word-level) at the defaults, the design has about 16,500
cells and 1769 flip-flop bits. Each 1D unit is about 8,100 cells, of which a
VIP is about 2,100.

## Files

`rtl/`:

* `dct_pkg.sv`: coefficient formula and width helpers
* `dct2d.sv`: top level, with the position counter, valid/mode delay lines
  and the cuts
* `transpose_buffer.sv`
* `dct1d.sv`
* `vip.sv`
* `digit_mult.sv`
* `cs_tree.sv`
* `compressor_4to2.sv`
* `cla_adder.sv`
* `addsub_cell.sv`

`tb/`:

* One self-checking testbench per module, `tb_<module>.sv`.
* `dct_ref_pkg.sv`: integer reference transforms.
* `tb_dct2d.sv`: end to end at the default size.
* `tb_dct2d_sizes.sv`, with its helper `dct2d_size_check.sv`: the 4 x 4 and
  16 x 16 builds.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct2d.sv --top-module tb_dct2d
./obj_dir/Vtb_dct2d
```

Substitute any other testbench name. The packages must come first on the
command line.

## Verification

Every block has a self-checking testbench that compares against values
computed independently:

* Leaf arithmetic is compared with plain integer sums and products, over
  corner values and thousands of random operands.
* The digit multipliers are checked digit by digit against a bit-level model
  of the positive-form partial products, and as a set against the exact
  signed product.
* `tb_dct1d` runs 600 vectors, with the mode changing 168 times, against
  integer reference transforms.
* `tb_transpose_buffer` streams 40 blocks, back to back and with gaps. It
  checks every row exactly N+1 cycles after its column.
* `tb_dct2d` runs 120 blocks (forward and inverse, mixed ranges, back-to-back
  mode switches, idle gaps, saturating inputs) bit for bit. It checks that
  each block's first row appears N+4 cycles after its first column. It
  compares small-range results with floating-point DCT and IDCT, and checks
  the round trip.
* `tb_dct2d_sizes` runs 4 x 4 and 16 x 16 builds bit for bit.

For every module, a copy with one deliberate error (a dropped carry, AND
instead of NAND on the sign bit, a missing delay in the select chain, and so
on) was confirmed to make its testbench fail.

## Where this RTL departs from the original architecture description

* **Sample width.** The multiplier takes B+1-bit samples, so the pre-added
  pair never overflows. The final adder width, 2B + log2(N/2) + 1, fits
  exactly that.
* **Sign correction.** The Baugh-Wooley correction of all products is summed
  first and placed in a single multiplier, as described above. The original
  spreads single 1 bits over the multipliers of each product. Both give 32
  words for N = 8.
* **Word layout in the accumulation.** The accumulation is a word-wide tree.
  The original cuts the partial sum and carry words into B/4-bit digits, adds
  each significance in its own compressor array, and routes surplus carries
  from one array into the next with extra compressors. The sum is identical,
  but the gate-level layout and the critical path differ. Likewise, each
  digit multiplier here gives two (B+1+n)-bit words, not a (5B/4-1)-bit sum
  word and a B-bit carry word.
* **Registers.** There are input registers in each 1D unit and an output
  register. These add three cycles to the N+1-cycle transposition delay.
* **Inverse mapping.** The inverse uses the output butterfly described
  above, which costs N/2 extra adder/subtractor cells per 1D unit. The
  original only states that the same hardware computes both directions.
* **Interface choices.** The scale factor is folded into the coefficients.
  Truncation and saturation points, fraction bits, the valid/mode interface
  and reset behaviour are choices of this design.
* **Final adder.** The carry lookahead adder is a Kogge-Stone prefix adder.
