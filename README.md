# Lower-error fixed-width multiplier (8 × 8, two's complement)

Many DSP datapaths multiply two n-bit numbers and keep only an n-bit
result: a filter tap, a DCT butterfly or an FFT twiddle cannot let the word
length double at every stage. A full n × n array multiplier computes all 2n
product bits and then throws the lower n away. That wastes about half the
array. A *fixed-width* multiplier does not build the lower half at all.
Instead it adds a small *compensation bias* that stands in for the carries the
missing half would have sent upward.

This RTL implements such a multiplier for two's-complement operands:

* `a`, `b`: the two N-bit inputs.
* `p`: the N-bit output, which approximates bits 2N-1..N of `a*b`.

It is purely combinational. The default size is N = 8. With the default bias,
the error against the exact product has zero mean over all 65,536 input pairs.
The largest error is 2.5 output LSBs.

## Splitting the product

The array is a Baugh-Wooley array. Each partial product `x_i·y_j` is placed in
column `i+j`. The partial products that pair one sign bit with one magnitude
bit have negative weight. They are added in complemented form (a NAND instead
of an AND). Two constants, `2^N` and `2^(2N-1)`, then correct the sum. The
2N-bit column sum modulo `2^(2N)` is exactly `a*b`.

The columns split into two halves:

| part | columns | what happens to it |
|------|---------|--------------------|
| MP (most-significant part) | N .. 2N-1 | built as a carry-save array; it is the output |
| column N-1 | N-1 | kept, summed by the compensation chain; only its carries are used |
| rest of LP (least-significant part) | 0 .. N-2 | not built; replaced by the constant `BIAS·2^N` |

The output is therefore

    p = floor( (S + BIAS·2^N) / 2^N )  mod 2^N

Here `S` is the Baugh-Wooley sum of columns N-1 to 2N-1, with both constants
included. The same value can be written in integer terms. It equals `a*b` minus
the partial products of columns 0..N-2, plus `BIAS·2^N`, divided by `2^N` and
rounded down. The testbenches use this second form as their reference.

## The compensation column (the part that needs the most care)

The exact correction for the dropped half is the rounded value of LP divided by
`2^N`. Column N-1 has by far the largest share of it. Each of its terms is
worth half an output LSB. A term in column N-2 is worth a quarter, and each
lower column is worth half as much again. So the design keeps column N-1
exactly and estimates only the rest.

* **The chain.** Column N-1 holds N partial products. For N = 8 they are
  `~(x7y0)`, `x6y1`, `x5y2`, `x4y3`, `x3y4`, `x2y5`, `x1y6` and `~(x0y7)`.
  They are summed in pairs by a chain of N/2 cells:
  * One **ND-ND cell** takes the two complemented end terms, `~(x_{N-1}y_0)`
    and `~(x_0y_{N-1})`.
  * Then **A-A cells** take the symmetric pairs `x_{N-1-k}y_k` and
    `x_k y_{N-1-k}`.
  * If N is odd, the middle term `x_m y_m` enters as the first cell's sum input.

  Each cell is a full adder. It adds its two partial products and the sum
  passed down from the previous cell. Its carry has weight `2^N`, so it feeds
  straight into MP. Its sum goes to the next cell. The last cell's sum is worth
  half an LSB and is discarded. As a result, the carries add exactly
  `floor(column_{N-1} / 2)` output LSBs.
* **The constant.** Columns 0..N-2 are replaced by their average. With
  independent, uniformly distributed bits, each term is 1 with probability 1/4.
  For N = 8 these columns average 0.75 LSB. Add 0.5 LSB for rounding to
  nearest, and the correction is `floor(column_{N-1}/2 + 1.25)`. For every
  integer column sum this equals `floor(column_{N-1}/2) + 1`. That gives the
  default `BIAS = 1`.
* **Where the carries enter.** In MP, the column-N cell of each row has a carry
  input with no lower column to feed it. Row 1's sum input and the final adder's
  carry input are free as well. These N+1 free inputs take:
  * the N/2 compensation carries,
  * the Baugh-Wooley constant `2^N`,
  * the `BIAS` ones.

  A parameter check stops elaboration if they do not fit.

Measured over all 2^16 pairs at N = 8, with the LSB equal to `2^8`:

| bias rule | mean error | mean-square error | max \|error\| |
|-----------|-----------:|------------------:|-------------:|
| this design (column N-1 kept, BIAS = 1) | 0.00 | 0.27 | 2.50 |
| plain truncation of the exact product | −0.50 | 0.32 | < 1.00 |
| column N-1 kept, BIAS = 0 | −1.00 | 1.27 | 3.50 |

The compensated multiplier has about half the cells of a full array. Its
mean-square error is lower than that of truncating an exact product, and its
mean error is zero. Its worst-case error is larger.

A constant bias has one visible side effect. When either operand is zero,
`p = 1` (one LSB) rather than 0.

## Cells

| module | function |
|--------|----------|
| `afa_cell` | AND partial product into a full adder: `{c,s} = x&y + sin + cin` |
| `nfa_cell` | NAND partial product into a full adder, used for the complemented Baugh-Wooley terms |
| `aa_cell` | two AND partial products into a full adder, compensation chain |
| `ndnd_cell` | two NAND partial products into a full adder, head of the compensation chain |
| `fa_cell` | full adder used by all of the above and by the final adder |
| `fw_multiplier` | the multiplier, top level |

MP is a carry-save array. Row j (1..N-1) holds the cells for columns N..N-1+j.
A row's sums pass down to the same column of the next row. Its carries pass to
the next column of the next row. A cell is an NFA when exactly one of its
indices is the sign index N-1, and an AFA otherwise. After the last row, a
ripple-carry row of full adders resolves columns N..2N-1. The constant
`2^(2N-1)` enters at the top column, and the carry out of that column is
dropped.

## Parameters and interface

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 8 | operand and result width (N ≥ 2) |
| `BIAS` | 1 | constant compensation, in output LSBs |

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a` | in | N | multiplicand, two's complement |
| `b` | in | N | multiplier, two's complement |
| `p` | out | N | fixed-width product ≈ `(a*b) >> N` |

There are no registers. Pipeline it from outside if needed. The critical path
runs through the compensation chain, the array diagonal and the ripple row.
Generic gate synthesis of the default size gives 262 single-bit gates (126 AND,
56 OR, 63 XOR, 17 NOT).

## Where this design makes its own choices

The parts taken from the design being implemented are:

* the fixed-width principle, with its MP/LP split and a compensation bias;
* the Baugh-Wooley formulation;
* the cell set: AFA, NFA, A-A, ND-ND and FA;
* the 8 × 8 size.

The following choices are this design's own:

* **The bias rule.** Column N-1 is kept exactly, and the lower columns are
  replaced by the constant `BIAS`, with `BIAS = 1` chosen for zero mean error.
* **The inner circuits of the cells.** A-A and ND-ND are read as two
  AND or NAND gates feeding a full adder. AFA and NFA are read as one AND or
  NAND gate feeding a full adder.
* **The pairing of column N-1 terms.** The two complemented end terms go to
  the ND-ND cell, and the rest form symmetric pairs.
* **The final adder** is a ripple-carry row.
* **Signed operands only.** Unsigned operands are not supported.

Published results for this multiplier on a Xilinx Virtex-5 device give an
11.5 ns combinational delay and about 17 % less area than a full Baugh-Wooley
array. Those figures come from an FPGA mapping and have not been reproduced
here.

## Verification

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb/tb_afa_cell.sv`, `tb/tb_nfa_cell.sv`: all 16 input combinations,
  compared with integer sums.
* `tb/tb_aa_cell.sv`, `tb/tb_ndnd_cell.sv`: all 32 input combinations.
* `tb/tb_fw_multiplier.sv`: default parameters, all 65,536 operand pairs.
  * Each result is compared with the integer reference.
  * The error statistics are checked: mean within 0.01 LSB of zero, maximum
    at most 3 LSB, and mean-square error below that of plain truncation.
  * It also checks that compensation carries, negative operands and
    bias-raised results each occurred.
* `tb/tb_fw_multiplier_sizes.sv`: exhaustive tests at N = 5 (odd, which
  exercises the middle-term path), N = 6, and N = 7 with `BIAS = 2`.

Run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        --top-module tb_fw_multiplier tb/tb_fw_multiplier.sv
    ./obj_dir/Vtb_fw_multiplier

Each run takes well under a second.

## Not included

The multiplier is meant for use in FIR filters, but no filter is included here.
Such a filter would need a structure, order and coefficient set, and none is
defined for this design.
