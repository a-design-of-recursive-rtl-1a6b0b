# Recursive approximate multiplier

An unsigned 8x8 multiplier for error-tolerant work such as image and signal
processing. It trades exactness for fewer gates and a shorter critical path.
The 8-bit operands are split into 4-bit halves. Four small 4x4 multipliers form
the four cross products, and one exact adder sums them:

    A * B = (AH*BH << 8) + ((AH*BL + AL*BH) << 4) + AL*BL

All of the approximation is inside the 4x4 multipliers. Each one reduces its
partial products in a single level of deliberately inexact adder cells, then
merges the result with an exact adder. The same split works for any operand
width of 4 * 2^k bits, so the RTL takes a `WIDTH` parameter. The default is 8.

Everything is combinational: there are no clocks, registers or handshakes. A
product is valid one propagation delay after the operands change.

## Files

| File | Module | What it is |
|------|--------|------------|
| `rtl/approx_half_adder.sv` | `approx_half_adder` | 2-input cell, Sum by OR |
| `rtl/approx_full_adder.sv` | `approx_full_adder` | 3-input cell, one XOR replaced by OR |
| `rtl/approx_compressor_4_2.sv` | `approx_compressor_4_2` | 4-input, 2-output cell |
| `rtl/approx_mult_4x4.sv` | `approx_mult_4x4` | 4x4 leaf multiplier |
| `rtl/recursive_approx_mult.sv` | `recursive_approx_mult` | top: `WIDTH`-bit recursive multiplier |
| `tb/approx_ref_pkg.sv` | package | table-based reference model |
| `tb/tb_*.sv` | | self-checking testbenches, one per module, plus a 16-bit run |

## The approximate cells

Each cell adds the bits of one column. It gives a Sum bit of that column's
weight and a Carry bit of twice that weight. An exact cell needs XOR gates,
which are slow and large. Each approximate cell gives up a few input patterns
to save gates, and is never wrong by more than one unit of its own weight.

| Cell | Equations | Wrong inputs | Result there |
|------|-----------|--------------|--------------|
| half adder | S = x1 \| x2, C = x1 & x2 | 11 | 3 instead of 2 |
| full adder | W = x1 \| x2, S = W ^ x3, C = W & x3 | 110, 111 | 1 instead of 2, 2 instead of 3 |
| 4-2 compressor | W1 = x1 & x2, W2 = x3 & x4, S = (x1^x2) \| (x3^x4) \| (W1 & W2), C = W1 \| W2 | 0101, 0110, 1001, 1010, 1111 | 1 instead of 2, 3 instead of 4 |

The 4-2 compressor has only two outputs, with no carry-in and no carry-out.
Four ones would need a third output bit, so that case is clipped to 3. The
half adder errs upwards and the other two err downwards. An approximate product
can therefore be larger or smaller than the exact one.

The cells are not symmetric in their inputs. The full adder ORs x1 with x2 and
XORs the result with x3. The compressor pairs (x1, x2) and (x3, x4). So the way
partial products are wired to the inputs decides which operand values come out
inexact.

## The 4x4 leaf

`approx_mult_4x4` works in three steps:

1. **Partial products.** There are 16 AND gates, with pp(i,j) = a[i] & b[j] of
   weight 2^(i+j).
2. **One level of reduction.** Every column with two or more products is
   reduced by exactly one cell:

   | column (weight) | products, in input order x1, x2, ... | cell |
   |---|---|---|
   | 0 (1) | a0b0 | wire |
   | 1 (2) | a1b0, a0b1 | half adder |
   | 2 (4) | a2b0, a1b1, a0b2 | full adder |
   | 3 (8) | a3b0, a2b1, a1b2, a0b3 | 4-2 compressor |
   | 4 (16) | a3b1, a2b2, a1b3 | full adder |
   | 5 (32) | a3b2, a2b3 | half adder |
   | 6 (64) | a3b3 | wire |

   This gives a 7-bit sum row and a 5-bit carry row. A carry from column k has
   weight 2^(k+1).
3. **Vector merge.** An exact 8-bit adder adds the two rows. Its carry-out is
   product bit 7.

The assignment of cells to columns is the published one. The input order within
a cell, and the exact final adder, are this implementation's choices.

Over all 256 operand pairs, 68 products are inexact. The mean absolute error is
3.0 and the largest error is 32. The largest error comes from the column-5 half
adder when a3b2 = a2b3 = 1. Because the cells err in both directions, 15 x 15
gives 231, which is above the exact 225 but still fits in 8 bits.

## Recursive composition and its one hazard

`recursive_approx_mult` builds the tree without instantiating itself. Level 0
has one 4x4 leaf for every pair of 4-bit slices of `a` and `b`. Level l combines
four products from level l-1 into the product of two (4 << l)-bit slices, using
the formula above. Each result is truncated to twice the slice width, which is
the width of that level's output. At `WIDTH = 8` this is exactly four leaves and
one adder.

The output is 2*`WIDTH` bits wide, which matches the published 8x8 design
(8 + 8 + 16 = 32 I/O pins). A leaf can return more than 225, so the sum of the
four cross products can pass 2^16 - 1 when both operands are near 255. The sum
then **wraps**. For example, 255 x 255 gives 1223, because all four leaves
return 231 and 66759 mod 65536 = 1223. This happens for 23 of the 65,536
operand pairs, and in each case the error is close to 2^16. The published
design gives no rule for overflow. Wrapping is what a plain 16-bit adder does,
so it is kept. If your application can drive both operands close to full scale,
saturate the sum or widen the output by one bit.

Accuracy of the 8x8 multiplier over all operand pairs:

| Measure | Value |
|---------|-------|
| inexact products | 61.9 % |
| mean absolute error, all pairs | 861 |
| mean absolute error, wrapped pairs excluded | 840 |
| mean relative error | 3.8 % |
| largest error | 63,938 (a wrapped case) |

Most of the error comes from the leaf AH*BH, which is scaled by 256.

## How far to trust it, and where it departs from the source

- The cell equations are checked against the published truth tables in all
  cases. The 4x4 column structure follows the published figure.
- The source gives no error metrics. The figures above come from this RTL, not
  from the source. Its FPGA area, delay and power figures were not reproduced.
- Choices made here:
  - the input order of products within each cell;
  - an exact final adder in the leaf;
  - exact addition of the four cross products;
  - wrap-around on overflow;
  - operands treated as unsigned.
- The source mentions an XOR-based variant of the Sum logic for the 4-2
  compressor. This design uses the equation that matches the truth table
  instead.
- Two of the source's simulated example products, 10 x 6 = 60 and
  9 x 5 = 45, match this RTL and are checked in the tests.
- The earlier design this one improves on is not included. That design
  recodes partial product pairs into propagate/generate signals and uses
  OR-based generate accumulation.
- `WIDTH` values other than 8 are a generalisation of the published 8x8
  design. They are tested at 16 bits with random vectors.

## Simulating

Each testbench compares the RTL with `approx_ref_pkg`. That package models the
cells by their truth tables, not their equations, and rebuilds the leaf and the
recursion from them. Each testbench prints
`TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl -Itb \
  tb/approx_ref_pkg.sv rtl/*.sv tb/tb_recursive_approx_mult.sv \
  --top-module tb_recursive_approx_mult -o sim && ./obj_dir/sim
```

| Testbench | Covers |
|-----------|--------|
| `tb_approx_half_adder`, `tb_approx_full_adder`, `tb_approx_compressor_4_2` | every input pattern; the number of inexact rows (1, 2, 5) |
| `tb_approx_mult_4x4` | all 256 pairs; hand-worked products; every cell hits an inexact case |
| `tb_recursive_approx_mult` | `WIDTH = 8`, all 65,536 pairs; counts exact and inexact products, the inexact cases of each cell type, and output wraps, and fails if any of them never occurs; prints the error statistics above |
| `tb_recursive_approx_mult_w16` | `WIDTH = 16`, corner cases plus 50,000 random pairs |

To change the approximation, edit the equations in the three cell files. To
change the wiring, edit the port maps in `approx_mult_4x4.sv`. Then update the
tables or the column mapping in `approx_ref_pkg.sv` to match.
