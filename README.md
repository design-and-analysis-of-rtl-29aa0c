# Four generic N x N multipliers

A multiplier is often the largest and slowest unit in a datapath, and the choice
between multiplier architectures is an area-against-delay trade-off that changes with
the operand width. This RTL gives four classic multiplier architectures as **generic**
designs: one parameter `N` sets the operand width, and the structure (rows, columns,
reduction stages) follows from it. The same four can therefore be synthesized and
compared at any width, instead of only at the fixed 8, 16 or 32 bits a hand-drawn
design covers.

| module | multiplies | partial products | summation |
|---|---|---|---|
| `array_multiplier` | unsigned | N rows of AND terms | carry-save array, then ripple row |
| `column_bypass_multiplier` | unsigned | N rows of AND terms | carry-save array whose columns switch off when the multiplicand bit is 0 |
| `booth_multiplier` | two's complement | ceil(N/2) radix-4 Booth rows | carry-save array, then ripple adder |
| `wallace_multiplier` | unsigned | N rows of AND terms | tree of full and half adders, then ripple adder |

`generic_multipliers` (the top) places all four side by side on shared operands `a`
(multiplicand) and `b` (multiplier), each with its own 2N-bit product. `N` defaults to
16. Everything is combinational: there is no clock, register or reset, and a product is
valid one settling time after the operands change.

## Reference figures

Published FPGA synthesis results for these four architectures, which this RTL aims to
reproduce in structure, not in number:

| | array | column bypass | modified Booth | tree |
|---|---|---|---|---|
| delay, N=4 (ns) | 17.681 | 15.853 | 10.249 | 7.165 |
| delay, N=8 (ns) | 32.001 | 29.452 | 12.418 | 7.165 |
| delay, N=16 (ns) | 61.241 | 57.231 | 12.418 | 10.178 |
| LUTs, N=16 | 525 | 480 | 623 | 438 |

The tree is fastest at every width. The two arrays grow linearly in delay. The bypass
array is the smallest. Other synthesis flows will give other numbers, since they
optimize across the hand-drawn structure. The full-adder count of each design is given
below.

## Carry-save array (`array_multiplier`)

Bit `pp[i][j] = a[j] & b[i]` has weight `i+j`. Row 0 is `pp[0]` itself. Each later row
`i` has N-1 full adders. The adder in column `j` (weight `i+j`) adds three bits:

- `pp[i][j]`
- the sum that row `i-1` produced in column `j+1`
- the carry that row `i-1` produced in column `j`

Carries therefore move down to the next row, not along the row, so no row waits for a
carry to ripple. The top bit of each row, `pp[i][N-1]`, has no adder and drops into the
next row. Product bit `k < N` is column 0 of row `k`. At the bottom, a ripple row of
N-1 full adders merges the last sums and carries into bits `N .. 2N-1`.

That makes N(N-1) full adders. The critical path runs down the rows and then along the
merging row, about 2N adder delays.

## Column bypassing (`column_bypass_multiplier`, `bypass_fa_cell`)

The array is the same, but every adder is a `bypass_fa_cell` enabled by its multiplicand
bit `a[j]`. When `a[j] = 0`, every partial product in column `j` is 0. The first row
feeds the column a carry of 0, so inside the column every carry stays 0, and every sum
equals the incoming sum from column `j+1`. The cell therefore does two things:

- it isolates its adder's `pp` and `s_in` inputs, which keeps the adder from switching;
- it routes `s_in` round the adder with a 2:1 multiplexer.

The carries leaving the last row pass AND gates with their column's `a[j]` on the way to
the merging row. The product is identical to the plain array for every input. What
changes is switching activity, which falls with the number of zero bits in the
multiplicand. The worst-case delay does not change.

**Departure:** the published cell isolates its inputs with tri-state buffers that leave
the adder floating. Synthesizable two-state logic cannot do that, so this cell isolates
them with AND gates. The disabled adder then sees constant zeros, which also forces its
carry to 0. That makes the AND gates in front of the merging row redundant here. They
are kept anyway, so that a cell which holds stale outputs (the tri-state version) would
still be correct in this array.

## Radix-4 modified Booth (`booth_multiplier`, `booth_encoder`, `booth_selector`)

The multiplier `x` is read in overlapping triples `x[2i+1] x[2i] x[2i-1]` (with
`x[-1] = 0`). Each triple is one radix-4 digit. This halves the number of rows to
R = ceil(N/2).

| x[2i+1] x[2i] x[2i-1] | one_x | two_x | neg | row |
|---|---|---|---|---|
| 000 | 0 | 0 | 0 | 0 |
| 001, 010 | 1 | 0 | 0 | +Y |
| 011 | 0 | 1 | 0 | +2Y |
| 100 | 0 | 1 | 1 | -2Y |
| 101, 110 | 1 | 0 | 1 | -Y |
| 111 | 0 | 0 | 1 | -0 |

- `booth_encoder` produces the three select lines of a digit.
- `booth_selector` forms one row bit, `((y[j] & one_x) | (y[j-1] & two_x)) ^ neg`.
- N+1 selectors make one row. The row is N+1 bits wide, because 2Y needs one more bit
  than Y, and the multiplicand is sign-extended to fill it.
- A negative row comes out in one's complement. Its missing +1 is the row's **S** bit,
  `S = neg`, added at the row's least significant weight `2i`. Row "-0" is all ones
  plus S, which sums to 0.

**Sign extension without extension.** The rows are signed, so each would have to be
sign-extended to 2N bits. Instead, each row gets a few constant or near-constant bits
above its top, with `E = NOT(top bit of the row)`:

```
row 0        :  E ~E ~E  r0[N] ... r0[0]
row i >= 1   :  1  E     ri[N] ... ri[0]        (shifted left by 2i)
S row        :  S_i at weight 2i
```

Bits at weight 2N or above are dropped, because the product is taken modulo 2^(2N).
Dropping them is also why the last row loses its leading `1`. These bits add exactly
the constant that the missing sign extensions would have added. For non-zero digits,
`E` is 1 when the multiplicand's sign and the digit's sign agree. Defining E from the
row's top bit also covers the two zero digits.

The R rows and the S row (R+1 operands) are summed by a linear carry-save array: one
2N-bit row of full adders per extra operand, then the ripple merging adder.

**Odd N:** the multiplier is sign-extended by one bit, so ceil(N/2) digits cover it.
The design is exact for odd widths too, and N = 5 is tested.

## Tree reduction (`wallace_multiplier`, `mult_pkg`)

The N*N AND terms form a matrix of 2N-1 columns; column `c` holds
`min(c, 2N-2-c) + 1` bits. Reduction stages work on all columns at once, using two
kinds of counter:

- a full adder turns three bits of a column into a sum in that column and a carry in
  the next one;
- a half adder does the same for two bits.

Stages continue until no column holds more than two bits. Then a ripple
`vector_merging_adder` adds the two remaining rows.

**The schedule.** The stage height limits are the sequence 2, 3, 4, 6, 9, 13, 19, ...
Each term is 3/2 of the one before it, rounded down. The first stage lowers every column
to the largest limit below N, and the last stage lowers it to 2. Within a stage, columns
are handled from the least significant one up. A column's height counts its own bits
plus the carries arriving from the column below in the same stage. While that height is
over the limit, the column gets a half adder if it is exactly one bit too high, and a
full adder otherwise.

For N = 4 this reproduces the classic hand reduction: half adders in columns 3 and 4,
then a half adder in column 2 and full adders in columns 3 to 5. The stage count,
2 / 4 / 6 for N = 4 / 8 / 16, equals ceil(log base 3/2 of N/2).

| N | stages | full adders | half adders |
|---|---|---|---|
| 4 | 2 | 3 | 3 |
| 8 | 4 | 35 | 7 |
| 16 | 6 | 195 | 15 |

These counts exclude the merging adder.

**How the netlist is generated.** The functions in `mult_pkg` (`tree_stages`,
`tree_limit`, `tree_count`) replay this schedule while the design elaborates.
`tree_count(N, s, c, kind)` returns, for stage `s` and column `c`, one of three numbers:
the input height, the number of full adders, or the number of half adders. The generate
loops in `wallace_multiplier` wire stage `s` from its own `cur` matrix to its `nxt`
matrix. Inside a column, bits are used in a fixed order: full adders take the first 3F
bits, half adders the next 2H, and the rest pass straight through. An output column
lists its sums, then the bits that passed through, then the carries from the column
below. Elaboration stops with `$error` if the schedule is ever inconsistent, for
example a column using more bits than it has. `N` is supported up to 128, set by
`MAX_COLS`.

## Where the design makes its own choices

- **Merging adder:** every final adder is a ripple-carry adder. The reference design
  names a "vector merging adder" without fixing its type, and draws ripple rows.
- **Booth summation:** the linear carry-save array for the Booth rows is this design's
  choice; only the row layout is given. A tree summation would be faster.
- **Odd N in the Booth multiplier:** handled by sign-extending the multiplier.
- **Combining the four:** placing them in one top with shared operands is for
  comparison only. The Booth output reads the same bits as two's complement numbers.
- **Not built:** there is no pipelining, and no area or delay reporting. Area and delay
  come from running synthesis on a chosen `N`.

## Files

- `rtl/mult_pkg.sv`: `booth_sel_t` and the tree-schedule functions (compile it first).
- `rtl/full_adder.sv`, `rtl/half_adder.sv`, `rtl/vector_merging_adder.sv`: adders.
- `rtl/array_multiplier.sv`, `rtl/bypass_fa_cell.sv`,
  `rtl/column_bypass_multiplier.sv`: the two arrays.
- `rtl/booth_encoder.sv`, `rtl/booth_selector.sv`, `rtl/booth_multiplier.sv`: Booth.
- `rtl/wallace_multiplier.sv`: the tree.
- `rtl/generic_multipliers.sv`: the top.
- `tb/tb_<module>.sv`: a self-checking testbench for each module. Each prints
  `TB_RESULT checks=<n> failures=<n>`.

## Simulating

Each testbench checks its block against the simulator's own arithmetic:

- every input combination for the small cells;
- every operand pair at N = 4, 5 and 8 for the four multipliers, plus corner values and
  20,000 random pairs at N = 16;
- for the top at its default N = 16, 50,000 random pairs and the corner values.

The top's testbench also counts how often each mechanism occurs, and fails if one never
does. The mechanisms are bypassed columns (some, all or none) and every Booth digit,
including -0.

```sh
verilator --binary --timing --assert -Irtl -y rtl rtl/mult_pkg.sv \
    tb/tb_generic_multipliers.sv --top-module tb_generic_multipliers -Mdir obj
./obj/Vtb_generic_multipliers
```

Swap in any other `tb/tb_<module>.sv` and its top-module name to test a single block.
To change the width, set `N` on `generic_multipliers` or on any one multiplier; every
`N >= 2` is valid.
