# 32 × 32 Dadda multiplier, built from 8 × 8 Dadda blocks and pipelined

This is an unsigned 32 × 32 → 64-bit multiplier. It forms the product the way
a Dadda multiplier does: every bit of one operand is ANDed with every bit of
the other, and the resulting bit matrix is compressed column by column with
full adders and half adders until only two rows remain. One carry-propagate
addition then gives the product. Compressing a 32-row matrix in a single tree
is one option. This design instead builds the product in three levels: sixteen
8 × 8 Dadda blocks, four 16 × 16 levels and one 32 × 32 level. No level adds
its rows to a finished number; each passes a *sum row* and a *carry row* up to
the next. Only the last level feeds a carry-select adder. A register closes
each of the four steps, so a new operand pair can enter on every clock cycle
and each product comes out four cycles later.

## Dadda column compression

A bit of the partial-product matrix at position (i, j), `a[i] & b[j]`, has
weight 2^(i+j). All bits of equal weight form a column, and the order of bits
within a column does not matter. Two counters shrink a column while keeping the
weighted sum:

* the **full adder**, a (3,2) counter: three bits of column c become one sum
  bit in column c and one carry bit in column c+1;
* the **half adder**, a (2,2) counter: two bits become a sum bit in column c
  and a carry in column c+1.

Dadda's method limits how tall the matrix may be after each stage. Working back
from the final two rows, each allowed height is the largest integer no more than
1.5 times the next one:

    2, 3, 4, 6, 9, 13, 19, 28, 42, ...

A stage aims at the largest of these heights that is still below the current
tallest column. It visits the columns from the least significant one upwards.
A column's height counts its own bits plus the carries it receives in this
stage from the column below. If that height is exactly one over the target,
the column gets one half adder. If it is higher still, the column gets full
adders (each lowers it by two) until it is at or one above the target.
Counters are used only where needed, so early stages do little work. The
32 × 32 matrix therefore has 8 stages (32 → 28 → 19 → 13 → 9 → 6 → 4 → 3 → 2).
It uses N² − 4N + 3 = 899 full adders and N − 1 = 31 half adders, the known
counts for a Dadda tree.

### How the tree is generated

The whole schedule is worked out at elaboration time by functions in
`dadda_pkg`. `schedule(profile, N, what)` applies the rule above to an initial
shape of column heights. For every stage and every column, it returns the
column height, the number of full adders or the number of half adders, as a
packed table. There are two shapes:

| profile     | matrix                                                         | tallest column |
|-------------|----------------------------------------------------------------|----------------|
| `PROF_PP`   | N × N partial products; column c holds min(c+1, 2N−1−c) bits   | N              |
| `PROF_JOIN` | sum and carry rows of four (N/2)² products at offsets 0, N/2, N/2, N | 6        |

`dadda_reduce` reads the table and builds one `dadda_stage` per stage. The
matrix travels as an array of columns, `col[c]`, each a vector of bits packed
from bit 0 upwards. Inside a stage, column c sends its lowest bits to its full
adders and then to its half adders. The column it hands to the next stage is
laid out as:

    [ full-adder sums | half-adder sums | bits passed through | carries from column c-1 ]

Every bit position above the scheduled height is zero. Because the layout
follows from the table alone, each stage knows at elaboration time where every
bit of the stage before it sits. `dadda_reduce` also zeroes any input bit that
lies outside the shape. It reports the size of the tree it built as the
localparams `NUM_STAGES`, `NUM_FA` and `NUM_HA`.

A carry out of the top column (weight 2^(2N)) is dropped. This loses nothing:
every counter keeps the weighted sum exactly, and the sum is a product below
2^(2N). A dropped carry is therefore always zero.

## The three levels

Split an operand into halves, a = aH·2^(N/2) + aL, and likewise for b. Then

    a·b = aL·bL + (aL·bH + aH·bL)·2^(N/2) + aH·bH·2^N

`dadda_join` #(N) applies this to four sub-products that each arrive as a sum
row and a carry row of N bits. It places the eight rows at offsets 0, N/2, N/2
and N. The middle columns then hold six bits, the rest two. A `PROF_JOIN`
reduction takes those six rows down to two in three stages (6 → 4 → 3 → 2).

The top, `systolic_dadda32`, cuts a and b into four 8-bit digits each and
works in four steps:

| step | hardware                                             | output                              | register |
|------|------------------------------------------------------|-------------------------------------|----------|
| 1    | 16 × `dadda_mult` #(8): digit products a_i·b_j      | 16 sum/carry row pairs, 16 bits     | 512 bits |
| 2    | 4 × `dadda_join` #(16): the four 16 × 16 products   | 4 sum/carry row pairs, 32 bits      | 256 bits |
| 3    | 1 × `dadda_join` #(32)                               | 1 sum/carry row pair, 64 bits       | 128 bits |
| 4    | `carry_select_adder` #(64, 8)                        | 64-bit product                      | 64 bits  |

16 × 16 block (p, q) multiplies half p of a with half q of b. Its four
sub-products are digit products (2p, 2q), (2p, 2q+1), (2p+1, 2q) and
(2p+1, 2q+1). The 32 × 32 join takes the four 16 × 16 blocks in the same order.

The cost of the levels, in counters:

| part                     | stages | full adders | half adders |
|--------------------------|--------|-------------|-------------|
| one 8 × 8 block          | 4      | 35          | 7           |
| one 16 × 16 join         | 3      | 63          | 9           |
| the 32 × 32 join         | 3      | 127         | 17          |
| whole hierarchy          | 4+3+3  | 939         | 165         |
| flat 32 × 32 tree, for comparison | 8 | 899   | 31          |

The join counts include counters fed by constant-zero bits of the incoming
carry rows, which synthesis removes. `dadda_mult` #(32) builds the flat tree,
and its testbench checks it. The top does not use it.

## Final adder

`carry_select_adder` adds the two rows in 8-bit sections. The lowest section
is a ripple-carry adder (`ripple_carry_adder`, a chain of full adders) fed
by the carry-in. Every higher section holds two ripple-carry adders that work
at the same time, one assuming carry-in 0 and one assuming 1. Once the carry
from the section below is known, a multiplexer picks the matching sum and
carry-out. The output `sel` holds the carry into each section, which is the
select signal of its multiplexer. In the multiplier the carry-in is 0, and the
carry-out is always 0 because the product fits in 64 bits. An assertion in the
top checks this.

## Interface and timing of `systolic_dadda32`

| port        | dir | width | meaning                                         |
|-------------|-----|-------|-------------------------------------------------|
| `clk`       | in  | 1     | clock, rising edge                              |
| `rst_n`     | in  | 1     | synchronous reset, active low                   |
| `in_valid`  | in  | 1     | `a` and `b` hold an operand pair                |
| `a`, `b`    | in  | N     | unsigned operands                               |
| `out_valid` | out | 1     | `product` holds a result                        |
| `product`   | out | 2N    | a · b                                           |

Parameters: `N = 32` is the operand width, a multiple of 4; the digit width is
N/4. `PIPELINED = 1` places the four registers.

* A pair sampled with `in_valid` on rising edge k shows on `product`, with
  `out_valid`, after edge k+3. A testbench sampling on edges sees it at edge
  k+4.
* Throughput is one pair per cycle. There is no stall and no back-pressure.
  Idle cycles travel through as `out_valid = 0`.
* Reset clears every register, valid bits and data alike, and drops any pair
  in flight.
* With `PIPELINED = 0` there are no registers. The whole tree is one
  combinational path, `out_valid` equals `in_valid`, and `clk` and `rst_n` are
  unused.

## What follows the source description and what is this design's own

Taken from the description:

* the Dadda rule with (3,2) and (2,2) counters;
* the 8 stages and the full- and half-adder counts of the 32 × 32 tree;
* partial products by AND;
* the order 8 × 8 → 16 × 16 → 32 × 32, each level passing sum and carry
  upwards;
* a carry-select adder with multiplexers at the end.

Chosen here:

* **Stage counts per level.** The source gives five stages for the 8 × 8
  block. That seems to count partial-product generation as a stage; the rule
  gives four reduction stages. For each join it gives two stages. Six rows
  cannot come down to two in two stages of (3,2) counters under the 1.5 rule,
  so this design follows the rule and uses three.
* **How the sub-products are placed.** The split a·b = aL·bL + … above is
  this design's, as is the order of bits within a column.
* **Registers.** "Systolic" is read as a pipeline with one register after each
  step, plus a valid bit and a synchronous reset. The source places no
  registers and gives no latency. `PIPELINED = 0` gives the purely
  combinational form.
* **Section size.** The adder's 8-bit sections are this design's choice.
* **Signedness.** Operands are unsigned; the source does not treat signed
  numbers.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if it hangs.

| testbench                  | what it checks                                                        |
|----------------------------|-----------------------------------------------------------------------|
| `tb_full_adder`, `tb_half_adder` | all input combinations                                         |
| `tb_pp_gen`                | every partial-product bit and their weighted sum                      |
| `tb_dadda_stage`           | one stage keeps the weighted sum and meets its height target           |
| `tb_dadda_reduce`          | random matrices of 8 × 8, 32 × 32 and join shape; stage, FA and HA counts against Dadda's figures |
| `tb_dadda_mult`            | 8 × 8 for all 65536 pairs; flat 32 × 32 with corner and random operands |
| `tb_dadda_join`            | real and arbitrary sub-product rows                                    |
| `tb_carry_select_adder`    | sums, carry-out, and every multiplexer select, both ways                 |
| `tb_ripple_carry_adder`    | an 8-bit section for all operand pairs and both carry-in values          |
| `tb_pipe_reg`              | registered and pass-through stage, reset                               |
| `tb_systolic_dadda32`      | the top at its defaults: thousands of products against a 64-bit reference, latency 4 and order; counts back-to-back issue with a full pipeline, bubbles, a reset flush and carry-select multiplexers taking the carry-in-one path, and fails if any of them never happened |
| `tb_systolic_dadda32_comb` | the top with `PIPELINED = 0`                                            |

To run one with Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
        rtl/dadda_pkg.sv tb/tb_systolic_dadda32.sv --top-module tb_systolic_dadda32 -o sim
    ./obj_dir/sim

`dadda_pkg.sv` must be read first. Verilator finds every other module by its
file name. The full-size testbench builds in about 20 seconds and runs in well
under a second.

## Files

`rtl/`: `dadda_pkg` (schedule functions and types), `full_adder`,
`half_adder`, `pp_gen`, `dadda_stage`, `dadda_reduce`, `dadda_mult`,
`dadda_join`, `ripple_carry_adder`, `carry_select_adder`, `pipe_reg`, and the top
`systolic_dadda32`. `tb/` holds one testbench per block, as listed above.

To change the design:

* `N` on the top scales the operand width; the digit width is N/4.
* `BLOCK` inside the top sets the adder's section size; it must divide 2N.
* `MAX_STAGES` and `MAX_COLS` in `dadda_pkg` bound the schedule tables. The
  current values cover products up to 64 bits.
