# Baugh-Wooley multiplier on a logarithmic-depth HPM reduction tree

This is a parameterized, single-cycle N x N two's-complement multiplier
(default N = 32). It does not use modified-Booth recoding to halve the number
of partial-product rows. Instead it keeps all N rows and forms them with the
Baugh-Wooley algorithm:

- Every partial-product bit is one 2-input AND or NAND gate.
- Two constants take care of the signs.
- A regular reduction tree of full adders compresses the rows. Its depth
  grows only with the logarithm of the column height.

Booth recoding saves at most one or two adder levels in such a tree. In
exchange it puts an encoder and a decoder in front of every partial-product
bit. The Baugh-Wooley version keeps the partial-product stage at one gate
delay. In standard-cell implementations it comes out about as fast as a Booth
multiplier, and it is smaller and uses less power.

The datapath has four stages:

```
 x[N-1:0] ─┐   ┌──────────┐  N x N bits  ┌──────────┐ 2 rows of 2N ┌──────────────┐  2N   ┌───┐
           ├──►│ bw_pp_gen├─────────────►│ hpm_tree ├─────────────►│ Kogge-Stone  ├──────►│MSB├─► p
 y[N-1:0] ─┘   │ AND/NAND │              │ FA + HA  │              │ final adder  │       │inv│
               └──────────┘              │ +1 @ col N│             └──────────────┘       └───┘
                                         └──────────┘
```

`bw_hpm_mult` wraps this datapath in an input register and an output
register.

## The arithmetic: why AND/NAND gates and two constants are enough

Let x and y be N-bit two's-complement numbers. The MSB of each has weight
-2^(N-1). Multiplying out x * y gives N^2 one-bit products x_j y_i at weight
2^(i+j). The ones involving exactly one sign bit (i = N-1 or j = N-1, but not
both) carry a negative weight.

The Baugh-Wooley identity, in Hatamian's arrangement, turns each negative
term into a positive one. It uses the fact that -b = (1 - b) - 1 = NOT b - 1.
All the -1 terms that this produces add up to a constant, and modulo 2^(2N)
that constant reduces to 2^N + 2^(2N-1). So:

    x * y  ≡  Σ pp[i][j] · 2^(i+j)  +  2^N  +  2^(2N-1)      (mod 2^(2N))

    pp[i][j] = NOT(x_j AND y_i)   if exactly one of i, j is N-1
             =     x_j AND y_i    otherwise

In words:

- In rows 0 to N-2, only the MSB (j = N-1) is inverted.
- In the last row (i = N-1), every bit except its MSB is inverted.
- The 2^N term is a `1` added into column N.
- The 2^(2N-1) term only flips the top bit of the 2N-bit sum, so it becomes
  one inverter on the result's MSB.

The product fits in 2N bits, so it never overflows. Working modulo 2^(2N) is
exact.

`bw_pp_gen` produces the N^2 bits. The constant in column N is one more input
bit of `hpm_tree`. The MSB inverter sits at the end of `bw_multiplier`.

## The reduction tree (`hpm_tree`)

This is the part that takes the most explanation.

### What it must achieve

Column c of the array holds min(c+1, 2N-1-c) bits. Column N holds one more:
the constant. The tallest columns, N-1 and N, are N bits high. The tree must
reduce every column to at most two bits, which form `row_a` and `row_b`. It
may use only 3:2 full adders, plus half adders where a column has to lose
exactly one more bit.

Each full adder removes one bit from its column and passes a carry into the
next column. The fullest column therefore needs N-2 adders. The quantity that
matters is the logic depth: the number of adders on the longest path to the
final adder.

### Height limits and logic depth

One level of full adders can shrink a column from height h to about 2h/3.
Working backwards from the two output rows gives a series of height limits:

    L(0) = 2,  L(j+1) = floor(3/2 · L(j))
    L = 2, 3, 4, 6, 9, 13, 19, 28, 42, 63, 94, ...

A column of height h needs the smallest number of levels S such that
L(S) >= h. This gives the depth of the tree for each operand width N. The
tallest column has h = N, equivalently A = N-2 adders.

| N (bits)      | 8 | 16 | 32 | 40 | 48 | 54 | 60 | 64 |
|---------------|---|----|----|----|----|----|----|----|
| adder levels  | 4 | 6  | 8  | 8  | 9  | 9  | 9  | 10 |

Counted by the number A of adders in a column, the depth steps up at
A = 1, 2, 3-4, 5-7, 8-11, 12-17, 18-26, 27-40, 41-61 and 62-92.

A modified-Booth array has only N/2 rows. For widths up to 64 bits its tree
is one or two levels shallower, never more. This multiplier reaches exactly
the depth given above.

### How the tree is wired

The tree is built in S levels. Before level s (counted from the input), every
column must be at most L(S-1-s) bits high. At each level, each column works
from the least significant column upwards:

1. It takes its current height m and the number k of carries that will arrive
   from the column below at this level.
2. If m + k exceeds the limit by e, the column uses floor(e/2) full adders and
   (e mod 2) half adders on its own bits.
3. Full-adder sums stay in the column. Carries go to column c+1. Bits that no
   adder takes pass straight down.

The next level's bits of a column are always packed in the same order:

```
[ full-adder sums | half-adder sum | pass-through bits | carries from column c-1 ]
```

Because of that fixed order, every adder input is a fixed bit index. All
heights, adder counts and bit offsets are computed at elaboration by constant
functions from N. They are held in a localparam table (`INFO`). The generate
loops then instantiate `full_adder` and `half_adder` cells at those
positions. `$error` stops elaboration if a column ever lacks inputs for its
adders, or ends up taller than two bits.

This schedule uses the minimum number of adders:

- (N-2)^2 full adders and N-2 half adders in total (900 and 30 for N = 32);
- N-2 adders in the fullest column.

The module exports two localparams, `DEPTH` (S) and `MAX_COL_ADDERS`. The
testbenches check both against the table above.

### Relation to the published HPM tree

The HPM ("High Performance Multiplier") tree is known for a regular, easily
laid-out triangle of full adders with this logarithmic depth. This RTL keeps
its measurable properties:

- only 3:2 full adders (plus half adders);
- the same depth for every width;
- the same per-column adder count.

The exact assignment of signals to adder inputs here is this design's own
level-by-level schedule. It is not the published HPM connection pattern.

The Baugh-Wooley constant in column N is fed in as an ordinary input bit. The
published tree turns the half adder at the top of that row into a full adder
with one input tied to 1. Here, whichever full adder the schedule gives the
constant to plays that role, and synthesis simplifies that cell. The sum is
the same either way.

## Final adder (`kogge_stone_adder`)

The two tree rows are added by a 2N-bit radix-2 Kogge-Stone parallel-prefix
adder:

- (generate, propagate) pairs are merged over ceil(log2 2N) levels, at
  distances 1, 2, 4, and so on;
- there is no carry in;
- the carry out of bit 2N-1 is discarded, because the sum is only defined
  modulo 2^(2N).

The adder spans all 2N columns, including the low columns that the tree never
touches. A final adder matched to the tree's uneven arrival times would save
area and power, but this design does not use one.

## Top level (`bw_hpm_mult`) and timing

| port        | dir | width | meaning                                        |
|-------------|-----|-------|------------------------------------------------|
| `clk`       | in  | 1     | clock, rising edge                             |
| `rst_n`     | in  | 1     | asynchronous reset, active low                 |
| `in_valid`  | in  | 1     | x, y hold an operation this cycle              |
| `x`, `y`    | in  | N     | two's-complement operands                      |
| `out_valid` | out | 1     | p holds a product                              |
| `p`         | out | 2N    | two's-complement product x * y                 |

Timing:

- Operands sampled at rising edge k appear on `p` after edge k+1, which is a
  latency of two register stages.
- A new operation is accepted every cycle.
- The whole multiplier is the combinational path between the input and output
  registers. That path is one AND/NAND gate, DEPTH full-adder levels and
  log2(2N) prefix levels.

The valid bit and the reset are additions for system use. The data registers
load every cycle whatever `in_valid` is.

After coarse synthesis with yosys, the N = 32 design has about 8,300
word-level cells and 130 flip-flop bits.

## Files

| file                         | contents                                                    |
|------------------------------|-------------------------------------------------------------|
| `rtl/hpm_pkg.sv`             | height limits L(j) and depth functions                      |
| `rtl/full_adder.sv`          | 3:2 counter cell                                            |
| `rtl/half_adder.sv`          | 2:2 counter cell                                            |
| `rtl/bw_pp_gen.sv`           | Baugh-Wooley AND/NAND partial-product array                 |
| `rtl/hpm_tree.sv`            | reduction tree, elaboration-time schedule                   |
| `rtl/kogge_stone_adder.sv`   | final adder                                                 |
| `rtl/bw_multiplier.sv`       | combinational multiplier (the four stages)                  |
| `rtl/bw_hpm_mult.sv`         | top: registered multiplier                                  |

The only parameter is `N` (the operand width; it must be at least 2). The
adder width `W` of `kogge_stone_adder` is set to 2N by `bw_multiplier`.
`hpm_tree` elaborates in roughly 10 s at N = 32 and roughly 35 s at N = 64
under Verilator.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=<n> failures=<n>`.

| testbench              | what it checks                                                        |
|------------------------|-----------------------------------------------------------------------|
| `tb_full_adder`        | all 8 input combinations                                              |
| `tb_half_adder`        | all 4 input combinations                                              |
| `tb_kogge_stone_adder` | 64-bit: carry chains through every level and 20,000 random pairs; 8-bit exhaustive |
| `tb_bw_pp_gen`         | Σ pp·2^(i+j) + 2^N + 2^(2N-1) equals the signed product, and each bit's AND/NAND value: 8-bit exhaustive, 32-bit random |
| `tb_hpm_tree`          | row_a + row_b equals the input sum + 2^N, at N = 8, 16, 32; depth table for 8 to 64 bits; N-2 adders in the fullest column |
| `tb_bw_multiplier`     | 8-bit exhaustive (65,536 pairs); 32-bit corners and 1,000,000 random pairs |
| `tb_bw_hpm_mult`       | top at default N = 32, no overrides: reset values, two-cycle latency, valid alignment with idle cycles, corner pairs and 10,000 random pairs streamed one per cycle; counts each sign case, NAND bits at 1 and both outcomes of the MSB inverter, and fails if any never occurred |
| `tb_bw_widths`         | top at N = 8, 16, 48, 64 in parallel: corners and 5,000 random pairs each, plus tree depth and adder counts |

To run one with Verilator (from the folder that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/hpm_pkg.sv tb/tb_bw_hpm_mult.sv --top-module tb_bw_hpm_mult
./obj_dir/Vtb_bw_hpm_mult
```

Swap the testbench name to run any other. `hpm_pkg.sv` must come first,
because other files import it.

What has not been simulated:

- exhaustive 16-bit operation (2^32 pairs);
- widths 40, 54 and 60. For these only the depth function is checked.

## Departures and limits

- **Tree wiring.** The level schedule is this design's own. It matches the HPM
  tree's depth and adder counts, but not its published cell-by-cell
  connections or layout regularity.
- **Placement of the column-N constant.** It is an input bit that the
  schedule places, not a specific half adder converted to a full adder.
- **Final adder.** Kogge-Stone over the full 2N bits, not tailored to the
  tree's arrival profile. A simple ripple-carry adder would also work
  functionally; Kogge-Stone is the fast choice.
- **Physical measures left to the implementation flow.** None of these has a
  logic function, so none is in the RTL:
  - buffering of the operand inputs (parallel inverters, each driving about
    ten AND gates);
  - gate sizing;
  - full-adder drive strength.
- **Out of scope.** The modified-Booth multipliers (Yeh and Hsu recoders)
  that this design is compared against are not included.
