# Majority-logic multiply-accumulate units (4x4 and 8x8)

This is a multiply-accumulate (MAC) unit whose arithmetic is built from one
gate, the three-input majority gate. The only other gates are inverters. A
majority gate outputs 1 when at least two of its three inputs are 1:

    M(a, b, c) = ab + bc + ca

With one input tied to 0 it is an AND gate. With one input tied to 1 it is an
OR gate. Together with inversion, that is enough to build full adders, the
reduction array of a multiplier and a parallel-prefix adder. No XOR gate
appears anywhere in the arithmetic. The aim of the style is a small number of
logic levels and simple carry logic, on technologies where a majority gate is
a natural primitive.

Only the partial products are plain AND gates. Two configurations are given:

| unit | operands | product | accumulator |
|------|----------|---------|-------------|
| 4x4 (base) | 4 bit, unsigned | 8 bit | 12 bit |
| 8x8 (expanded) | 8 bit, unsigned | 16 bit | 20 bit |

Both are instances of the same parameterised module, `mlg_mac`.

## Datapath

    a, b ──► array multiplier ──► Ladner-Fischer adder ──► accumulator ──┬──► acc
             (AND partial         (majority prefix          (register)   │
              products, majority   adder)  ▲                             │
              full-adder array)            └─────────────────────────────┘

On each rising clock edge with `en = 1`, the accumulator loads `acc + a*b`.
Multiplier and adder form one combinational path, so a product shows up in
`acc` exactly one clock edge after its operands. The `product` output is
`a*b` for the operands currently applied, with no register. The accumulator
wraps modulo 2^ACC_W. `rst_n` is an asynchronous, active-low reset that
clears the accumulator to 0; it is also how a new accumulation starts.

## The majority full adder (`mlg_full_adder`)

The carry is one majority gate: `cout = M(a, b, cin)`. The sum takes two more
majority gates and inverters:

    t   = M(a, b, ~cin)
    sum = M(~cout, cin, t)

To see why this works, look at cases.
- When `cin = 0`, `t = a | b` and `cout = a & b`. The sum is then
  `M(~(a&b), 0, a|b) = (a|b) & ~(a&b)`, which is `a ^ b`.
- When `cin = 1`, `t = a & b` and `cout = a | b`. The sum is then
  `M(~(a|b), 1, a&b) = ~(a|b) | (a&b)`, which is `~(a ^ b)`.

In both cases the sum is `a ^ b ^ cin`. Where only two bits must be added,
the same cell is used with its third input tied to 0.

## The array multiplier (`pp_gen`, `mlg_array_multiplier`)

`pp_gen` forms the N x N matrix `pp[i][j] = b[i] & a[j]`, of weight 2^(i+j).
The matrix is reduced by a carry-save array (Braun organisation). It has N-1
rows of N majority full adders:

    row i, column j:  pp[i][j] + s[i-1][j+1] + c[i-1][j]  ->  s[i][j], c[i][j]

Row 0 is the first partial-product row, with all carries at zero. All three
inputs of a cell have weight 2^(i+j). Product bit i, for i < N, is `s[i][0]`.

A last row of N majority full adders then adds what is left:
- the remaining sum bits `s[N-1][k+1]`
- the carry bits `c[N-1][k]`

That row is a ripple-carry adder and gives the upper N product bits. Its
final carry is always 0, because (2^N-1)^2 < 2^2N. An immediate assertion
checks that it stays 0.

The 4x4 multiplier uses 16 AND gates and 16 full adders. The 8x8 multiplier
uses 64 AND gates and 64 full adders.

## The Ladner-Fischer adder (`mlg_lf_adder`)

The accumulator adder is a parallel-prefix adder of width W. Every one of its
gates is a majority gate.

**Bit level.** Each bit has a generate signal `g = M(a, b, 0)` (AND) and a
propagate signal `p = M(a, b, 1)` (OR). The carry-in is folded into bit 0 as
`g0 = M(a0, b0, cin)`.

**Prefix cell** (`mlg_prefix_cell`). A cell merges a higher group with the
adjacent lower group:

    g = M(g_hi, M(p_hi, g_lo, 0), 1)      = g_hi | p_hi & g_lo
    p = M(p_hi, p_lo, 0)                  = p_hi & p_lo

The nested form is needed. A single gate `M(g_hi, p_hi, g_lo)` would only be
correct if a group's generate implied its propagate. That holds for single
bits but not for groups.

**Tree.** The tree is the odd/even form of Ladner-Fischer:
1. Every odd bit merges with the bit below it.
2. The odd bits then form a Sklansky tree. At tree level k, an odd bit i with
   bit k of i set merges with the group that ends at
   `((i >> (k+1)) << (k+1)) + 2^k - 1`.
3. A final level merges each even bit i >= 2 with the finished odd bit i-1.

This takes ceil(log2 W) + 1 levels and works for any W >= 2. The widths used
here (12 and 20) are not powers of two.

**Sum.** Once the tree is done, the group generate of bits [i:0] is the carry
into bit i+1. Each sum bit reuses the full-adder sum form from the carries
into and out of the bit:

    s_i = M(~c_(i+1), c_i, M(a_i, b_i, ~c_i))

## Files

Everything is in `rtl/`, one module or package per file.

| file | content |
|------|---------|
| `mlg_pkg.sv` | widths of the two configurations; accumulator width `acc_width(N) = 2N + 4` |
| `mlg_maj3.sv` | the majority gate |
| `mlg_full_adder.sv` | the majority full adder |
| `pp_gen.sv` | AND partial-product matrix |
| `mlg_array_multiplier.sv` | carry-save array multiplier |
| `mlg_prefix_cell.sv` | prefix cell made of majority gates |
| `mlg_lf_adder.sv` | Ladner-Fischer adder |
| `mac_accumulator.sv` | accumulator register with enable and reset |
| `mlg_mac.sv` | one MAC unit, parameters `N` (default 4) and `ACC_W` (default 2N+4) |
| `mlg_mac_top.sv` | top: the 4x4 and the 8x8 unit side by side, sharing `clk` and `rst_n` |

Ports of `mlg_mac_top`:
- shared: `clk`, `rst_n`
- 4x4 unit: `en4`, `a4[3:0]`, `b4[3:0]`, `product4[7:0]`, `acc4[11:0]`
- 8x8 unit: `en8`, `a8[7:0]`, `b8[7:0]`, `product8[15:0]`, `acc8[19:0]`

To get a different size, set `N` on `mlg_mac`. To get more headroom, widen
`ACC_W` or change `ACC_GUARD` in the package. Every structure is generated
from these parameters.

## What is fixed by the design and what is chosen here

These parts follow the design as specified:
- majority gates in the full adders and in the multiplier's reduction path
- AND gates for the partial products
- an array multiplier
- a Ladner-Fischer adder built from majority logic
- a register accumulator fed back into the adder
- 4x4 and 8x8 configurations with 8- and 16-bit products

These are choices made in this implementation, because the specification
leaves them open:
- **Unsigned operands.** A signed version would need sign handling in the
  partial products.
- **Accumulator width.** It is 2N + 4 bits, so at least 16 full-scale
  products can be summed before wrap-around. There is no overflow or
  saturation flag.
- **Control.** The `en` input and the asynchronous active-low `rst_n`. With
  `en` tied high, the unit accumulates on every clock, as in the original
  description.
- **Adder structure.** The exact sum network of the full adder, the Braun
  organisation of the array, and the shape of the prefix tree.
- **Timing.** One cycle of latency, with no pipeline register between
  multiplier and adder.

The original evaluation reports FPGA and Sky130 ASIC results for the two
units: LUT counts, delays, power and area. They depend on the tool flow and
are not reproduced or checked by anything here. A synthesis tool is free to
restructure the majority gates, so gate counts after synthesis need not
reflect the majority-gate structure.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_mlg_maj3`, `tb_mlg_full_adder` | exhaustive truth tables |
| `tb_pp_gen` | all 4x4 operand pairs bit by bit; random 8x8 pairs by weighted sum |
| `tb_mlg_array_multiplier` | exhaustive at N = 4, 8 and 5 (65,536 pairs at N = 8) |
| `tb_mlg_lf_adder` | exhaustive at W = 2, 5 and 8, including carry-in; carry-chain corner cases and 20,000 random sums at W = 12, 20 and 32 |
| `tb_mac_accumulator` | load, hold and asynchronous clear against a reference register |
| `tb_mlg_mac` | 3,000 random cycles on a 4x4 and an 8x8 unit, see below |
| `tb_mlg_mac_top` | the whole top at its default parameters, see below |

`tb_mlg_mac` uses random enables and checks four things:
- the combinational product
- that `acc` does not move before the clock edge
- the accumulator value after the edge
- a reset in the middle of the run

`tb_mlg_mac_top` runs in two parts:
1. Twelve dot products of 4 to 20 operand pairs, each started by a reset and
   compared with a sum computed in the testbench. One uses only full-scale
   operands, so both accumulators wrap.
2. A 2,000-cycle random stream.

It counts accumulate, hold, wrap-around, reset and one-cycle-latency events,
and fails if any of them never happens.

With verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/mlg_pkg.sv tb/tb_mlg_mac_top.sv --top-module tb_mlg_mac_top
    ./obj_dir/Vtb_mlg_mac_top

Every testbench finishes in well under a second.
