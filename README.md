# 128-bit multiply-accumulate unit with parallel-prefix accumulate adders

A multiply-accumulate (MAC) unit computes `acc <- acc + a * b` once per clock,
which is the inner loop of FIR filters, convolutions, transforms (DCT, DWT,
FFT) and dot products `F = sum P_i * Q_i`. Its speed is set by how fast one
product can be formed and added to the running sum. This design attacks both
halves:

* the product comes from a **reduced-row ("modified") Wallace tree**. It is a
  carry-save reduction that uses full adders almost everywhere and half adders
  only where a stage would otherwise miss its row target;
* the running sum is updated by a **parallel-prefix adder**. The Kogge-Stone
  adder is the fast choice and the Brent-Kung adder the small one. A plain
  carry-save adder serves as a reference point.

The default build is the 128-bit unit: two 128-bit unsigned operands, a
256-bit product and 257-bit accumulators. Setting `N = 64` gives the 64-bit
unit it was scaled from, with a 128-bit product and a 129-bit accumulator.

```
          a[N-1:0]        b[N-1:0]
              |              |
        +-----v--------------v-----+
        |   wallace_multiplier     |  partial products -> reduced-row
        |  (carry-select final add)|  Wallace tree -> carry-select adder
        +------------+-------------+
                     | product[2N-1:0]
     +---------------+-------------------+
     |               |                   |
+----v-----+   +-----v----+        +-----v----+
|  Kogge-  |   |  Brent-  |        |  carry-  |   mac_accumulator x3
|  Stone   |   |  Kung    |        |  save    |   adder (2N+1 bits) plus
|  adder   |   |  adder   |        |  adder   |   PIPO accumulator register,
+----+-----+   +----+-----+        +----+-----+   output fed back to the adder
     |  ^           |  ^                |  ^
   [acc]-+        [acc]-+             [acc]-+
     |              |                   |
  acc_ksa        acc_bka             acc_csa
```

The three accumulate paths share one multiplier and the same controls, so
they always hold the same value. They exist side by side so that the three
adder styles can be compared in one netlist. A product that needs only one
adder keeps one `mac_accumulator` instance, normally the Kogge-Stone one.

## Interface and timing of `mac128`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low: accumulators and flags to 0 |
| `clr` | in | 1 | synchronous clear of accumulators and flags; wins over `en` |
| `en` | in | 1 | add `a*b` into the accumulators at this edge |
| `a`, `b` | in | N | unsigned operands, sampled at every edge where `en` is high |
| `acc_ksa`, `acc_bka`, `acc_csa` | out | 2N+1 | accumulator registers |
| `ovf_ksa`, `ovf_bka`, `ovf_csa` | out | 1 | sticky: the sum wrapped past 2N+1 bits since the last clear |

The multiplier and the adders are combinational between the operand ports and
the accumulator registers. So there is one MAC per clock, and a product shows
up in `acc_*` right after the edge at which `a`, `b` and `en` were presented.
With `en` low the accumulators hold, which is how a source of operands stalls
the unit. An inner product of length L is one cycle of `clr` followed by L
cycles of `en`. The result is in `acc_*` after the L-th edge.

The accumulator is one bit wider than the product. Any two full-scale 128-bit
products can be summed without loss, and so can any number of smaller ones up
to 2^257 - 1. Past that the sum wraps modulo 2^(2N+1) and `ovf_*` stays set
until the next clear or reset.

The operands are meant to come from a memory next to the unit. That memory is
not part of this RTL: `a` and `b` are plain ports.

## The reduced-row Wallace multiplier (`wallace_multiplier`)

This is the least obvious part of the design.

**Phase 1, partial products.** Bit `a[i] & b[j]` belongs to column `i + j`.
Every column keeps its bits packed from the top. The N x N matrix therefore
becomes an inverted pyramid, N bits tall in the middle column and 1 bit at
the ends.

**Phase 2, reduction.** If a stage starts with `r` rows, it must end with

```
r' = 2 * floor(r / 3) + (r mod 3)
```

rows. The rows are cut into disjoint groups of three. In every column each
full group goes through a full adder: the sum stays in the column and the
carry moves one column left. One or two leftover bits pass through unchanged.
A plain Wallace tree would also put every leftover pair through a half adder.
That costs area and does not reduce the number of bits. Here a half adder is
used only where it is needed: columns are handled from the least significant
end, and a column's leftover pair goes through a half adder only if the column
would otherwise end up taller than `r'`. The incoming carries from the column
to the right count toward that height.

The row counts per stage are:

| N | rows after each stage | stages |
|---|---|---|
| 10 | 10, 7, 5, 4, 3, 2 | 5 |
| 64 | 64, 43, 29, 20, 14, 10, 7, 5, 4, 3, 2 | 10 |
| 128 | 128, 86, 58, 39, 26, 18, 12, 8, 6, 4, 3, 2 | 11 |

For N = 64 every half adder falls in the tenth (last) stage, where the
schedule goes from 3 rows to 2. That stage has 53 half adders. The published
64-bit design reports 8 half adders in that stage. It must place them by a
different rule, which was not available, so this count is a known difference.
For N = 128 the rule places 116 half adders, in stages 4, 6, 7, 9 and 11.

**Phase 3, final addition.** The two rows left are added by a 2N-bit
carry-select adder (`carry_select_adder`) with 4-bit stages. Which adder
closes the tree is a free choice. The carry-select adder is a common one for
this job and keeps the multiplier independent of the accumulate adders.

`wallace_multiplier` carries out the three phases exactly as described, in
one `always_comb` block. Column heights do not depend on the data, so every
loop bound and every index is fixed once N is fixed, and the block describes
a fixed network of AND gates, full adders and half adders. The stage count is
computed from the row formula at elaboration (`mac_pkg::wallace_stages`).

## The accumulate adders

All three take `a`, `b`, `cin` and produce a sum and a carry out. In the MAC
they run at `W = 2N + 1 = 257` bits: the zero-extended product plus the
accumulator.

**Kogge-Stone (`kogge_stone_adder`).** Each bit forms generate `g = a & b`
and propagate `p = a ^ b`, and the carry in is folded into bit 0. Then
ceil(log2 W) levels follow. At level l every bit `i >= 2^l` merges its
(G, P) pair with that of bit `i - 2^l` through the prefix operator
`(G, P) = (G_hi | P_hi & G_lo, P_hi & P_lo)`. Every node feeds exactly one
cell in the next level and the depth is minimal: 9 levels for 257 bits. The
price is about W log2 W cells and long wires.

**Brent-Kung (`brent_kung_adder`).** An up-sweep tree merges groups of 2, 4,
8, ... bits: node `i` at span `d` when `(i+1)` is a multiple of `2d`. A
down-sweep then fills the remaining bits at spans ..., 4, 2, 1: node `i` when
`(i+1) mod 2d == d` and `i > d`. For a power-of-two W that is
`2(W-1) - log2 W` cells in `2 log2 W - 1` levels. This is much less area than
Kogge-Stone and roughly twice the depth. The same index rules work for the
257-bit width.

**Carry-save adder (`carry_save_adder`).** The first row reduces every bit
pair independently: `s[i] = a[i] ^ b[i]` and `d[i+1] = a[i] & b[i]`. A full
adder at bit 0 also takes the carry in. The second row merges `s` and `d` with
a rippling chain: a half adder at bit 1, full adders up to bit W-1, and a half
adder at the top that yields the extra sum bit. The result therefore has W+1
bits. The top cell's own carry is always zero. It is kept as a port because
the structure has it, and an assertion watches it. Because of the ripple
chain this adder is linear in W.

**Carry-select (`carry_select_adder`),** used inside the multiplier. The
operand is cut into M-bit stages (M = 4). Each stage computes its sum twice
with ripple chains, once for carry in 0 and once for 1. A multiplexer per
stage picks one result when the real carry arrives. The delay is about
`t_setup + M t_carry + (W/M) t_mux + t_sum`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `mac128` | `N` | 128 | operand width; 64 gives the 64-bit MAC |
| `wallace_multiplier` | `N` | 128 | operand width |
| `mac_accumulator` | `PW` | 256 | product width; accumulator is PW+1 |
| `mac_accumulator` | `ADDER` | `ADD_KOGGE_STONE` | `ADD_BRENT_KUNG` or `ADD_CARRY_SAVE` |
| `kogge_stone_adder`, `brent_kung_adder` | `W` | 32 | width |
| `carry_save_adder` | `W` | 8 | width (result W+1 bits), W >= 2 |
| `carry_select_adder` | `W`, `M` | 16, 4 | width, stage width |

`mac_pkg` holds the adder-kind enum, the (G, P) struct, the half-adder,
full-adder and prefix-operator functions, and the row-schedule functions.

## Files

```
rtl/mac_pkg.sv             shared types and bit-cell functions
rtl/kogge_stone_adder.sv   Kogge-Stone parallel-prefix adder
rtl/brent_kung_adder.sv    Brent-Kung parallel-prefix adder
rtl/carry_save_adder.sv    two-row carry-save adder
rtl/carry_select_adder.sv  linear carry-select adder
rtl/wallace_multiplier.sv  reduced-row Wallace multiplier
rtl/mac_accumulator.sv     one accumulate path: adder + PIPO register
rtl/mac128.sv              top: multiplier + three accumulate paths
tb/tb_<module>.sv          self-checking testbench of each module
tb/tb_mac64.sv             the top built as the 64-bit MAC
```

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. A
watchdog ends it with a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Mdir obj_mac128 \
    rtl/mac_pkg.sv -y rtl tb/tb_mac128.sv --top-module tb_mac128
./obj_mac128/Vtb_mac128
```

Replace `mac128` by any other module name to run its testbench. To lint a
module alone: `verilator --lint-only -Wall rtl/mac_pkg.sv -y rtl rtl/<module>.sv`.

What the testbenches check, always against results computed independently with
the simulator's own wide arithmetic:

* `tb_kogge_stone_adder`, `tb_brent_kung_adder`, `tb_carry_select_adder` and
  `tb_carry_save_adder` test each adder at 32 and 257 bits. Vectors: zero,
  all-ones with carry in, alternating patterns, 2000 random pairs, and a carry
  chain of every length from bit 0.
* `tb_wallace_multiplier` runs 128x128, 64x64 and 10x10 instances on edge
  values, walking ones, random operands and a grid of small operands.
* `tb_mac_accumulator` drives all three adder kinds side by side at 256 bits
  with a random mix of accumulate, stall, clear and all-ones products. After
  every edge it compares `acc` and `ovf` with a reference model, and it counts
  each kind of event.
* `tb_mac128` drives the full-size top with no parameter changes. It runs
  inner products of length 1 to 32, a random control mix, and maximal
  operands until overflow. It checks all three accumulators after every
  clock, and it fails if any of accumulate, stall, clear or overflow never
  happened.
* `tb_mac64` runs the same sequence on the 64-bit build (`mac128 #(.N(64))`),
  with 129-bit accumulators.

## Where this RTL makes its own choices

* Operands are unsigned, and all the arithmetic is unsigned.
* The control signals `en`, `clr` and `rst_n` and the wrap/overflow behaviour
  of the 2N+1-bit accumulator are additions. Without them the unit would have
  no defined start or reset.
* The unit is not pipelined. One multiply-accumulate takes one clock, and the
  clock period must cover the multiplier, the final adder of the multiplier
  and the accumulate adder. Splitting the path into pipeline stages is a
  natural extension and is not done here.
* Half adders are placed by the column rule described above. This gives more
  half adders than the original 64-bit design reports (53 against 8 in the
  last stage). The function is exact either way.
* The multiplier closes its tree with a carry-select adder.
* In the carry-save adder, a full adder sits wherever three signals meet in
  the second row.
* The adders' default widths (32, 8, 16) are stand-alone sizes for testing.
  Inside the MAC every adder is instantiated at the width it needs.
* No timing or area figures are claimed. This RTL has not been taken through
  synthesis to a technology.
