# 32-bit multiply-accumulate unit: reversible Vedic multiplier and block Kogge-Stone adder

A multiply-accumulate (MAC) unit computes `s <= s + m1 * m2` once per clock,
which is the inner loop of filters, correlators and dot products. A MAC is
only as fast as its multiplier and its wide adder, and this design makes a
specific choice for each:

* **The multiplier** is a Vedic ("vertically and crosswise", Urdhva
  Tiryagbhyam) multiplier. All partial products of a level are formed at once,
  and the whole multiplier is a regular tree of small 2x2 multipliers. Every
  gate in it is a *reversible* gate, that is, Toffoli, Peres and double Peres
  gates, whose outputs determine their inputs uniquely. Reversible logic is
  studied for low-power and quantum circuits. Here it is described at gate
  level, and synthesis maps it to ordinary logic.
* **The 64-bit adder** that adds the product to the running sum does not
  propagate carries across all 64 bits. It adds eight 8-bit slices
  independently with Kogge-Stone prefix adders. It then fixes each slice up
  with an incrementer while a chain of compound AOI/OAI gates, one gate per
  slice, decides which slices receive a carry.

The unit is purely combinational from the operands to the register input, and
it has a single 64-bit register, the accumulator.

```
 m1[31:0] ──┐
            ├─► vedic_mult (32x32) ──v[63:0]──┐
 m2[31:0] ──┘                                 ▼
                          ┌──────────► ks_skip_adder64 ──z[63:0]──► accumulator ──y──┬──► s[63:0]
                          │                                        (c, clr)         │
                          └─────────────────────────────────────────────────────────┘
```

## Top level: `mac32`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `c`   | in  | 1  | clock; everything happens on its rising edge |
| `clr` | in  | 1  | synchronous clear, active high: the register loads 0 at the edge |
| `m1`  | in  | 32 | operand (unsigned) |
| `m2`  | in  | 32 | operand (unsigned) |
| `s`   | out | 64 | accumulator contents |

Behaviour: at every rising edge of `c`, `s <= clr ? 0 : (s + m1*m2) mod 2^64`.
The operands are applied before an edge, and that edge adds their product,
so one product is accumulated per clock and `s` shows it one edge later. The
adder's carry out is not used, so the sum wraps at 2^64. The only parameter is
`W` (operand width, default 32). The product and accumulator are `2*W` bits
wide.

Reference run: with `m1 = m2 = 1200` and `clr` released, `s` steps through
0, 1 440 000, 2 880 000, 4 320 000, 5 760 000, … on successive edges.

## Reversible gate library

Each gate has as many outputs as inputs. The outputs that a circuit does not
need are *garbage outputs*. They stay unconnected, which lint tools report as
unused signals.

| module | inputs | outputs | used as |
|--------|--------|---------|---------|
| `toffoli_gate`      | A, B, C      | A, B, AB⊕C | AND gate (C = 0) |
| `peres_gate`        | A, B, C      | A, A⊕B, AB⊕C | half adder (C = 0): sum A⊕B, carry AB |
| `double_peres_gate` | A, B, Cin, D | A, A⊕B, A⊕B⊕Cin, (A⊕B)Cin ⊕ AB ⊕ D | full adder (D = 0): sum and carry |

`rev_rca` is an N-bit ripple-carry adder (default 4) made from these gates. Bit
0 has no carry input, so it is a Peres half adder. Every higher bit is a
double Peres full adder. The adder has no carry input.

## The Vedic multiplier

### 2x2 (`vedic_mult_2x2`)

Four Toffoli AND gates form a0b0, a1b0, a0b1 and a1b1. Bit q0 is the
vertical product a0b0. A Peres half adder sums the two crosswise products
into q1 and a carry. A second Peres half adder adds that carry to a1b1,
giving q2 and q3.

### Joining four products (`vedic_combine`)

Split the operands into halves of H = W/2 bits: `a = {ah, al}` and
`b = {bh, bl}`. The four half-width products are `ll = al·bl`, `hl = ah·bl`,
`lh = al·bh` and `hh = ah·bh`, each W bits wide. Three W-bit reversible
ripple-carry adders combine them:

```
middle:  m1 = hl + lh                       carry k1
right:   m2 = m1 + {H zeros, ll[W-1:H]}     carry k2
left:    hi = hh + {zeros, k1^k2, m2[W-1:H]}
q = { hi, m2[H-1:0], ll[H-1:0] }
```

Why `k1 ^ k2` is correct: the middle terms `hl + lh + (ll >> H)` add up to
less than 2^(W+1). So at most one of the two carries is 1, and their XOR equals
their sum. Both cases really occur. For W = 4, 15 × 11 produces a carry only in
the right adder, not in the middle one. The left adder never carries out,
because the product fits in 2W bits.

### The tree (`vedic_mult`)

`vedic_mult` repeats this step from 2x2 upwards, written as a loop over
levels:

| level | chunk width | products | built from |
|-------|-------------|----------|------------|
| 1 | 2  | 16 × 16 = 256 | `vedic_mult_2x2` |
| 2 | 4  | 8 × 8 = 64    | `vedic_combine #(4)` |
| 3 | 8  | 4 × 4 = 16    | `vedic_combine #(8)` |
| 4 | 16 | 2 × 2 = 4     | `vedic_combine #(16)` |
| 5 | 32 | 1             | `vedic_combine #(32)` |

Product `p[i][j]` of a level is (chunk i of `a`) × (chunk j of `b`). A node
at level l takes its four inputs from level l-1, at indices
`[2i][2j]`, `[2i+1][2j]`, `[2i][2j+1]` and `[2i+1][2j+1]`. The 32x32
multiplier therefore contains 256 2x2 multipliers (1024 Toffoli gates, 512
Peres half adders) and 85 combine stages (255 ripple-carry adders). `W` must
be a power of two, at least 4. The operands are unsigned.

## The modified 64-bit adder (`ks_skip_adder64`)

This is the part of the design that takes the most care to read.

**First stage: parallel slices.** The operands are cut into eight 8-bit
slices. Each slice is added by its own `kogge_stone_adder` with carry in 0,
so all eight run at the same time. Each yields an intermediate sum `x_k` and
a slice carry `g_k`. The Kogge-Stone adder is the standard radix-2 prefix
tree: generate/propagate per bit, then log2(8) = 3 levels that double the
span of each (G, P) group.

**Slice 0** is final as it stands. Its carry `g_0` is the carry into slice 1.

**Each slice k ≥ 1** has two more parts:

* `increment_block`: a chain of 8 half adders that adds the incoming carry
  to `x_k` and gives the final sum bits. Its own carry out is not produced.
* `carry_skip`: computes the carry into slice k+1 without waiting for the
  incrementer:

  `carry_out_k = g_k | (carry_in_k & (x_k == 8'hFF))`

  A slice passes an incoming carry on only when its intermediate sum is all
  ones. Otherwise its outgoing carry is its own slice carry.

**Alternating polarity.** The skip gate is a single inverting compound gate,
and the polarity alternates from slice to slice, so that no inverter sits on
the carry chain:

| slice | bits | gate | carry in | slice carry used | all-ones test | carry out |
|-------|------|------|----------|------------------|---------------|-----------|
| 0 | 7:0   | none | —        | —                | —             | true, = g_0 |
| 1 | 15:8  | AOI  | true     | g_1              | AND           | inverted |
| 2 | 23:16 | OAI  | inverted | ~g_2             | NAND          | true |
| 3 | 31:24 | AOI  | true     | g_3              | AND           | inverted |
| … | …     | …    | …        | …                | …             | … |
| 7 | 63:56 | AOI  | true     | g_7              | AND           | inverted = `co_n` |

The AOI form is `~(g | (ci & P))`. The OAI form is `~((ci_n | P_n) & g_n)`,
which is the same carry by De Morgan's law, with every signal inverted. In an
OAI slice the incrementer needs the true carry. It gets it through an
inverter, which is not on the carry chain. Because slice 7 is an AOI slice,
the adder's carry out is available only inverted, as `co_n`. The MAC leaves it
unconnected.

**Critical path.** It runs through one 8-bit Kogge-Stone slice, then the
chain of up to seven AOI/OAI gates, then the last slice's 8-bit incrementer.
This replaces a 64-bit carry chain.

The parameters `N` (64) and `BLK` (8) can be changed. `N` must be a multiple
of `BLK`, and `BLK` a power of two. With an odd number of slices the top
slice is OAI and `co_n` is produced by an inverter.

## Accumulator (`accumulator`)

The accumulator is a 64-bit D flip-flop register with a synchronous, active-high
clear. It has no enable, so it loads the adder output at every rising edge.

## Where this RTL interprets or departs from its specification

The architecture follows a published design: the Vedic tree of reversible
gates, the three ripple-carry adders per level, the 8-bit Kogge-Stone slices
with carry in 0, the half-adder incrementers and the alternating AOI/OAI skip
gates. The points below are choices this RTL had to make:

* **Toffoli inputs in the 2x2 multiplier.** The published 2x2 drawing labels
  the second AND gate's inputs a1, b1, the same as the fourth gate. The
  crosswise step needs a1·b0 there, and that is what is built.
* **Middle carries of the combine stage.** The drawing does not show clearly
  how the middle and right adders' carries reach the left adder. They are
  merged by XOR, which is exact, as shown above.
* **Double Peres fourth input.** It is specified only for D = 0. Here D is
  XORed into the carry output, the usual definition that keeps the gate
  reversible. The design always ties D to 0.
* **Skip condition.** The skip logic is specified to use the slice's
  intermediate sum, its own carry and the previous carry. Using "sum is all
  ones" as the propagate condition is the standard carry-skip rule, and the
  drawing shows an AND/NAND gate in that place.
* **Slice 0 and the order of AOI/OAI** are read from the published drawing:
  no skip gate on the lowest slice, AOI on slice 1 and on the top slice, and
  an inverted carry out.
* **Timing and control.** The rising-edge register, the synchronous clear,
  the absence of an enable, one-cycle latency, wrap-around at 2^64 and
  unsigned operands are this design's choices. The published simulation of
  the 1200 × 1200 run shows the same values per clock. Its waveform has
  further internal traces, apparently a second register stage, whose timing
  is not modelled here.
* **Not reproduced.** The published FPGA figures for this architecture
  (79.239 ns delay, 2647 slices, against 95.2 ns and 108.8 ns for two earlier
  MACs) cannot be checked by RTL simulation. Claims that reversible gates
  dissipate no power apply to physical reversible logic, not to its CMOS
  synthesis.

## Files

`rtl/` holds one module or package per file: `mac_pkg` (sizes), the gates
(`toffoli_gate`, `peres_gate`, `double_peres_gate`), `rev_rca`,
`vedic_mult_2x2`, `vedic_combine`, `vedic_mult`, `kogge_stone_adder`,
`increment_block`, `carry_skip`, `ks_skip_adder64`, `accumulator` and the top
`mac32`. `tb/` holds one self-checking testbench per module, `tb_<module>.sv`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example,
for the whole MAC:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv rtl/mac_pkg.sv \
          tb/tb_mac32.sv --top-module tb_mac32 -o sim
./obj_dir/sim
```

Replace `tb_mac32` with any other testbench name. What they check:

* gates: all input patterns against the equations, plus a check that the
  outputs form a permutation (reversibility) and that the adder use is right;
* `rev_rca`, `kogge_stone_adder`, `increment_block`, `carry_skip`,
  `vedic_mult_2x2`: exhaustive at the default width, plus random tests at 32
  bits where it applies;
* `vedic_combine`: exhaustive at W = 4 and random at W = 32, with both
  middle-carry cases forced;
* `vedic_mult`: 4x4 and 8x8 exhaustive, and 20 000 random and corner 32x32
  products;
* `ks_skip_adder64`: a carry generated in every slice and skipped through
  every run of all-ones slices, plus 30 000 random and near-overflow sums;
  `co_n` is checked too;
* `tb_mac32` (full size, defaults): the 1200 × 1200 reference sequence
  edge by edge, then 20 000 cycles of random and large operands with random
  clears against a reference model. It counts clears, accumulations, 64-bit
  wraps, slice carries and carry skips, and fails if any of them never
  happened. It runs in a few seconds.
