# Kogge-Stone adder

A ripple-carry adder is slow because bit *i* cannot settle until the carry from
bit *i-1* has arrived, so the delay grows linearly with the word width. A
Kogge-Stone adder removes that chain: it treats carry computation as a
*prefix problem* and solves it with a tree of small two-input cells that is
only ceil(log2 N) levels deep, with every bit position working in parallel on
every level. This repository holds synthesizable SystemVerilog for such an
adder, 32 bits wide by default, with a carry-in and a carry-out. It is purely
combinational: no clock, no registers, no reset.

## The three stages

```
 a,b ──► pre-processing ──(p_i,g_i)──► carry network ──C_i──► post-processing ──► sum, cout
              │                            ▲                      ▲
              └──────────── p_i ───────────┼──────────────────────┘
                                  cin ─────┴──────────────────────┘
```

1. **Pre-processing** (`ks_preprocess`): per bit, the propagate
   `p_i = a_i ^ b_i` (a carry entering bit *i* leaves it) and the generate
   `g_i = a_i & b_i` (bit *i* makes a carry by itself).
2. **Carry network** (`ks_carry_network`): computes the carry out of every bit,
   `C_i`, from the `(p, g)` pairs and `cin`.
3. **Post-processing** (`ks_postprocess`): `s_i = p_i ^ C_(i-1)`, with
   `C_(-1) = cin`, and `cout = C_(N-1)`.

Stages 1 and 3 are one gate level each. All of the interest is in stage 2.

## Group propagate and generate

Extend *p* and *g* from single bits to a contiguous group of bits `i:j`
(bit *i* down to bit *j*). `G[i:j]` says the group produces a carry out of
bit *i* on its own; `P[i:j]` says a carry entering at bit *j* passes through
to the top. Two adjacent groups, an upper `i:k` and a lower `k-1:j`, combine
into `i:j` by

```
P[i:j] = P[i:k] & P[k-1:j]
G[i:j] = G[i:k] | (P[i:k] & G[k-1:j])
```

This operator is associative, which is what allows a tree to evaluate it. Once
a group reaches bit 0 (and includes the carry-in), its generate *is* the carry:
`C_i = G[i:0]`.

Two cells implement the operator:

| cell            | computes            | gates         | used where                              |
|-----------------|---------------------|---------------|-----------------------------------------|
| `ks_black_cell` | `P[i:j]`, `G[i:j]`  | 2 AND, 1 OR   | merged group does not yet reach bit 0   |
| `ks_gray_cell`  | `G[i:j]` only       | 1 AND, 1 OR   | merged group reaches bit 0: its `P` is never used again |

The `(P, G)` pair travels as one packed struct, `ks_pkg::pg_t`.

## The Kogge-Stone tree

On level *l* (l = 1 … L, L = ceil(log2 N)) every position *i* combines its
current group with the group ending at position `i - D`, where `D = 2^(l-1)`.
Each group therefore doubles its span on each level, and after L levels every
position holds `G[i:0]`. On each level:

* `i < D`: the group already reaches bit 0; the signal passes down unchanged
  (a wire in RTL; a layout would put a buffer here to balance load).
* `D <= i < 2D`: the merge reaches bit 0: gray cell.
* `i >= 2D`: the merge is still incomplete: black cell.

The 16-bit tree, as group spans produced on each level (B = black, G = gray,
`.` = pass-through):

```
bit:     15    14    13    12    11    10     9     8     7     6     5     4     3     2     1     0
lvl 1  B15:14 B14:13 B13:12 B12:11 B11:10 B10:9 B9:8 B8:7 B7:6 B6:5 B5:4 B4:3 B3:2 B2:1  G1:0   .
lvl 2  B15:12 B14:11 B13:10 B12:9 B11:8 B10:7 B9:6 B8:5 B7:4 B6:3 B5:2 B4:1  G3:0  G2:0   .     .
lvl 3  B15:8  B14:7  B13:6  B12:5 B11:4 B10:3 B9:2 B8:1 G7:0 G6:0 G5:0 G4:0   .     .     .     .
lvl 4  G15:0  G14:0  G13:0  G12:0 G11:0 G10:0 G9:0 G8:0   .    .    .    .    .     .     .     .
```

Cell counts follow directly: level *l* has `N - 2D` black cells (when
positive) and `min(D, N - D)` gray cells. For the default N = 32 that is
5 levels, 98 black cells and 31 gray cells, plus the carry-in cell below.
Every cell drives at most two cells on the next level, and all wires on a
level span the same distance, which is what makes Kogge-Stone the fastest (and
most wire-hungry) of the classic prefix trees.

Widths that are not a power of two work unchanged: positions whose partner
`i - D` would be negative simply fall into the pass-through or gray ranges.

## How the carry-in enters

The carry equation with a carry-in is `C_i = G[i:0] | (P[i:0] & cin)`.
Evaluating it literally needs `P[i:0]`, which gray cells do not produce. This
design instead treats `cin` as an extra group *below* bit 0 with generate
`cin` and propagate 0, and merges it into position 0 with one gray cell
*before* the tree:

```
G[0:-1] = g_0 | (p_0 & cin)
```

From then on every group that reaches bit 0 already contains the carry-in, so
the gray cells of the tree output exactly the carries `C_i` of the equation
above, and the tree keeps its pure black/gray shape. The propagate field of
such a group is 0 (a group that contains the carry-in "source" cannot
propagate), and that is the value the network assigns to it. The cost is one
extra gray-cell delay on the path from `cin` and `g_0`.

## Modules

| module             | role                               | parameters      |
|--------------------|------------------------------------|-----------------|
| `ks_adder`         | top: a + b + cin                   | `WIDTH` = 32    |
| `ks_preprocess`    | bit p/g                            | `WIDTH` = 32    |
| `ks_carry_network` | Kogge-Stone tree, carry-in cell    | `WIDTH` = 32    |
| `ks_postprocess`   | sum bits and carry-out             | `WIDTH` = 32    |
| `ks_black_cell`    | `(P,G)` merge                      | –               |
| `ks_gray_cell`     | `G` merge                          | –               |
| `ks_pkg`           | `pg_t`, `ks_levels()`              | –               |

Top-level ports of `ks_adder`:

| port   | dir | width   | meaning                        |
|--------|-----|---------|--------------------------------|
| `a`    | in  | WIDTH   | operand                        |
| `b`    | in  | WIDTH   | operand                        |
| `cin`  | in  | 1       | carry-in                       |
| `sum`  | out | WIDTH   | `(a + b + cin) mod 2^WIDTH`    |
| `cout` | out | 1       | carry out of the top bit       |

Timing: the output is valid one combinational delay after the inputs change.
The longest path is XOR/AND (pre-processing), one gray cell (carry-in), L
prefix cells, and one XOR (sum): 1 + 1 + 5 + 1 = 8 cell levels at 32 bits.
Register the inputs or outputs outside the adder if it sits in a clocked
pipeline.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench              | what it checks                                                                 |
|------------------------|---------------------------------------------------------------------------------|
| `tb_ks_black_cell`     | all 16 input combinations against the group-merge truth table                  |
| `tb_ks_gray_cell`      | all 8 input combinations                                                        |
| `tb_ks_preprocess`     | p/g of every bit against the two-bit sum `a_i + b_i`, 32 bits                  |
| `tb_ks_postprocess`    | sum and carry-out for random p/carry vectors, 32 bits                           |
| `tb_ks_carry_network`  | every carry against a bit-serial ripple model; 4 bits exhaustive, 12/16/32 random with long propagate runs |
| `tb_ks_adder`          | 2, 4 and 8 bits exhaustive (including cin), 16 and 32 bits random and directed; also counts that carry-in, carry-out, the full-length propagate chain and a bit-0 generate reaching the carry-out each occurred |
| `tb_ks_adder_full`     | the default 32-bit adder, no parameter overrides, 20 000+ vectors                |

All of them pass. Each was also run against a deliberately broken copy of its
module (for example a black cell without the `P & G` term, or a tree whose
black cells take their lower group from the wrong distance) and reported
failures.

To run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
          --top-module tb_ks_adder rtl/ks_pkg.sv tb/tb_ks_adder.sv
./obj_dir/Vtb_ks_adder
```

To lint the design: `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/ks_pkg.sv rtl/ks_adder.sv`.

## Changing the width

Set `WIDTH` on `ks_adder`; the number of levels and the choice of black,
gray or pass-through at each position are derived from it. The 32-bit
configuration synthesizes to about 450 two-input gates (260 AND, 130 OR and
64 XOR).

## Relation to the original description and trust

Taken from the original design description: the three-stage split, the bit
propagate/generate equations, the black and gray cell equations, the
Kogge-Stone tree shape (checked cell by cell against its 16-bit drawing, and
against its 2- and 4-bit drawings), the 32-bit main width, and the presence of
a carry-in and a carry-out.

Choices made here:

* The carry-in handling described above. The original gives the carry
  equation with a carry-in but draws the tree without one; the extra gray cell
  reconciles the two and is exactly equivalent to the equation.
* Port names, the packed `pg_t` struct, and pure combinational logic with no
  registers.
* The triangles at complete positions in the original tree drawing are read as
  buffers and become wires. Buffering, sizing and placement are left to the
  synthesis flow.

Not covered: the original reports power and delay for 8- and 32-bit versions
in a 45 nm standard-cell flow. Those numbers depend on the cell library and
layout and cannot be reproduced from RTL. The ripple-carry adder it compares
against is not included.
