# Complex Vedic multiplier on hybrid Kogge-Stone adders

This is a combinational complex-number multiplier. Its products come from
*Vedic* multipliers, which use the "vertically and crosswise"
(Urdhva-Tiryagbhyam) rule. All of its additions are done by parallel prefix
adders:

- A plain Kogge-Stone adder forms the final real and imaginary parts.
- A hybrid Ling adder sums the partial products inside each multiplier. It
  computes the carries of odd-numbered bits with a Kogge-Stone tree and those
  of even-numbered bits with a Ladner-Fischer tree.

The aim is speed. Multiplication becomes many small crosswise products, and
every carry chain is replaced by a tree of logarithmic depth.

For `x = xr + j·xi` and `y = yr + j·yi` the top module computes

```
z_re = xr·yr − xi·yi        (two's complement, 2·OPW+1 bits)
z_im = xr·yi + xi·yr        (unsigned,         2·OPW+1 bits)
```

The operand parts are unsigned and `OPW = 8` by default. There is no clock:
the whole design is one block of combinational logic.

## Structure

```
complex_vedic_mul  (OPW = 8)
├── vedic_mul ×4  (W = OPW)          xr·yr, xi·yi, xr·yi, xi·yr, in parallel
│   ├── vedic_mul4 ×(W/4)²            every 4-bit chunk pair (4x4 Urdhva block)
│   │   then per combining level, per pair of S-bit chunks:
│   ├── hybrid_ling_adder (S)         crosswise sum  aH·bL + aL·bH
│   │   ├── pg_half_adder ×W
│   │   ├── ks_prefix_tree (W/2)      odd-indexed Ling carries
│   │   │   └── prefix_op ...
│   │   └── lf_prefix_tree (W/2)      even-indexed Ling carries
│   │       └── prefix_op ...
│   └── hybrid_ling_adder (3S/2)      upper sum
├── kogge_stone_adder (2·OPW+1)       real part: rr + ~ii + 1
│   ├── pg_half_adder ×(2·OPW+1), prefix_op (carry in)
│   └── ks_prefix_tree (2·OPW+1)
└── kogge_stone_adder (2·OPW+1)       imaginary part: ri + ir
```

The critical path runs through one `vedic_mul`, then one Kogge-Stone adder.
Inside `vedic_mul` at W = 8 it is a 4x4 leaf, an 8-bit hybrid adder, then a
12-bit hybrid adder.

`vedic_pkg` holds the default operand width, the leaf width (4) and two
functions that give the result widths.

## Parallel prefix adders

Every adder here works in three stages:

1. **Generate/propagate (the "square" cell, `pg_half_adder`).** This stage
   is a half adder per bit: `G_i = A_i & B_i`, `P_i = A_i ^ B_i`.
2. **Prefix network (the "circle" cell, `prefix_op`).** The network merges
   adjacent groups with `(G, P) = (Gi | Pi & Gj, Pi & Pj)`. After the last
   level, the group generate of span `[i:0]` is the carry out of bit `i`.
3. **Sum.** Each sum bit is `S_i = P_i ^ C_(i-1)`, one XOR per bit.

The two networks differ only in which nodes they merge. Both have
`ceil(log2 N)` levels.

| network          | at level `l`, node `i` merges with | cells per level | fan-out |
|------------------|------------------------------------|-----------------|---------|
| `ks_prefix_tree` | `i − 2^l` (when `i ≥ 2^l`)            | about N         | ≤ 2     |
| `lf_prefix_tree` | the top of the lower half of its `2^(l+1)` block (when bit `l` of `i` is set) | N/2 | up to `2^l` |

Kogge-Stone has unit fan-out and short, regular wiring per node, but it uses
many cells. Ladner-Fischer (in its minimum-depth form) uses half the cells per
level, but one node drives up to N/2 others in the last level. Nodes that do
not merge at a level pass their value straight through. These are the
"buffers" of the graph, and here they are just wires.

At 16 bits, `kogge_stone_adder` has the familiar four-level Kogge-Stone graph.
The merges start at bit 1 in level 1, bit 2 in level 2, bit 4 in level 3 and
bit 8 in level 4.

A carry input is folded into bit 0 ahead of the tree with one extra prefix
cell: `G_0' = G_0 | P_0 & cin`. Subtraction is `a + ~b + 1`.

## The hybrid Ling adder (`hybrid_ling_adder`)

This is the least obvious block. It works on **Ling pseudo-carries**. Write
`g_i = a_i & b_i` and `t_i = a_i | b_i`, and let `c_i` be the real carry out
of bit `i`. The Ling carry of bit `i` is

```
H_i = g_i | c_(i-1)
```

Since `c_i = g_i | t_i & c_(i-1)` and `g_i` implies `t_i`, the real carry is
recovered as `c_i = t_i & H_i`, with one AND gate per bit. Expanding the
recursion twice gives

```
H_i = (g_i | g_(i-1)) | (t_(i-1) & t_(i-2)) & H_(i-2)
```

`H_i` therefore depends only on `H_(i-2)`. The odd positions 1, 3, 5, … form
one prefix problem and the even positions 0, 2, 4, … form a separate one.
Each problem has W/2 elements, with element pairs

```
G*_i = g_i | g_(i-1)          P*_i = t_(i-1) & t_(i-2)
```

This first level is simpler than the usual group generate. Each chain's first
element takes the carry input:

```
H_0 = g_0 | cin
H_1 = g_1 | g_0 | t_0 & cin
```

The odd chain goes through a Kogge-Stone tree and the even chain through a
Ladner-Fischer tree. Each tree is half as wide as the adder, so it is one level
shallower and its fan-out is halved. The two outputs are interleaved back into
`H`, turned into real carries by `c = t & H`, and XORed with `a ^ b`.

`WIDTH` must be even. The default is 16; the structure is meant for 16- and
32-bit words.

## Vedic multipliers

**`vedic_mul4`: the 4x4 Urdhva-Tiryagbhyam block.** The product is formed
one column at a time. Column `k` holds every bit product `a_i·b_j` with
`i + j = k`:

- step 1 has one vertical product (`a0·b0`);
- steps 2, 3 and 4 have 2, 3 and 4 crossed products;
- steps 5 and 6 have 3 and 2;
- step 7 has one vertical product (`a3·b3`).

The column count plus the carry from the previous column gives product bit
`k` (the LSB) and the carry into the next column (the rest). The last carry is
bit 7.

**`vedic_mul`: the W x W multiplier.** It applies the same rule to halves.
For S-bit chunks `a = {aH, aL}` and `b = {bH, bL}`, four half-width products
give the two vertical products `aL·bL` and `aH·bH` and the two crosswise
products `aH·bL` and `aL·bH`. Two hybrid Ling adders combine them:

```
cross = aH·bL + aL·bH                       S-bit adder, carry kept
upper = {aH·bH, aL·bL >> S/2} + cross       3S/2-bit adder (cannot overflow)
p     = {upper, aL·bL[S/2-1:0]}
```

The module is built as a generate loop over levels. Level 0 multiplies every
4-bit chunk of `a` by every 4-bit chunk of `b` with `vedic_mul4`. Each later
level combines four products from the level below into one product of chunks
twice as wide, until only the W x W product remains. At W = 8 that means four
`vedic_mul4` blocks, then one 8-bit and one 12-bit adder. W must be 4 times a
power of two (4, 8, 16, 32, …).

## Interfaces and parameters

All blocks are combinational: outputs follow inputs after the logic delay.
None has a clock, reset, handshake or latency in cycles.

| module | parameter (default) | ports |
|---|---|---|
| `complex_vedic_mul` | `OPW` (8) | `x_re, x_im, y_re, y_im [OPW-1:0]` in; `z_re` signed `[2·OPW:0]`, `z_im [2·OPW:0]` out |
| `vedic_mul` | `W` (8) | `a, b [W-1:0]` in; `p [2W-1:0]` out |
| `vedic_mul4` | none | `a, b [3:0]` in; `p [7:0]` out |
| `hybrid_ling_adder` | `WIDTH` (16, even) | `a, b [WIDTH-1:0]`, `cin` in; `sum [WIDTH-1:0]`, `cout` out |
| `kogge_stone_adder` | `WIDTH` (16) | same as above |
| `ks_prefix_tree`, `lf_prefix_tree` | `N` (16) | `g_in, p_in [N-1:0]` in; `g_out, p_out [N-1:0]` (group over `[i:0]`) out |
| `prefix_op` | none | `gi, pi, gj, pj` in; `g, p` out |
| `pg_half_adder` | none | `a, b` in; `g, p` out |

`z_re` and `z_im` are one bit wider than a product, so no input overflows.
The carry outs of the two final adders, and the carry out of the upper adder
in `vedic_mul`, are always redundant. They are left unconnected, which is why
lint reports them as unused.

## Design choices

Some of the design is taken from the architecture this RTL implements:

- the three-stage prefix adder, with its cell equations;
- the 16-bit Kogge-Stone graph;
- the Ling-carry adder with Kogge-Stone on odd bits and Ladner-Fischer on
  even bits;
- the seven-step 4x4 vertical-and-crosswise multiplication;
- the 8-bit operand size.

The following points are this design's own choices:

- **Complex arithmetic.** The standard four-multiplier, two-adder form is
  used. Operand parts are unsigned, because the Vedic core multiplies unsigned
  numbers. Signed parts would need a sign-magnitude wrapper or a signed Vedic
  variant.
- **Adder roles.** Plain Kogge-Stone adders do the final real and imaginary
  combination. Hybrid Ling adders sum the partial products inside the
  multipliers.
- **Composition of wide multipliers.** The way the four
  sub-products are recombined, and the widths of the two adders, are this
  design's own.
- **Ling pre-processing.** The equations above are one standard formulation
  of the "modified" Ling carries. The carry input in both adder types was
  added so that subtraction is possible.
- **Fixed tree assignment.** The odd/even split of the hybrid adder is
  fixed: odd bits use Kogge-Stone and even bits use Ladner-Fischer. It is not
  selectable.
- **Column sums in the 4x4 leaf.** Each column is written as a small integer
  sum plus the carry in. Synthesis chooses the compressors.
- **No pipeline registers.** Any pipelining is left to the integrator.

The arithmetic is exhaustively or randomly checked against integer
references, as listed below. No timing, area or power figures are claimed
for this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. It ends by printing
`TB_RESULT checks=N failures=M` and has a time watchdog.

| testbench | what it covers |
|---|---|
| `tb_pg_half_adder`, `tb_prefix_op` | all input combinations |
| `tb_ks_prefix_tree`, `tb_lf_prefix_tree` | N = 1, 5, 8, 16; 3,000 random and corner vectors against a serial scan |
| `tb_kogge_stone_adder` | WIDTH = 1, 4, 8, 16, 17, 32, 64; 20,000 vectors each (corners, long carry chains, random carry in) |
| `tb_hybrid_ling_adder` | WIDTH = 2, 4, 8, 12, 16, 32, 64; same vectors |
| `tb_vedic_mul4` | all 256 products |
| `tb_vedic_mul` | W = 4 and 8 exhaustively, W = 16 and 32 with 100,000 products each |
| `tb_complex_vedic_mul` | default configuration end to end: 200,000 complex products (corner cases first) |
| `tb_complex_vedic_mul_w16` | OPW = 16 end to end: 100,000 complex products (corner cases first) |

`tb_complex_vedic_mul` also counts how often each case occurs, and fails if
any one never does:

- a negative real part;
- a positive real part;
- an imaginary part that carries into bit 16;
- a carry out of a crosswise adder inside the multipliers.

To run one testbench with Verilator 5, name the package and the testbench.
Verilator finds the other modules by their file names:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/vedic_pkg.sv tb/tb_complex_vedic_mul.sv --top-module tb_complex_vedic_mul
./obj_dir/Vtb_complex_vedic_mul
```

Every testbench finishes in well under a second of simulation time.

## Changing the design

- **Operand width.** Set `OPW` on `complex_vedic_mul` to any 4·2^k value; the
  result widths follow.
- **Adder type.** To swap the adder in a given place, replace the
  instantiation. Both adder modules have identical ports.
- **Pipelining.** Registers between the multipliers and the final adders are
  the natural first cut.
