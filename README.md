# 8 x 8 Vedic multiplier (Urdhva Tiryagbhyam)

An unsigned 8-bit by 8-bit combinational multiplier built on the
*Urdhva Tiryagbhyam* ("vertically and crosswise") rule of Vedic arithmetic.
It does not add eight shifted partial products, as a shift-and-add array does.
Instead it splits each operand into halves. It forms the four half-by-half
products in parallel and adds them with a small tree of three adders. The
same split is applied one level down, so the whole multiplier is built from
sixteen identical 2 x 2 multiply blocks:

```
vedic8 (8x8)
├── 4 x vedic_mul4x4 (4x4)
│     ├── 4 x vedic_mul2x2   (2x2 multiply block)
│     └── vedic_adder_tree #(H=2)   3 ripple adders: 4, 6, 6 bits
└── vedic_adder_tree #(H=4)         3 ripple adders: 8, 12, 12 bits
```

The top is `vedic8` with ports `a[7:0]`, `b[7:0]` and `n[15:0] = a * b`.
It has no clock, no reset and no registers. Example: `a = 8'hff`,
`b = 8'hfe` gives `n = 16'hfd02`.

## Vertically and crosswise

For two digits per operand, the rule forms the result column by column:

| column | terms                         | kind      |
|--------|-------------------------------|-----------|
| 0      | A0·B0                         | vertical  |
| 1      | A1·B0 + A0·B1                 | crosswise |
| 2      | A1·B1 + carry from column 1   | vertical  |
| 3      | carry from column 2           |           |

For four digits the same pattern gives seven column sums S0..S6. Column k
adds every Ai·Bj with i + j = k, so there is one term, then two, three, four,
three, two and one. In binary each Ai·Bj is an AND gate.

`vedic_mul2x2` is exactly the 2-digit table. It uses four AND gates and two
half adders: one half adder sums the crosswise column, and the other adds the
crosswise carry to A1·B1.

## The adder tree: how half-size products are combined

This is the part that needs the most care. Write a 2H-bit operand as
`a = a_hi·2^H + a_lo`, and `b` likewise. Then

```
a·b = q_hh·2^(2H) + (q_hl + q_lh)·2^H + q_ll
      q_hh = a_hi·b_hi   q_hl = a_hi·b_lo   q_lh = a_lo·b_hi   q_ll = a_lo·b_lo
```

This is the vertical/crosswise rule applied to "digits" of H bits. The two
vertical products are q_ll and q_hh, and the two crosswise products are q_hl
and q_lh. `vedic_adder_tree #(H)` adds the four 2H-bit products with three
two-input adders:

1. **Crosswise adder**, 2H bits wide: `mid = q_hl + q_lh`. Its carry becomes
   bit 2H of `mid`.
2. **Vertical adder**, 3H bits wide:
   `outer = {q_hh, H'b0} + q_ll[2H-1:H]`. The two operands do not overlap,
   so this adder never produces a carry. It is kept as a separate adder
   because the tree is drawn that way.
3. **Final adder**, 3H bits wide: `p[4H-1:H] = outer + mid`.

The low H bits of `q_ll` skip all three adders and become `p[H-1:0]`.
Synthesis therefore reports those output bits as wired straight to an input.

A 2H x 2H product always fits in 4H bits, so neither 3H-bit adder can carry
out. Immediate assertions in `vedic_adder_tree` check this during simulation.
The unused carry-outs are the only signals the RTL leaves unconsumed.

Every adder is `vedic_adder`, a ripple-carry chain of `vedic_full_adder`
cells. The worst path through `vedic8` is: one AND gate; the two half adders
of a 2x2 block; the 4-bit crosswise adder and the 6-bit final adder of a 4x4
stage; then the 8-bit crosswise adder and the 12-bit final adder of the 8x8
stage.

## Interface and timing

| module            | ports                                                  | notes |
|-------------------|--------------------------------------------------------|-------|
| `vedic8`          | `a[7:0]`, `b[7:0]` → `n[15:0]`                         | top |
| `vedic_mul4x4`    | `a[3:0]`, `b[3:0]` → `p[7:0]`                          | |
| `vedic_mul2x2`    | `a[1:0]`, `b[1:0]` → `p[3:0]`                          | |
| `vedic_adder_tree`| `q_ll, q_hl, q_lh, q_hh[2H-1:0]` → `p[4H-1:0]`         | parameter `H`, default 2 |
| `vedic_adder`     | `x, y[W-1:0]`, `cin` → `sum[W-1:0]`, `cout`            | parameter `W`, default 6 |
| `vedic_full_adder`, `vedic_half_adder` | one-bit cells                     | |

All operands are unsigned, and every module is purely combinational. A
result is valid one propagation delay after its inputs settle. To use the
multiplier in a clocked design, register `a`, `b` and/or `n` around it.

For reference, the published design measured 167 LUTs, 96 slices and
27.65 ns for the 8 x 8 multiplier on a Xilinx FPGA. These figures have not
been reproduced here. Generic coarse synthesis of `vedic8` gives 372
single-bit gates (194 AND, 43 OR, 135 XOR) and no flip-flops.

## What is taken from the published design and what is filled in

Taken from it:
- the vertical/crosswise column rule;
- the hierarchy, in which the 2 x 2 block is instantiated to build the 4 x 4
  multiplier and the 4 x 4 multiplier to build the 8 x 8 one;
- the tree of three adders that combines four multiply blocks, and the
  direct path of the low product bits;
- the 6-bit width of the 4 x 4 stage's final adder;
- the name `vedic8` and its ports `a`, `b`, `n`;
- unsigned operands, as shown by the reference vector ff × fe = fd02.

Choices made here:
- **Which product feeds which adder.** The block diagram shows the tree but
  not which product goes where. The crosswise pair is added first, and
  `q_hh` is joined to the upper half of `q_ll`, which is the standard
  arrangement.
- **Adder type.** The published text says partial products are added with a
  Wallace tree, but its block diagram shows a tree of two-input adders. This
  RTL follows the diagram and uses ripple-carry adders. A carry-save
  (Wallace) reduction of `q_hl`, `q_lh` and `outer` followed by a single fast
  adder is the obvious alternative; it would change only `vedic_adder_tree`.
- **4 x 4 structure.** The 4 x 4 multiplier could also be built flat, from
  the seven column sums S0..S6. The hierarchical form was chosen because it
  is how the 8 x 8 design is assembled; both give the same product.
- **Gates.** AND gates form the one-bit products. Half and full adders are
  written as XOR/AND/OR equations.
- **No pipeline registers, no clock, no reset.**

## Verification

Each module has a self-checking testbench in `tb/` that compares against an
integer product or sum computed in the testbench. Each prints
`TB_RESULT checks=N failures=M` and has a clock-driven watchdog.

| testbench             | coverage |
|-----------------------|----------|
| `tb_vedic_adder`      | all 8192 inputs at W = 6; counts full carry ripple and carry-out |
| `tb_vedic_mul2x2`     | all 16 operand pairs |
| `tb_vedic_adder_tree` | all 65536 combinations of four realisable 2x2 products; counts crosswise carry |
| `tb_vedic_mul4x4`     | all 256 operand pairs |
| `tb_vedic8`           | ff × fe = fd02, then all 65536 operand pairs (exhaustive) |

`tb_vedic8` also counts how often each carry path was used, and fails if
any was never used:
- crosswise carry in the 8x8 tree;
- crosswise carry in a 4x4 tree;
- a product that needs all 16 bits;
- a zero operand.

Because every testbench is exhaustive, each one proves its block correct for
its parameter values. `vedic_adder` and `vedic_adder_tree` are checked
exhaustively only at their default widths. Their H = 4 and W = 8/12
instances are covered through `tb_vedic8`.

Run a testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          --top-module tb_vedic8 tb/tb_vedic8.sv -o sim
./obj_dir/sim
```

Lint a module with `verilator --lint-only -Wall -y rtl +libext+.sv rtl/vedic8.sv`.

## Changing it

- **Wider multipliers.** A 16 x 16 multiplier is four `vedic8` instances
  plus a `vedic_adder_tree #(.H(8))`, wired like `vedic8`.
- **Faster adders.** Replace the body of `vedic_adder`, or restructure
  `vedic_adder_tree` as a carry-save tree. The testbenches check only
  arithmetic results, so they still apply.
- **Signed operands.** These need a different scheme, such as sign-extension
  correction or a Baugh-Wooley-style array. This design is unsigned only.
