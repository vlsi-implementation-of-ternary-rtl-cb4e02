# Three-operand adder with a Sklansky prefix stage

Adding three numbers, `a + b + c`, is the core operation of modular
arithmetic in cryptographic datapaths and of linear congruential random-bit
generators. The usual hardware for it is a carry-save row of full adders,
followed by an ordinary two-operand adder. When that second adder is a
ripple-carry adder, its carry chain sets the delay.

This design fuses the two steps into one parallel prefix adder with four
stages. The only carry chain is a logarithmic-depth prefix tree. That tree
is a **Sklansky** tree, not the denser Han-Carlson tree sometimes used in
this position. Sklansky has the minimum number of levels and needs fewer
black cells, the larger of the two prefix cell types. The price is high
fan-out at the top of each block.

The adder is purely combinational: there is no clock, no register and no
reset. With the default `N = 16` it takes three 16-bit unsigned operands and
a carry input, and it returns an 18-bit sum.

```
a,b,c ──► [1 bitwise addition] ──s,cy──► [2 base logic] ──P,G──► [3 Sklansky PG tree] ──G_{i:0}──► [4 final addition] ──► sum
                                 cin ──►        │                                                    ▲
                                                └──────────────────── P ─────────────────────────────┘
```

## The four stages

**1. Bitwise addition** (`bitwise_add`). Each bit has its own full adder:
`s_i = a_i ^ b_i ^ c_i` and `cy_i = maj(a_i, b_i, c_i)`. Bits do not talk to
each other, and `a + b + c = s + 2·cy`.

**2. Base logic** (`base_logic`). This stage builds one (generate,
propagate) pair per bit position of the two-operand sum `s + 2·cy + cin`.
Position *i* pairs `s_i` with the carry from the bit below, `cy_{i-1}`:

| position | G_i             | P_i             |
|----------|-----------------|-----------------|
| 0        | `s_0 & cin`     | `s_0 ^ cin`     |
| 1 … N-1  | `s_i & cy_{i-1}`| `s_i ^ cy_{i-1}`|
| N        | `0`             | `cy_{N-1}`      |

Position N exists because the top partial carry `cy_{N-1}` lands one bit
above the operands. This design has no `s_N` to pair it with, so it passes
through as a propagate. The prefix tree therefore spans **N+1 positions**
(17 by default), and the result has N+2 bits. The largest input,
`3·(2^N − 1) + 1`, fits in N+2 bits.

**3. PG logic: Sklansky tree** (`sklansky_prefix`, built from `black_cell`
and `gray_cell`). The tree computes the carry `G_{i:0}` out of every span
i..0, using the prefix operator

```
G_{i:j} = G_{i:k} | P_{i:k} & G_{k-1:j}
P_{i:j} = P_{i:k} & P_{k-1:j}
```

At level *l*, each position *i* whose bit *l* is set combines with position
`k = ((i >> l) << l) − 1`. That is the top of the lower half of the
2^(l+1)-wide block that *i* belongs to. After level *l*, every position
holds the span from itself down to the bottom of its block. Three kinds of
cell appear:

* **gray cell**: the new span reaches bit 0, so it is already a carry. Only
  G is computed (`G = G_hi | P_hi & G_lo`).
* **black cell**: the span stops short of bit 0, so its P is still needed.
  Both G and P are computed.
* **buffer**: a position whose bit *l* is clear keeps its pair. In the
  netlist this is only a drive-strength buffer. In RTL it is a wire between
  levels, so it has no module.

The tree is generated from `W` by `generate` loops, so any width works.
Here are its sizes:

| W (positions) | levels | black cells | gray cells |
|---------------|--------|-------------|------------|
| 16            | 4      | 17          | 15         |
| 17 (default)  | 5      | 17          | 16         |

Position 16, the carry-out position, is the only position on the fifth
level. That level adds one gray cell to the critical path, compared with a
plain 16-bit tree.

**4. Final addition** (`final_add`): `S_0 = P_0`, `S_i = P_i ^ G_{i-1:0}` for
1 ≤ i ≤ N, and `Cout = G_{N:0}`. Here `P_i` is the per-bit propagate from
stage 2. The output `sum` is `{Cout, S_N … S_0}`.

## Top level and interface

`three_operand_adder #(N = 16)`:

| port  | dir | width | meaning                                  |
|-------|-----|-------|------------------------------------------|
| `a`   | in  | N     | operand, unsigned                        |
| `b`   | in  | N     | operand, unsigned                        |
| `c`   | in  | N     | operand, unsigned                        |
| `cin` | in  | 1     | carry input, added at bit 0              |
| `sum` | out | N+2   | `a + b + c + cin`; `sum[N+1]` is Cout    |

The output settles after these delays:

* stage 1: one full-adder delay;
* stage 2: one XOR/AND;
* stage 3: ceil(log2(N+1)) prefix cells;
* stage 4: one XOR.

Nothing is pipelined. To add registers, put them around the top.

The package `toa_pkg` defines `pg_t`, the packed `{g, p}` pair passed
between stages 2, 3 and 4.

## Files

| file | contents |
|------|----------|
| `rtl/toa_pkg.sv` | `pg_t` type |
| `rtl/bitwise_add.sv` | stage 1 |
| `rtl/base_logic.sv` | stage 2 |
| `rtl/black_cell.sv`, `rtl/gray_cell.sv` | prefix cells |
| `rtl/sklansky_prefix.sv` | stage 3 |
| `rtl/final_add.sv` | stage 4 |
| `rtl/three_operand_adder.sv` | top |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_three_operand_adder_widths.sv` | exhaustive test of the top at N = 1…5 |

## Verification

Each testbench compares the block with a reference built a different way.
None of them reuses the RTL equations:

* **Stage 1**: a per-bit count of ones, plus the identity `a+b+c = s+2·cy`.
* **Stage 2**: a two-bit add of the bits meeting at each position.
* **Cells**: an exhaustive truth table.
* **Tree**: a ripple carry chain, at W = 17, 16, 33, 5 and 1.
* **Stage 4**: carries made from two random numbers, checked against their
  integer sum.
* **Top**: integer addition.

`tb_three_operand_adder` drives the top at its default size. It applies
200 000 random vectors plus corner cases. It also counts how often four
things happen, and fails if any of them never does:

* the carry input is set;
* the carry-out is produced;
* the longest carry path occurs: a generate at position 0 propagates through
  every position up to N;
* the top partial carry `cy_{N-1}` reaches bit N or Cout.

`tb_three_operand_adder_widths` checks every input combination at N = 1 to 5.
This covers tree shapes in which the carry-out position sits alone on a new
level.

All testbenches print `TB_RESULT checks=<n> failures=<n>` and stop
themselves. Each also has a watchdog. To run one with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/toa_pkg.sv tb/tb_three_operand_adder.sv --top-module tb_three_operand_adder
./obj_dir/Vtb_three_operand_adder
```

All run in well under a second.

## Where this RTL makes its own choices

* **Width.** N = 16 comes from the 16-bit Sklansky tree that the design
  is drawn with. The architecture itself gives no word size.
* **Carry-out position.** The architecture states `Cout = G_{n:0}` but
  defines stage-2 pairs only from `s_i` and `cy_{i-1}`. This RTL adds
  position N with `G_N = 0` and `P_N = cy_{N-1}`. Without that position,
  the top partial carry would be lost. The cost is one more tree position,
  and one more level at N = 16.
* **Cell equations.** Both prefix cells implement the operator shown above,
  `G = G_hi | P_hi & G_lo`.
* **No registers.** The design is combinational. The architecture is
  described and measured only as a combinational delay.
* **Unsigned operands.** Signed operands would need sign extension
  outside the adder.
* **Buffer cells.** Buffers are wires here. Whether real buffers are
  needed depends on the target technology's fan-out limits. For Sklansky,
  that limit matters at the block tops.

## Comparison target

The alternative that this design replaces uses a Han-Carlson tree in stage 3.
Han-Carlson has more black cells. In an FPGA implementation, the reported
figures for the two adders are:

| stage-3 tree | area | delay  |
|--------------|------|--------|
| Han-Carlson  | 368  | 7.5 ns |
| Sklansky     | 213  | 6.8 ns |

The area is in the FPGA tool's units. These numbers come from a vendor
FPGA flow and are not reproduced by this RTL. The Han-Carlson variant is
not included here.
