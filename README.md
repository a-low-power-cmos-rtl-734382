# 32-bit magnitude comparator with logic shut-down

This comparator decides whether one unsigned 32-bit number A is larger than,
smaller than or equal to another number B. It is built to spend as little switching energy as
possible. A magnitude comparison is settled by the most significant bit
position where the operands differ. Once that position is found, no lower
bit can change the answer. The design uses this fact directly: it looks at
bit pairs from the top down, and as soon as a pair differs it *shuts down*
every lower pair. It forces the lower pairs to a fixed value at the input of
the comparison logic, so a change on those operand bits no longer causes
switching inside. Lower bits are compared only when all higher bits are equal.

The RTL models the logic function and the shut-down gating exactly. The
circuit it describes was built with pass transistors to save transistors and
power. Power, delay and transistor count are properties of that circuit and
are not modelled here (see *What the RTL does not capture*).

```
            a[31:24] b[31:24]  a[23:16] b[23:16]  a[15:8] b[15:8]  a[7:0] b[7:0]
                 |                 |                 |               |
             +-------+         +-------+         +-------+       +-------+
             | cmp8  |         | cmp8  |         | cmp8  |       | cmp8  |    first stage
             +-------+         +-------+         +-------+       +-------+    (parallel)
          A_big3 B_big3     A_big2 B_big2     A_big1 B_big1   A_big0 B_big0
                 \________________\________________/______________/
                        a = {A_big3..A_big0}, b = {B_big3..B_big0}
                                       |
                                   +-------+
                                   | cmp4  |                                  second stage
                                   +-------+
                                 a_big b_big equal
```

## The result

Every level of the design reports its result as the packed struct
`cmp_pkg::cmp_result_t`:

| field   | meaning  |
|---------|----------|
| `a_big` | A > B    |
| `b_big` | B > A    |
| `equal` | A == B   |

Exactly one field is 1 for any operand pair. The 4-bit cell checks this with
a deferred assertion. All flags are active high.

## The 4-bit shut-down cell (`cmp4`)

The basic building block compares two nibbles. It has three parts that form a
feedback loop.

**Priority shut-down, PSD (`cmp4_psd`).** This part admits the bit pairs to
the comparison logic. Pair 3, the most significant, always passes. Pair *i*
passes only while no higher pair has been found unequal:

```
admit3 = 1
admit2 = ~Uneq3
admit1 = ~(Uneq3 | Uneq2)
admit0 = ~(Uneq3 | Uneq2 | Uneq1)
a_g[i] = a[i] & admit[i]      b_g[i] = b[i] & admit[i]
EQUAL  = ~(Uneq3 | Uneq2 | Uneq1 | Uneq0)
```

A pair that is not admitted is held at 0 on both sides. Because 0 equals 0,
a held pair never raises its own `Uneq` flag and never takes part in the
selection.

**Feedback selection, FS (`cmp4_fs`).** Each admitted pair is XORed, which
gives `Uneq_i`. These flags go back to the PSD part, which is where the name
comes from. The select lines pick the most significant unequal pair:

```
Sel3 = Uneq3
Sel2 = ~Uneq3 & Uneq2
Sel1 = ~Uneq3 & ~Uneq2 & Uneq1
Sel0 = ~Uneq3 & ~Uneq2 & ~Uneq1 & Uneq0
```

**MUX (`cmp4_mux`).** The selected pair is passed onto one result line per
operand:

```
a_big = OR_i (a_g[i] & Sel_i)      b_big = OR_i (b_g[i] & Sel_i)
```

At the selected position the two bits differ. The operand that holds the 1
there is the larger one.

**The loop.** The connection PSD → FS → PSD looks like a combinational loop,
but it is not one at bit level. The gate of pair *i* depends only on the
`Uneq` flags of the pairs above it, and those flags depend only on the pairs
above *them*. The logic therefore settles from bit 3 down. The longest path
is for operands that are equal down to bit 0. Lint and synthesis report no
loop. Because shut-down already clears every pair below the first difference,
the priority terms in the `Sel` equations are redundant while the loop is
closed. They are kept so that the FS part is correct on its own, and its
testbench tests it on its own.

Example: A = 1101, B = 1010. Pair 3 is (1,1), so `Uneq3 = 0` and pair 2 is
admitted. Pair 2 is (1,0), so `Uneq2 = 1`. That shuts down pairs 1 and 0 and
selects pair 2. Since `a_g[2] = 1`, the cell reports `a_big`.

## The 8-bit sub-comparator (`cmp8`)

Two 4-bit cells are chained. The upper cell compares bits 7..4. Its `EQUAL`
output gates the lower nibble: when the upper nibbles differ, bits 3..0 are
held at 0 before they reach the lower cell, and the lower cell stays idle.
This is the same shut-down idea, one level up. A lower cell that is shut
down sees equal operands, so its result lines stay 0. The byte result is
therefore the OR of the two cells' `a_big` and `b_big` lines, and `equal` is
the AND of both cells' `equal`.

The choice of 8-bit sub-comparators made of two 4-bit cells comes from the
original circuit. How the two cells are joined is this implementation's own
choice, because the circuit does not spell it out.

## The two-stage 32-bit comparator (`cmp32`, top)

The four 8-bit sub-comparators work in parallel on bytes 3..0. Byte 3
(bits 31..24) is the most significant. Each byte produces two flags:

- both 0 when its bytes are equal;
- exactly one of them 1 when its bytes differ.

The second stage is one more 4-bit cell. It takes the four `A_big` flags as
its A input and the four `B_big` flags as its B input. The first unequal
flag pair is therefore the most significant unequal byte. The cell's PSD
part shuts out the flags of all lower bytes, and its result is the final
result. `equal` is 1 only when every byte is equal.

The first stage is not shut down from the second stage. The four bytes are
always evaluated side by side, and only the flags of lower bytes are blocked.
This keeps the long priority chain out of the first stage. The longest path
is one 8-bit sub-comparator followed by the second-stage cell.

`cmp32` has one parameter, `WIDTH = 32`. It only names the operand width,
because the structure is fixed at four bytes into a 4-bit second stage. Any
other value stops elaboration with an error.

The design is purely combinational: no clock, no reset and no latency in
cycles. Results are valid once the inputs have propagated.

## Where this RTL departs from, or adds to, the circuit

- **The value of a held pair.** The circuit only says that lower inputs are
  held. This RTL forces them to 0.
- **Select equations.** The select equations are written so that each
  `Sel_i` contains the complements of all higher `Uneq` flags. This is the
  only form that selects exactly the first unequal pair.
- **Output polarity.** The schematic of the cell marks its outputs as
  inverted, and the labels on its block diagram do not match its text
  (the line built from the A bits leads to the label "B_big"). This RTL uses
  active-high outputs, with `a_big` meaning A > B, as the functional
  description states.
- **Pass-transistor lines.** Pass-transistor wiring onto a shared line is
  modelled as AND terms into an OR.
- **How the 8-bit cells are built.** The joining of the two 4-bit cells
  inside `cmp8` is this implementation's own, as described above.
- **Result struct and assertion.** The result struct and the one-hot
  assertion are additions.

## What the RTL does not capture

The original work reports these figures for the 32-bit circuit:

- 618 transistors;
- 2.8 ns worst-case propagation delay;
- about 36 µW average power over a sequence of 112 input patterns.

All of these come from transistor-level simulation of a pass-transistor
circuit, which RTL does not describe. The circuit also uses a "shrinking
signal path" to cut delay, but its structure is not given, so it is not
modelled. An auxiliary power-measurement network was used only to measure
power in circuit simulation. It has no logic function and is not part of
this RTL.

The workload testbench below gives an RTL-level stand-in for the power
argument. It counts bit toggles at the inputs of the XOR stages with and
without shut-down.

## Testbenches

All testbenches check the device against values they compute on their own,
mostly the integer comparison of the operands. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it does |
|-----------|--------------|
| `tb_cmp4_psd` | all 4096 combinations of nibbles and `Uneq` feedback, against the admission rule |
| `tb_cmp4_fs` | all 256 nibble pairs; `Uneq` and the one-hot `Sel` |
| `tb_cmp4_mux` | all 4096 combinations of nibbles and select lines |
| `tb_cmp4` | all 256 operand pairs; result, and that pairs below the first difference reach the XOR stage as 0; counts decisions at each bit position |
| `tb_cmp8` | all 65536 operand pairs; result, and that the lower cell is shut down exactly when the upper nibbles differ |
| `tb_cmp32` | end-to-end test at the default parameters: directed cases, the 112-pattern sequence, and 20000 random pairs with the first differing bit spread evenly over 32 positions; checks the shut-down inside the second stage and inside every byte; counts decisions per byte, lower-nibble shut-downs, lower-nibble decisions, A>B, B>A and equal, and fails if any never happened |
| `tb_cmp32_power_patterns` | the 112-pattern average-case sequence: each byte decides 28 times, alternating A>B and B>A; counts toggles on the raw inputs and on the admitted inputs of all nine cells, and checks that shut-down lowers them. In one run, 3887 raw toggles fell to 2921 admitted toggles. |

Run one testbench with plain Verilator from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cmp_pkg.sv \
          tb/tb_cmp32.sv --top-module tb_cmp32 -Mdir obj_tb_cmp32
./obj_tb_cmp32/Vtb_cmp32
```

Every testbench finishes in well under a second.

## Files

- `rtl/cmp_pkg.sv`: result type and cell width.
- `rtl/cmp4_psd.sv`, `rtl/cmp4_fs.sv`, `rtl/cmp4_mux.sv`: the three parts of
  the cell.
- `rtl/cmp4.sv`: the 4-bit cell.
- `rtl/cmp8.sv`: the 8-bit sub-comparator.
- `rtl/cmp32.sv`: the top.
- `tb/`: the testbenches listed above.
