# Reversible bidirectional barrel shifter

A barrel shifter built only from reversible gates. A reversible gate has as
many outputs as inputs, and its inputs can always be recovered from its
outputs. Two gates are used:

* the **Fredkin gate**, a controlled swap: `P = A`, `Q = A ? C : B`,
  `R = A ? B : C`. Either data output works as a 2:1 multiplexer selected
  by `A`, and `P` passes the select on to the next gate of a chain.
* the **Feynman gate** (CNOT): `P = A`, `Q = A ^ B`. With `B = 0` it copies
  `A`. Reversible logic allows no fan-out, so every signal that is used
  twice goes through one of these gates.

The main design, `rev_bidir_barrel_shifter`, is an (n,k) shifter. It has n
data bits and k shift-select bits, and defaults to (8,3). It performs six
operations in one combinational pass: logical, arithmetic and rotating
shifts, to the right and to the left, by 0 to 2^k − 1 places. A second,
smaller design, `rev_left_rotator_4x2`, rotates a 4-bit word left by 0 to
3 places. The top `rev_shifter_top` holds both side by side.

Everything is combinational, with no clock, reset or registers. The RTL
describes the gate netlist literally: one module instance per reversible
gate, with every unused gate output brought out as a *garbage* port. So the
netlist can be counted and checked for reversibility. It also simulates and
synthesises as ordinary logic (about 230 AND/OR/NOT cells for the top).

## Operations

| operation              | left | rot | sra | sla | result for a 3-place shift of a7..a0 |
|------------------------|:----:|:---:|:---:|:---:|---------------------------------------|
| logical right shift    | 0 | 0 | 0 | 0 | `0 0 0 a7 a6 a5 a4 a3` |
| arithmetic right shift | 0 | 0 | 1 | 0 | `a7 a7 a7 a7 a6 a5 a4 a3` |
| rotate right           | 0 | 1 | 0 | 0 | `a2 a1 a0 a7 a6 a5 a4 a3` |
| logical left shift     | 1 | 0 | 0 | 0 | `a4 a3 a2 a1 a0 0 0 0` |
| arithmetic left shift  | 1 | 0 | 0 | 1 | `a7 a3 a2 a1 a0 0 0 0` |
| rotate left            | 1 | 1 | 0 | 0 | `a4 a3 a2 a1 a0 a7 a6 a5` |

The four controls are the packed struct `rbs_pkg::ctrl_t`
(`{left, rot, sra, sla}`). `rbs_pkg::op_ctrl()` maps the enum `op_e` to
them. The arithmetic left shift keeps only the sign bit: the MSB of the
result is the original MSB, and the rest is the logical left shift.

The shift amount `shamt[k-1:0]` is a plain binary number. Stage I shifts by
2^(k-1) under `shamt[k-1]`, and the last stage shifts by 1 under `shamt[0]`.

## How a left shift becomes a right shift

Only right shifts are built. A left shift by s runs as three steps:
reverse the word, shift it right by s, and reverse the result again. For
`i7..i0` shifted left by 3, the reversed word `i0..i7` shifted right by 3
gives `0 0 0 i0 i1 i2 i3 i4`. Reversed, that is `i4 i3 i2 i1 i0 0 0 0`.

The word passes through six units in this order:

```
data_in ─► reversal unit I ─► [sign taps] ─► shifter/rotation unit ─► arith. left unit ─► reversal unit II ─► data_out
             (left)             │    │          stage I  (shamt[k-1])      (sla)             (left)
                                │    │          stage II                     ▲
                                │    │          ...      ◄── rotation unit (rot)
                                │    │          stage k  (shamt[0])          │
                                │    └─ bit n-1 ─► arith. right unit (sra) ─► fill copies
                                └────── bit 0 ───────────────────────────────┘ (sign for sla)
```

* **Data reversal unit I and II** (`data_reversal_unit`). Each is a chain
  of n/2 Fredkin gates on `left`. Gate j takes bits n−1−j and j and swaps
  them when `left = 1`. The control leaves the last gate of unit I and
  drives unit II. After unit II it is a garbage output.
* **Arithmetic right shift unit** (`ars_control_unit`). A Feynman gate taps
  the MSB of the reversed word, which is the sign when `left = 0`. A
  Fredkin gate with inputs `A = sra`, `B = 0`, `C = sign` outputs the
  *fill bit*: the sign if `sra`, else 0. A chain of 2^k − 2 Feynman gates
  then makes the 2^k − 1 copies the stages need (4 + 2 + 1 for k = 3).
* **Shifter/rotation unit** (`shifter_unit`, `shift_stage`). There are k
  stages, each with n Feynman gates and n Fredkin gates. Each input bit is
  copied once. One copy feeds its own Fredkin gate, which keeps the bit
  when the stage is off. The other copy feeds the gate SHIFT places lower,
  which takes the bit when the stage shifts. The low SHIFT copies have no
  lower gate. They go to the rotation unit instead.
* **Rotation unit** (`rotation_unit`). One Fredkin gate sits at each
  position a stage vacates: 2^(k−1) gates for stage I, down to 1 for the
  last stage, so 2^k − 1 in all. On `rot` each gate chooses between the
  bit wrapped around from the bottom of its stage and the fill bit. The
  `rot` control runs through all of these gates in stage order.
* **Arithmetic left shift unit** (`als_control_unit`). In the reversed
  word, the original sign bit sits at bit 0. A Feynman gate taps it before
  the shifter. After the shifter, a Fredkin gate on `sla` puts it into
  bit 0 of the shifted word. Reversal unit II then moves that bit to the
  MSB.

The two sign taps come before the shifter. The arithmetic left unit's
Fredkin gate comes after it. Both arithmetic units are therefore spread
across the datapath, even though each is one module.

### Control combinations outside the table

Ten of the 16 combinations of `{left, rot, sra, sla}` name no operation.
The RTL gives them what the units compute when chained as above:

* `rot` overrides `sra`, because the rotation gates replace the fill bit.
* `sra` with `left = 1` fills from the reversed word's MSB, which is the
  original bit 0.
* `sla` with `left = 0` forces bit 0 of the result to the original bit 0.

`tb_rev_bidir_barrel_shifter` checks all 16 combinations against a
word-level model of this composition (`rbs_ref_pkg::unit_ref`).

## Reversible-logic bookkeeping

Every Fredkin and Feynman output that carries no result is a garbage
output. Every constant input is an ancilla tied to 0. For an (n,k) shifter:

| quantity | formula | (8,3) |
|---|---|---|
| Fredkin gates | (2^k − 1) + n(k + 1) + 2 | 41 |
| Feynman gates | 2^k + nk | 32 |
| ancilla inputs | 2^k + nk + 1 | 33 |
| garbage outputs | k(n + 1) + 6 + (2^k − 1) | 40 |
| quantum cost | 5·Fredkin + Feynman | 237 |

The gate instances in the (8,3) netlist match the counts above: 41
`fredkin_gate` and 32 `feynman_gate`. The `garbage` port is 40 bits wide.
`rbs_pkg` holds the formulas as functions. Values for the sizes this
design is usually quoted at:

| k \ n | 4 | 8 | 16 | 32 | 64 |
|---|---|---|---|---|---|
| ancilla, k=2 | 13 | 21 | 37 | 69 | 133 |
| ancilla, k=3 | | 33 | 57 | 105 | 201 |
| quantum cost, k=2 | 97 | 165 | 301 | 573 | 1117 |
| quantum cost, k=3 | | 237 | 421 | 789 | 1525 |
| garbage, k=2 | 19 | 27 | 43 | 75 | 139 |
| garbage, k=3 | | 40 | 64 | 112 | 208 |

`tb_rbs_table_sweep` prints the full set, up to (64,6).

The order of the garbage bits in the `garbage` port, LSB first:

| bits | source |
|---|---|
| `[m*(n+1) +: n+1]` | stage m (0 = stage I): R outputs of its n Fredkin gates, then the stage select leaving the chain |
| next 2^k − 1 | R outputs of the rotation gates, stage I's first |
| next 1 | `rot` leaving the rotation chain |
| next 2 | arithmetic right unit: Fredkin R, then P (= `sra`) |
| next 2 | arithmetic left unit: Fredkin R, then P (= `sla`) |
| last 1 | `left` leaving reversal unit II |

Seven of these bits only repeat a control input, which is the nature of a
Fredkin chain's P output. Synthesis therefore reports them as wired to
inputs. The same holds for two bits of the rotator.

With the ancilla inputs at 0, the whole (8,3) circuit maps its 2^15
possible inputs onto 2^15 different `{data_out, garbage}` values. The
testbench checks this exhaustively.

## The (4,2) left rotator

`rev_left_rotator_4x2` is the small unidirectional design. It has 4
Feynman gates, 6 Fredkin gates, 4 ancillas and 6 garbage outputs, for a
quantum cost of 34.

* **Stage 1** rotates left by 1 under `s[0]`. Each bit is copied once, and
  Fredkin gate j chooses between bit j and bit j−1 (mod 4).
* **Stage 2** rotates by 2 under `s[1]`. It needs no copies: rotating 4
  bits by 2 swaps bits 0↔2 and 1↔3. That is exactly what a Fredkin gate
  does to its two data inputs, so both gates use both Q and R as results.

"Left" means towards bit 3.

## Parameters and sizes

| module | parameter | default | limits |
|---|---|---|---|
| `rev_bidir_barrel_shifter`, `rev_shifter_top`, `shifter_unit` | `N` | 8 | even |
| same | `K` | 3 | K ≥ 1 and 2^(K−1) < N |
| `data_reversal_unit` | `N` | 8 | even |
| `ars_control_unit` | `K` | 3 | |
| `shift_stage` | `N`, `SHIFT` | 8, 4 | 1 ≤ SHIFT < N |
| `rotation_unit` | `WIDTH` | 4 | |

K may be smaller than log2 N, for example (16,2) shifts 16 bits by 0..3.
All 15 sizes from (4,2) to (64,6) have been simulated.

## Where this RTL makes its own choices

* **Rotation gate count.** The rotation unit has 2^k − 1 Fredkin gates
  (7 for (8,3)). That is the number the cost formula and the total of 41
  need, and the number rotation needs. The gates are split into one
  `rotation_unit` instance per stage. This keeps each stage's wrap-around
  path feed-forward. Drawn as a single chain, the path would run back
  across the stages.
* **Copy chain.** The fill-bit copies come from a chain of Feynman gates,
  not a tree. The gate count is the same, but the chain is deeper.
* **Sign sources.** The arithmetic right unit takes its sign from the MSB
  of the reversed word. The arithmetic left unit takes its sign from
  bit 0.
* **Garbage port.** The garbage outputs and their bit order are this
  design's choice.
* **Combinational only.** There are no registers. The result is valid one
  propagation delay after the inputs change. Place registers around the
  top if a clocked interface is needed.
* **Logic, not quantum gates.** The gates are modelled as Boolean logic.
  Quantum cost is an accounting figure here, not something the RTL
  implements.

## Files

| file | contents |
|---|---|
| `rtl/rbs_pkg.sv` | `ctrl_t`, `op_e`, `op_ctrl()`, cost formulas |
| `rtl/fredkin_gate.sv`, `rtl/feynman_gate.sv` | the two reversible gates |
| `rtl/data_reversal_unit.sv` | reversal units I and II |
| `rtl/ars_control_unit.sv`, `rtl/als_control_unit.sv` | arithmetic right/left shift units |
| `rtl/shift_stage.sv`, `rtl/rotation_unit.sv`, `rtl/shifter_unit.sv` | shifter/rotation unit |
| `rtl/rev_bidir_barrel_shifter.sv` | the (n,k) bidirectional shifter |
| `rtl/rev_left_rotator_4x2.sv` | the (4,2) left rotator |
| `rtl/rev_shifter_top.sv` | both designs side by side |
| `tb/rbs_ref_pkg.sv` | word-level reference models for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_rbs_table_sweep` |

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a time-out watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rbs_pkg.sv tb/rbs_ref_pkg.sv tb/tb_rev_shifter_top.sv \
    --top-module tb_rev_shifter_top
./obj_dir/Vtb_rev_shifter_top
```

Replace the testbench name to run any other; `-Irtl` lets Verilator find
the modules. The testbenches cover:

* **Gates.** Both gates are tested exhaustively, including the check that
  each is a permutation.
* **Units.** Each unit is tested exhaustively at its (8,3) size.
* **`tb_rev_bidir_barrel_shifter`.** It checks the table above on random
  words. It checks all words × amounts × six operations against textbook
  shifts. It checks all 16 control combinations against the unit model.
  It also checks the reversibility and the garbage width.
* **`tb_rev_shifter_top`.** It runs the top at its default size and counts
  each mechanism: reversal, each stage, sign fill, wrap-around, sign keep,
  and both rotator stages. It fails if any of them never happens.
* **`tb_rbs_table_sweep`.** It builds the shifter at all 15 sizes from
  (4,2) to (64,6) and runs random operations on each. It also checks the
  cost functions.

All run in well under a second.
