# Reversible and quantum 1-bit arithmetic/logic units

A reversible circuit maps its inputs to its outputs one-to-one. No
information is lost, so it can be run backwards, and it can be carried over
to a quantum computer unchanged. Ordinary adders and ALUs are not reversible:
an AND gate has four input patterns and only two output values. To make such
a function reversible, you give the circuit as many outputs as inputs. The
extra outputs are *garbage* outputs, and where they are not enough you add
*constant* inputs. The circuit is then built as a chain of
multiple-control Toffoli (MCT) gates.

This library holds very small circuits of that kind: minimum-gate MCT
circuits for a half and a full adder/subtractor and for four 1-bit ALUs and
logic units. It also holds the quantum versions of all six, where
every Toffoli gate is replaced by elementary NOT, CNOT, controlled-V and
controlled-V† gates (the NCV library). The two quantum cost figures below
are NCV gate counts. The circuits are small because of two freedoms in how
the function is specified:

* **Operation assignment.** You may choose which selector code picks which
  operation. The SUB of one ALU can sit on code `10` or on code `11`.
* **Output permutation.** You may choose which line carries which result.

Some choices give a circuit with fewer gates. All circuits here are the
smallest found over both freedoms.

Everything is combinational SystemVerilog: no clock, no reset, no state.

## The circuits

| module | function | lines | constant in | garbage out | MCT gates | NCV gates |
|---|---|---|---|---|---|---|
| `rev_half_addsub` | half adder (S=0) / half subtractor A−B (S=1) | 4 | 1 (c = 0) | 2 | 3 | 7 (`qc_half_addsub`) |
| `rev_full_addsub` | full adder (S=0) / full subtractor A−B−C (S=1) | 4 | 0 | 2 | 5 | 9; 8 counting a merged pair (`qc_full_addsub`) |
| `rev_alu` | 00 ADD, 01 OR, 10 SUB, 11 AND | 4 | 0 | 2 | 5 | 17; 15 counting merged pairs (`qc_alu`) |
| `rev_lu` | 00 XOR, 01 OR, 11 AND (10 unused) | 4 | 0 | 3 | 3 | 11 (`qc_lu`) |
| `rev_mini_alu` | 00 OR, 01 ADD, 10 AND, 11 ID | 4 | 0 | 2 | 5 | 15 (`qc_mini_alu`) |
| `rev_gupta_lu` | 0, 1, AND, NAND, XOR, XNOR, OR, NOR | 5 | 0 | 4 | 3 | 15; 14 counting a merged pair (`qc_gupta_lu`) |

`rev_alu` is the main result: a 1-bit ALU that has both addition and
subtraction, in five gates on four lines, with no constant input.
`rev_lu` is the logic-only version of it; NOT is XOR with B = 1.
`rev_mini_alu` and `rev_gupta_lu` are well-known benchmark ALUs,
re-synthesised to fewer gates (5 instead of 6, and 3 instead of 18).

### Reading the gate lists

Each module's opening comment gives its circuit as a gate list in the usual
notation. `(x y)` is a CNOT with control x and target y. `(x y z)` is a
Toffoli with controls x and y and target z. Lines are numbered from 0 at
the top of the circuit drawing. The full adder/subtractor on lines
S, A, B, C = 0, 1, 2, 3 is

    (1 0) (3 2) (2 1) (3 0) (0 2 3)

It works in three steps. The first three CNOTs leave A ⊕ B ⊕ C on line A,
which is the sum or the difference. The fourth CNOT leaves S ⊕ A ⊕ C on
line S. The final Toffoli then sets C to C ⊕ (S⊕A⊕C)(B⊕C). For S = 0 this
is the majority of A, B and C, which is the carry. For S = 1 it is the
majority of ¬A, B and C, which is the borrow. The other two lines come out
as garbage.

All four output lines are ports, garbage included, so each module is the
whole reversible function. You can check that it is a bijection on its
2^n input patterns; every testbench does.

### Which line carries the result

The port names follow the labels of the original drawings: `g1`, `g2`, … for
garbage and `o1`, `o2` for results. The exceptions are listed here.

* `rev_alu`: `o1` (line S2) is the carry for ADD and the borrow for SUB.
  `o2` (line B) is the sum, the difference, the OR or the AND.
* `rev_mini_alu`: the results come out on lines A (`o1`) and B (`o2`).
  For ADD, `o1` is the carry and `o2` the sum. For OR and AND the result is
  on `o2`. For ID, `o1` = A and `o2` = B. The original drawing labels the
  S2 and A lines as the results, but the gates it shows put them on A and B.
  The module follows the gates.
* `rev_gupta_lu`: the result `y` is line S1. Line S1 complements the
  result. Lines S2 and S3 choose the operation: 00 gives constant 0,
  01 AND, 10 XOR and 11 OR. The same operation set is often tabulated with
  the selectors named in a different order.
* The Mini-ALU and the Gupta unit are usually specified with other selector
  codes, for example ID on `00` and ADD on `11` for the Mini-ALU. The
  operation sets are the same; only the code assignment differs, and the one
  used here is the one that gives the small circuit.
* `rev_half_addsub`: if the constant input `c` is 1, the result is still
  defined, because every input pattern has an output. It is the c = 0
  result with carry/borrow inverted.

## Quantum circuits in four-valued logic

The `qc_*` modules are the NCV versions of the six circuits, and
`toffoli_ncv` holds the four standard 5-gate NCV versions of the Toffoli
gate. The gate sequences of `qc_half_addsub`, `qc_full_addsub` and `qc_alu`
are published reduced circuits. Those of `qc_lu`, `qc_mini_alu` and
`qc_gupta_lu` are this library's own, described below. Besides NOT and
CNOT they use controlled V = √NOT and V†, which have no Boolean meaning on
their own. This part is the
least obvious, so it gets the most detail here.

The quantum circuits are modelled exactly in a four-valued logic. Start a
line in |0⟩ or |1⟩ and apply only NOT, CNOT, CV and CV†. As long as every
control a gate sees is |0⟩ or |1⟩, each line stays in one of four states:
|0⟩, |1⟩, V|0⟩ or V|1⟩. The following rules cover every case, with no
phase lost:

| gate on target | \|0⟩ | \|1⟩ | V\|0⟩ | V\|1⟩ |
|---|---|---|---|---|
| NOT | \|1⟩ | \|0⟩ | V\|1⟩ | V\|0⟩ |
| V   | V\|0⟩ | V\|1⟩ | \|1⟩ | \|0⟩ |
| V†  | V\|1⟩ | V\|0⟩ | \|0⟩ | \|1⟩ |

The rules follow from V·V = NOT and V·V† = 1, and from NOT commuting with V.
`rev_pkg::qline_t` holds one line as `{v, b}`: `v` = 1 means the line is
V|b⟩. `ncv_gate` applies one gate to a bus of such lines.

If a gate's control is itself in a V-state, the two lines become entangled,
and four values cannot describe that. `ncv_gate` then leaves the target
unchanged and raises `ctrl_superposed`. No circuit here raises it for basis
inputs, and the testbenches check that. So for every Boolean input these
modules give the exact output state of the quantum circuit, and it is always
a basis state equal to the MCT circuit's output. This is a classical model
of the quantum circuit that can be synthesised. It is not a quantum device.

The gate count of a quantum circuit is its quantum cost. Some pairs of
adjacent gates count as one merged two-qubit gate under a common costing
rule: a CNOT and a CV (or CV†) on the same two lines, pointing in opposite
directions, such as CV a→b followed by CNOT b→a. Each module's comment names
its mergeable pairs: one in `qc_full_addsub`, two in `qc_alu` and one in
`qc_gupta_lu`. Merging is only a cost convention. The modules keep both
gates of each pair.

### How the quantum circuits are derived

Each Toffoli gate is replaced by one of the four 5-gate sequences in
`toffoli_ncv`. The result is then shortened with three rules:

* **Moving.** Two adjacent gates can swap if neither one's target is a
  control of the other.
* **Deletion.** Two equal CNOTs cancel, and so do a CV and a CV† on the
  same lines.
* **Merging.** Two equal CVs, or two equal CV†s, make a CNOT. A CNOT
  followed by a CV† with the same control and target makes a CV, and a
  CNOT followed by a CV makes a CV†.

`qc_mini_alu` shows the gain. Its first and last Toffoli gates are the same
gate, so one CNOT from each of their expansions can be moved together
across the middle Toffoli and deleted. That brings the cost from 17 to 15.
For `qc_lu` and `qc_gupta_lu` the plain expansion is used, which costs 11
and 15 gates.

Costs of 10 and 14 under the merged-gate rule are often quoted for the LU
and the Mini-ALU. The sequences here do not reach them, because they
contain no adjacent mergeable pair. For the LU, every 3-gate circuit of
CNOT and Toffoli gates that computes it was tried, with all four Toffoli
expansions and the rules above, and none costs less than 11. For the
Mini-ALU, the same holds for every 5-gate circuit of two CNOTs and three
Toffolis: none costs less than 15. In `qc_gupta_lu`, a CNOT S2→A followed
by a CV A→S2 forms one merged gate, which gives the usual cost of 14.

## Files

* `rtl/rev_pkg.sv`: the `qline_t` line type, the `ncv_op_e` gate enum,
  the four-valued gate functions, and `line_bit(i)`, which builds MCT
  control masks from line numbers.
* `rtl/mct_gate.sv`: one Toffoli-k gate on an N-line bus (parameters `N`,
  `CTRL` mask, `TGT`).
* `rtl/ncv_gate.sv`: one NCV gate on an N-line bus of `qline_t`
  (parameters `N`, `OP`, `CTRL`, `TGT`).
* `rtl/rev_*.sv`: the six MCT circuits, each a chain of `mct_gate`s.
* `rtl/qc_*.sv`, `rtl/toffoli_ncv.sv`: the NCV circuits. Each holds its gate
  list as three parameter arrays (operation, control, target) that drive a
  generate loop of `ncv_gate`s.
* `rtl/rev_alu_suite.sv`: the top. It instantiates every circuit side by
  side; they are independent 1-bit units and are not connected. Each
  reversible circuit takes and returns its lines as one bus, with bit i =
  line i.
* `tb/tb_<module>.sv`: one self-checking testbench per module, and
  `tb/tb_rev_alu_suite.sv` for the whole top.

To build a new circuit from a gate list, chain `mct_gate` instances, as in
`rev_alu.sv`. For a quantum circuit, edit the three arrays of a `qc_*`
module.

## Verification

Every testbench tries all input patterns, which is at most 32 per circuit.
It compares the outputs with values it works out itself:

* the arithmetic (A+B+C, A−B−C with borrow) or the logic operation selected;
* for the two adder/subtractors, the complete published permutation of the
  16 input patterns, for example `0 14 6 9 12 3 11 5 8 7 15 1 4 10 2 13`
  for the full adder/subtractor;
* that the outputs form a bijection;
* for the NCV circuits, that every line ends in a basis state, that no
  control was superposed, and that the lines equal the MCT circuit's;
* for `toffoli_ncv`, also targets in a V-state and a superposed control.

`tb_rev_alu_suite` runs all of this through the top. It counts how often
each operation of each unit, a carry, a borrow, a Toffoli on a V-state
target and a flagged control occurred, and it fails if any count is zero.
Each testbench prints `TB_RESULT checks=N failures=M`.

To run one with Verilator:

    verilator --binary --timing --assert -y rtl -Irtl rtl/rev_pkg.sv \
        tb/tb_rev_alu_suite.sv --top-module tb_rev_alu_suite -Mdir obj
    ./obj/Vtb_rev_alu_suite

## Trust and limits

* The gate lists of the two adder/subtractors match their published truth
  permutations bit for bit. For the ALUs and the NCV circuits, the gate
  lists were read from circuit drawings, and the testbenches confirm that
  they compute the stated operations.
* Two drawings disagree with themselves: the Mini-ALU's output labels and
  the Gupta logic unit's selector names. The modules follow what the gates
  compute, as described above.
* Only 1-bit units exist. Chaining full adder/subtractor cells into a
  multi-bit ripple unit is easy, by wiring `carry_borrow` to the next `c`,
  but it is not included.
* The NCV sequences of the logic unit, the Mini-ALU and the Gupta unit
  were derived here, not published. They are verified exhaustively. For the
  LU and the Mini-ALU, the merged-gate costs are one worse than the
  published figures.
* Only the final circuits are built. The larger ALU circuits that lead up
  to the 5-gate one (7 gates with the first operation assignment, 6 gates
  after reordering the operations or the outputs) are not included.
* After synthesis, many garbage outputs are plain copies of an input or of
  a simple function, for example the B line of the half adder. This is
  expected in reversible logic, where nothing may be thrown away.
* The exhaustive search and the quantum-cost reduction that found these
  circuits are software, and are not part of this RTL.
