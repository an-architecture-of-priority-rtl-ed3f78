# Priority-based reversible 4-bit magnitude comparator

This comparator takes two unsigned 4-bit words A and B and raises exactly one
of three flags: `aeb` (A = B), `agb` (A > B) or `alb` (A < B). It is built only
from *reversible* gates. These are n-input, n-output gates whose outputs are a
permutation of their inputs, so no information is thrown away. The design
rests on two ideas:

* **Compute only two relations.** Exactly one of the three relations is
  true. So only "equal" and "greater" are computed from the operands. "Less"
  is their NOR, produced by one extra reversible gate (the BJN gate) at the
  very end.
* **Let the most significant differing bit decide.** Per bit, a small stage
  produces `x[i] = A[i] xnor B[i]` and `g[i] = A[i] & ~B[i]`. A cascade of
  multiple-control Toffoli gates then combines them in priority order, from
  bit 3 down to bit 0.

The RTL describes the reversible netlist gate by gate. It simulates and
synthesises as ordinary combinational logic. It has no clock, no reset and no
registers: the outputs follow the inputs after the combinational delay.

## Reversible gates

Each gate is a module with inputs `a b c` and outputs `p q r` (the Feynman
gate has two of each). Inputs tied to 0 or 1 are *constant inputs*. Outputs
that nothing uses are *garbage outputs*; a reversible circuit has to keep
them.

| module         | gate      | outputs |
|----------------|-----------|---------|
| `feynman_gate` | Feynman (CNOT) | P=A, Q=A^B |
| `tr_gate`      | TR        | P=A, Q=A^B, R=(A&~B)^C |
| `peres_gate`   | Peres     | P=A, Q=A^B, R=(A&B)^C |
| `toffoli_gate` | Toffoli   | P=A, Q=B, R=(A&B)^C |
| `r_gate`       | R         | P=A^B, Q=A, R=(A&B)^~C |
| `urg_gate`     | URG       | P=(A\|B)^C, Q=B, R=(A&B)^C |
| `fredkin_gate` | Fredkin (controlled swap) | P=A, Q=A?C:B, R=A?B:C |
| `bjn_gate`     | BJN       | P=A, Q=B, R=C^(A\|B) |
| `mct_gate`     | Toffoli with NC controls | controls pass through, target ^= AND(controls) |

The TR gate is central. One TR gate fed (A, B, 0) yields both `A^B` and
`A&~B`, which is all a bit position needs.

The BJN gate is the closing stage. It is fed (equal, greater, 1) and its R
output is NOR(equal, greater) = less. The published description gives only
its role and its labelled inputs and outputs. The form `R = C ^ (A|B)` is
this implementation's choice: it is the simplest reversible gate that has
those outputs. The other gates use their usual definitions from the
reversible-logic literature.

## One-bit stages

`comp4_rev` uses the bare TR gate as its stage by default. The other six are
complete one-bit comparators. Each one also drives its own `lt` output and
its garbage lines.

| `CELL` value | stage | constant inputs | garbage |
|---|---|---|---|
| `CELL_TR` (default) | TR(A,B,0), then NOT on Q | 0 | TR's P |
| `CELL_TR_FEYNMAN` (`cmp1_tr`) | TR(A,B,0); Feynman(1, A^B) inverts; BJN | 0,1,1 | 2 |
| `CELL_PERES` (`cmp1_peres`) | Feynman(1,B)=B'; Peres(A,B',0) gives xnor and A&B'; BJN | 1,0,1 | 2 |
| `CELL_TOFFOLI` (`cmp1_toffoli`) | Feynman(1,B); Toffoli(A,B',0) gives A&B'; Toffoli(1,B',A) gives xnor; BJN | 1,0,1 | 2 |
| `CELL_R` (`cmp1_r`) | Feynman(1,B); R(A,B',1) gives xnor, A, A&B'; BJN | 1,1 | 1 |
| `CELL_URG` (`cmp1_urg`) | Feynman(1,B); URG(0,B',A) gives xnor; URG(B',A,0) gives A&B'; BJN | 1,0,0,1 | 3 |
| `CELL_FREDKIN` (`cmp1_fredkin`) | Feynman fan-out of A and B; Fredkin(B,1,0) gives B'; Fredkin(A,B',B) gives xnor; Fredkin(B,A,0) gives A&B'; BJN | 0,0,1,0,0,1 | 5 |

A few tricks recur across the cells:

* A Feynman gate whose control is tied to 1 acts as an inverter.
* A Toffoli gate with one control tied to 1 acts as a CNOT.
* A URG gate with A = 0 reduces to an XOR.
* A Fredkin gate fed the constants (1, 0) on its data inputs turns into an
  inverter plus a copy.

The published diagrams give the gates and constants of each cell. The order
of the lines into each gate was chosen so that every cell produces the three
relations and uses the stated number of constant inputs and garbage outputs.
There is one exception, the Fredkin cell. Its wiring is not published, so
its arrangement is this implementation's own. It has one constant 1 and one
garbage line fewer than the published counts (seven constants and six garbage
outputs).

## The priority network (`prio_net`)

This part of the design carries the "priority" idea. For N = 4, with `x` and
`g` from the bit stages:

```
A=B : Toffoli, controls x3 x2 x1 x0,  target 0   -> x3 x2 x1 x0
t3  = g3                                          (no gate)
t2  : Toffoli, controls x3 g2,        target 0   -> x3 g2
t1  : Toffoli, controls x3 x2 g1,     target 0   -> x3 x2 g1
t0  : Toffoli, controls x3 x2 x1 g0,  target 0   -> x3 x2 x1 g0
NOT on t3..t0
A>B : Toffoli, controls ~t3..~t0,     target 1   -> 1 ^ AND(~t) = t3|t2|t1|t0
BJN(A=B, A>B, 1)                                 -> A=B, A>B, A<B
```

Term `t[i]` is true exactly when bit i is the most significant bit where the
operands differ and A has the 1 there. At most one `t[i]` can be true, so
their OR is A > B. Reversible logic has no plain OR gate. The OR is therefore
built with De Morgan's law: invert every term, AND them onto a line that
starts at 1, and the target then holds NOT(AND(~t)) = OR(t).

The Toffoli gates pass their control lines through unchanged. In the RTL
these pass-through copies are wired to local signals that nothing reads, so
the linter reports them as unused. Those warnings are expected.

`prio_net` and `comp4_rev` take a width parameter `N`. The published design
is 4 bits wide. Other widths extend the same cascade: term `t[i]` uses
N−i controls. This generalisation is an addition of this implementation.

## Top level: `comp4_rev`

```systemverilog
comp4_rev #(.N(4), .CELL(rev_cmp_pkg::CELL_TR)) u_cmp (
  .a(a), .b(b), .aeb(aeb), .agb(agb), .alb(alb));
```

* The ports are the 11 pins of the published FPGA implementation: 4 + 4
  operand bits and 3 flags.
* `rev_cmp_pkg` defines the `cell_e` enum.
* Every `CELL` value gives the same function. Only the internal gate
  structure changes.
* An immediate assertion, kept out of synthesis, checks that exactly one flag
  is high.

The published FPGA result for this configuration is 5 combinational ALUTs,
11 pins and 0 registers on a Stratix II device, running at 84 MHz. A generic
Yosys mapping to 6-input LUTs of the default configuration gives 8 LUTs. The
synthesiser collapses the reversible structure into plain comparator logic,
so none of the reversibility shows up in an FPGA netlist. These modules
describe the circuit's structure; they are not a reversible implementation
in silicon.

## Departures and open points

* **BJN gate equations:** chosen here (`R = C ^ (A|B)`). Only its role and
  its inputs and outputs are published.
* **Peres, Toffoli, R, URG and Fredkin gates:** standard textbook
  definitions; the description does not define them.
* **Line order inside the Peres, Toffoli, R and URG cells:** chosen to match
  the published constant and garbage counts and the published diagrams.
* **Fredkin cell:** an arrangement of its own, as described above.
* **Network diagrams:** the small boxes on some lines of the 4-bit network
  are read as NOT gates, and the constant lines are assigned as in the table
  above. That is the only arrangement that produces the labelled outputs.
* **Not modelled:** gate counts, quantum cost and garbage totals. The
  description uses them as figures of merit; they are not hardware behaviour.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* **Gates** (`tb_*_gate`): all input combinations against truth tables worked
  out from the equations above, plus a check that the outputs form a
  permutation, i.e. that the gate is reversible.
* **One-bit cells** (`tb_cmp1_*`): all four input pairs against the one-bit
  comparator truth table. They also check the values of the garbage lines,
  and that the four input pairs give four different output patterns, so no
  information is lost.
* **`tb_prio_net`:** all 256 operand pairs at N = 4, and 2000 random pairs at
  N = 6.
* **`tb_comp4_rev`:** all seven stage types at N = 4 on all 256 pairs. It
  also runs an 8-bit instance on random pairs. It counts how often the result
  was decided at bit 3, 2, 1 or 0 or by full equality, and fails if any of
  those cases never occurs.
* **`tb_comp4_full`:** the default configuration, with no parameter
  overrides. It replays the operand sequence of the published waveform (15
  pairs, 20 ns apart), then runs all 256 pairs.

## Simulating

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/rev_cmp_pkg.sv tb/tb_comp4_full.sv --top-module tb_comp4_full
./obj_dir/Vtb_comp4_full
```

Replace `tb_comp4_full` with any other testbench name. `rev_cmp_pkg.sv` has
to be listed first, because it cannot be found through `-y`.
