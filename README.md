# Cyclic combinational GDI circuits: a 2-bit comparator and a three-function example

A combinational circuit is usually drawn without feedback. But a circuit can
contain a loop and still be combinational, as long as, for every input value,
the inputs cut the loop somewhere. When an output can reuse another output as
an extra input, many rows of its truth table become don't-cares, and the
logic gets smaller. This design pairs that idea with **Gate Diffusion Input
(GDI)** cells. A GDI cell is one pMOS and one nMOS transistor that realise a
2:1 multiplexer, which gives a small cell library of two-transistor gates.
Together the two ideas are called cyclic combinational GDI (CCGDI).

The RTL contains two CCGDI circuits:

* `ccgdi_comparator2`: a 2-bit magnitude comparator in 15 GDI cells
  (30 transistors). Its outputs A>B, A=B and A<B feed each other in a ring.
* `ccgdi_example1`: three arbitrary functions f1, f2, f3 of x1, x2, x3 in
  8 GDI cells (16 transistors). The three outputs also feed each other in a ring.

Each netlist is written as instances of a logic model of the GDI cell, so the
RTL mirrors the transistor-level structure cell for cell. In synthesis and
simulation both circuits are ordinary combinational logic with a deliberate loop.

## The GDI cell (`gdi_cell`)

The cell has three inputs. G is the common gate. P feeds the pMOS
source/drain and N feeds the nMOS source/drain. The shared drain is the
output. If G=1 the nMOS conducts, so `out = N`. If G=0 the pMOS conducts,
so `out = P`. Tying P and N to constants or signals gives the cell library
used below (G = A):

| N  | P  | function        | transistors |
|----|----|-----------------|-------------|
| 0  | 1  | INV  A'         | 2 |
| 0  | B  | F1   A'B        | 2 |
| B  | 1  | F2   A'+B       | 2 |
| 1  | B  | OR   A+B        | 2 |
| B  | 0  | AND  AB         | 2 |
| C  | B  | MUX  A'B+AC     | 2 |
| B' | B  | XOR             | 4 (with inverter) |
| B  | B' | XNOR            | 4 (with inverter) |

The logic model has full logic levels. The real cell loses a threshold
voltage on some paths, and the model does not show that or any other analog
effect.

## Why the loops are safe

Each circuit has a feedback ring through its three outputs. For a circuit to
be combinational, every output must settle to 0 or 1 for every input value,
whatever the ring held before. Consider what happens if a feedback wire were
"unknown": an AND with a 0 on its other input gives 0, and an OR with a 1
gives 1, so the unknown does not spread. If, for every input value, these
forcing inputs break the ring, the circuit is combinational. The case
analysis for each circuit follows.

### Comparator (`ccgdi_comparator2`)

With G = A>B, E = A=B and L = A<B, the ring is G ← L ← E ← G:

    G = L' (A1 B1' + A0 B0')
    L = A1' B1 + E' B0 (A1' + B1)
    E = A1' B1' (A0 xnor B0) + A1 G' (A0 + B0')

| inputs | where the ring is cut |
|--------|-----------------------|
| A1 = 0 | E = B1'(A0 xnor B0) is fixed by the inputs; L follows from E, G from L |
| A1 = 1, B1 = 0 | L = 0, so G = 1 and E = 0 |
| A1 = 1, B1 = 1, B0 = 0 | L = 0, G = A0, E = A0' |
| A1 = 1, B1 = 1, B0 = 1 | G = 0, E = A0, L = A0' |

Cell mapping (15 cells × 2 transistors = 30):

* **G path:** F1(B1,A1), F1(B0,A0), an OR of the two, then F1(L, ·).
* **L path:** F1(A1,B1), F2(A1,B1), F1(E,B0), an AND, then an OR.
* **E path:**
  * an inverter for B0', feeding an XNOR cell for A0 xnor B0;
  * F1(B1, xnor) for the low term and OR(A0, B0');
  * F1(G, ·) for the high term;
  * a MUX selected by A1 that picks between the two terms.

### Example 1 (`ccgdi_example1`)

Target truth table ({x1 x2 x3} → {f1 f2 f3}):

| x1x2x3 | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|--------|-----|-----|-----|-----|-----|-----|-----|-----|
| f1f2f3 | 011 | 101 | 101 | 000 | 101 | 110 | 010 | 010 |

The ring is f1 ← f2 ← f3 ← f1:

    f1 = x3' f2' + x2' x3      (a MUX: x3 ? x2' : f2')
    f2 = x1' x2' x3' + x1 f3'  (a MUX: x1 ? f3' : x2'x3')
    f3 = x1' f1 + x2' x3'      (a MUX: x1 ? x2'x3' : f1 + x2'x3')

* If x1 = 0, f2 is fixed by the inputs. f1 follows from f2, and f3 from f1.
* If x1 = 1, f3 is fixed by the inputs. f2 follows from f3, and f1 from f2.

The circuit uses 8 cells: three inverters (x2', f2', f3'), one F1 for x2'x3',
three MUXes for f1, f2 and f3, and one OR for f1 + x2'x3'. That is 16
transistors. For comparison, a conventional static-CMOS version of this
example takes 42 transistors, and of the comparator 88.

## Top level (`ccgdi_top`)

The two circuits stand side by side and share no signal. There is no clock
and no reset, and outputs follow inputs combinationally.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`  | in  | 2 | comparator operand A = {A1, A0} |
| `b`  | in  | 2 | comparator operand B = {B1, B0} |
| `cmp`| out | 3 | `ccgdi_pkg::cmp_result_t` {gt, eq, lt} |
| `x`  | in  | 3 | {x1, x2, x3} |
| `f`  | out | 3 | {f1, f2, f3} |

`ccgdi_pkg` holds the result struct and the transistor budgets (2 per cell,
16 and 30 per circuit). Each circuit checks its cell count against its
budget at elaboration.

## Tool messages you will see

The loops are intentional, so the tools report them:

* Verilator prints `UNOPTFLAT` (circular combinational logic) for `eq` in
  the comparator and `f1` in Example 1.
* Yosys reports a logic loop in each circuit.

Both are expected. Verilator settles the loop by re-evaluating it, and the
case analysis above guarantees a single fixed point. A static timing tool
would need the loops cut by hand, because it cannot see that the inputs
always break them.

## Where this RTL departs from, or fills in, the source description

* **Equations followed.** The comparator's A=B equation and the Example 1
  cyclic equations are used in the forms given above. Each was checked row by
  row against the cyclic truth tables, and the per-input loop cuts were
  verified.
* **Cell-level netlists.** The exact assignment of product terms to GDI cells
  is this design's own. It was chosen so that the cell counts match the
  published transistor totals of 16 and 30. For the comparator no schematic
  was available.
* **Left out:**
  * A seven-segment display decoder built the same way is mentioned, but its
    function and equations are not specified, so it is not included.
  * The input and output pad cells of the original schematics are left out.
* **Not modelled:** power, rise/fall delay and power-delay product. These
  were the original figures of merit, and they are analog quantities of the
  transistor circuit.
* **Port packing:** the bit order of `x`, `f` and `cmp` is this design's
  choice.

## Verification

Each testbench in `tb/` prints `TB_RESULT checks=N failures=M`.

* **`tb_gdi_cell`:** all eight input combinations on the cell wired as INV,
  F1, F2, OR, AND, MUX, XOR and XNOR, against the Boolean formulas.
* **`tb_ccgdi_example1`:** all 64 ordered input transitions, so a result that
  depended on the loop's previous state would show. Outputs are checked
  against the truth table above and against the three cyclic relations.
* **`tb_ccgdi_comparator2`:** all 256 ordered transitions of (A, B), against
  the integer `>`, `==` and `<`. It also checks that the outputs are one-hot
  and that the cyclic relations hold.
* **`tb_ccgdi_top`:** the end-to-end test. It runs in three phases, stepping
  every 10 ns:
  * the 8 Example-1 input combinations (80 ns);
  * the 16 comparator input combinations (160 ns);
  * 2000 random steps on both circuits.

  It counts and requires each feedback path being used (for example, f1
  formed from f2 when x3 = 0) and each way the loop is cut (the table above).
  For every step it also evaluates both equation sets in three-valued logic
  (`tb/ternary_pkg.sv`), starting from an unknown ring. It checks that
  everything becomes known and equals the circuit's outputs.

Run any of them with Verilator 5 from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
        -Irtl -Itb --top-module tb_ccgdi_top \
        rtl/ccgdi_pkg.sv tb/ternary_pkg.sv rtl/gdi_cell.sv \
        rtl/ccgdi_example1.sv rtl/ccgdi_comparator2.sv rtl/ccgdi_top.sv \
        tb/tb_ccgdi_top.sv
    ./obj_dir/Vtb_ccgdi_top

For another testbench, change `--top-module` and the last file.
`-Wno-fatal` keeps the intended loop warnings (`UNOPTFLAT`) from stopping
the build.

## How far to trust it

Each circuit is small enough that the tests cover every input value, every
ordered transition between input values, and every possible starting state of
the ring. The functional behaviour is therefore fully verified against the
truth tables. What the RTL cannot show is the analog behaviour the technique
is meant to improve: speed, power, and the reduced voltage swing of GDI pass
paths.
