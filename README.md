# Two-dimensional crossbar switch scheduler

A crossbar switch can connect any of its input ports to any of its output
ports, but in a given moment each input may drive only one output and each
output may listen to only one input. Something has to look at all pending
requests and pick a set of connections that obeys that rule. This is that
scheduler, for a 3x3 crossbar by default: it takes a request matrix and
returns an allocation matrix with at most one grant in every row (input port)
and every column (output port).

The scheduler is a grid of identical gate-level cells, one per crossing, with
no clock, no state and no central controller. The decision ripples across the
grid from the top-left corner. The design is given in two gate sets: ordinary
AND gates with inverters, and the majority gates with inverters that
quantum-dot cellular automata (QCA) offer. Both are included and compute the
same function.

## The scheduler cell

Cell (i,j) means "input i is connected to output j". Each cell has three
inputs and three outputs:

| signal   | dir | meaning |
|----------|-----|---------|
| request  | in  | input i asks for output j |
| r1       | in  | column j is still free (comes from the cell above) |
| r3       | in  | row i is still free (comes from the cell to the left) |
| allocate | out | the crossing is granted |
| r2       | out | column j is still free (goes to the cell below) |
| r4       | out | row i is still free (goes to the cell to the right) |

```
allocate = request & r1 & r3
r2       = r1 & ~allocate
r4       = r3 & ~allocate
```

A cell that does not allocate passes "free" through in both directions. A
cell that allocates pulls both outgoing signals low. Every cell below it in
the column and every cell to its right in the row then sees its resource as
taken. Truth table (complete):

| request | r1 | r3 | allocate | r2 | r4 |
|---|---|---|---|---|---|
| 0 | 0 | 0 | 0 | 0 | 0 |
| 0 | 0 | 1 | 0 | 0 | 1 |
| 0 | 1 | 0 | 0 | 1 | 0 |
| 0 | 1 | 1 | 0 | 1 | 1 |
| 1 | 0 | 0 | 0 | 0 | 0 |
| 1 | 0 | 1 | 0 | 0 | 1 |
| 1 | 1 | 0 | 0 | 1 | 0 |
| 1 | 1 | 1 | 1 | 0 | 0 |

In a gate-level schematic of this cell the ports also go by compass names:
n1 = r1 (north), w1 = r3 (west), s1 = r2 (south), e1 = r4 (east),
g1 = allocate (grant) and r1 = request. Note that r1 is the request there,
not the R1 line.

## What the grid computes

`ripple_sched` places N_IN x N_OUT cells. Each cell's r2 drives r1 of the
cell below, and each cell's r4 drives r3 of the cell to its right. The top
row's r1 inputs and the first column's r3 inputs are tied to 1, so at the
start every port is free.

Cell (i,j) is granted exactly when three things hold:

- it requests;
- no cell above it in column j was granted;
- no cell to its left in row i was granted.

That is the same as visiting the cells row by row, left to right, and
granting every request whose row and column are both still unused. Three
consequences follow:

- **The match is conflict-free and maximal.** A refused request always has a
  granted cell in its row or its column, so no further connection could be
  added.
- **Priority is fixed.** Input 0 is served first, and inside a row the lowest
  output wins. Nothing rotates, so a heavily requesting low-numbered input
  can starve the others. Fairness is not part of this design.
- **It is not a maximum match.** Requests {(0,0), (0,1), (1,0)} give only
  (0,0). (0,1) + (1,0) would serve two.

Example, 1-based cell numbers. Requests are at (1,1), (1,2), (1,3), (2,1),
(2,2), (3,2) and (3,3). The grants are (1,1), (2,2) and (3,3). (1,2) and
(1,3) lose to (1,1) in their row. (2,1) loses to (1,1) in its column. (3,2)
loses to (2,2) in its column.

The bottom row's r2 and the last column's r4 are the grid's outputs
`col_out` / `row_out`. `col_out[j] = 1` means output j stayed unallocated
(its col_in was 1). `row_out[i] = 1` means input i stayed unallocated. The
3x3 scheduler leaves them unconnected. They are ports here so that a larger
scheduler can be made by chaining grids: feed `col_out` of one grid into
`col_in` of the grid below, and `row_out` into `row_in` of the grid to the
right. Driving a `col_in` or `row_in` bit low takes that port out of
scheduling, for example an output whose queue is full.

## Majority-gate (QCA) form

QCA has no AND gate. It offers only the three-input majority gate
M(p,q,r) = pq + qr + pr and the inverter. Wider majority gates are built the
same way. Holding majority inputs at 0 (a cell fixed at polarisation -1)
turns a majority gate into an AND:

```
allocate = M5(r1, request, r3, 0, 0)
r2       = M3(r1, ~allocate, 0)
r4       = M3(r3, ~allocate, 0)
```

That is three majority gates and two inverters per cell. A 3x3 grid
therefore has 27 majority gates and 18 inverters, which matches the gate
budget of the QCA layout. `sched_cell_maj` writes the cell this way, using
the gate functions in `xbar_sched_pkg`. Using one five-input gate for the
three-input AND is how this RTL reads the cell's layout: there, the request
line meets the column and row lines next to two fixed cells. The QCA
implementation itself is not RTL: cell placement, wire crossings, the
four-phase clock zones and the two-dimensional-wave clock floorplan are
physical. Here the gates are ideal and combinational.

## Files

| file | content |
|------|---------|
| `rtl/xbar_sched_pkg.sv` | default size (3x3), `cell_style_e`, `maj3`/`maj5`, the fixed-0 constant |
| `rtl/sched_cell.sv` | AND-gate cell |
| `rtl/sched_cell_maj.sv` | majority-gate cell |
| `rtl/ripple_sched.sv` | the grid. Parameters: `N_IN`, `N_OUT`, `STYLE` (`CELL_GATE` or `CELL_MAJ`). Contains the non-blocking assertions |
| `rtl/xbar_sched_top.sv` | top: both grids side by side, edges tied to 1 |
| `tb/tb_sched_cell.sv`, `tb/tb_sched_cell_maj.sv` | each cell against the truth table |
| `tb/tb_ripple_sched.sv` | 3x3 in both styles and 4x5 against a greedy reference model. Runs all 512 3x3 patterns, the example above, and random requests with random edge masks |
| `tb/tb_xbar_sched_top.sv` | top at its default size, all 512 patterns plus random ones. Counts grants, column blocks, row blocks, double blocks, full matches and partially idle matches, and fails if any of them never occurs |

### Top-level ports (`xbar_sched_top`)

| port | width | meaning |
|------|-------|---------|
| `request` | `[N_IN][N_OUT]` | `request[i][j]`: input i asks for output j |
| `allocate` | `[N_IN][N_OUT]` | allocation from the AND-gate grid |
| `allocate_maj` | `[N_IN][N_OUT]` | allocation from the majority-gate grid; always equal to `allocate` |
| `out_free` | `[N_OUT]` | output j not allocated |
| `in_free` | `[N_IN]` | input i not allocated |

A real switch would use one of the two grids. Both are instantiated so that
both forms are elaborated, simulated and checked against each other. An
assertion fires if they ever disagree.

## Timing

Everything is combinational. The allocation is valid once the request matrix
has settled plus one ripple delay. The longest path runs from cell (0,0) to
cell (N_IN-1, N_OUT-1) through N_IN + N_OUT - 1 cells: 5 cells for 3x3.
In a clocked system, register `request` and `allocate` around the scheduler,
and the clock period must cover that ripple. The testbenches sample 1 ns
after changing the inputs.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/xbar_sched_pkg.sv tb/tb_xbar_sched_top.sv --top-module tb_xbar_sched_top
./obj_dir/Vtb_xbar_sched_top
```

Swap in another testbench name for the others. Each prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends the run with a
failure if the run hangs. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/xbar_sched_pkg.sv rtl/<module>.sv`.

To change the size, override `N_IN` / `N_OUT` on `xbar_sched_top` or
`ripple_sched`. The grid has N_IN x N_OUT cells, and its delay grows with
N_IN + N_OUT.

## How far it follows the source design, and where it departs

- Cell function, grid wiring, the 3x3 size and the tie-to-1 edges come from
  the source design. So do the majority-gate/inverter counts of the QCA form.
- Edge outputs brought out as ports, edge inputs usable as port masks in
  `ripple_sched`, non-square sizes, and both forms side by side in one top:
  these are this RTL's own choices.
- The 3x3 grid has 12 internal links (6 vertical, 6 horizontal), as the
  connection rule implies. The source's count of internal connections is
  lower. The RTL follows the rule.
- The source's CMOS delay and power numbers (FPGA pad-to-pad delays of about
  5 to 6.4 ns for one cell) and its QCA area, energy and cost figures belong
  to particular devices and layouts. They are not reproduced or checked here.
- Not included: the crossbar's connection matrix and its input queues (only
  named as the parts the scheduler serves), and the QCA physical layouts.

## Verification status

All four testbenches pass. Each was also run against a deliberately broken
copy of its module and failed:

- the cell without its r3 input;
- the majority cell with a wrong fixed input;
- the grid ignoring `col_in`;
- the top with one input port masked.

The exhaustive 3x3 runs cover every request matrix of the default size, in
both gate forms.
