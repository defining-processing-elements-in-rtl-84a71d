# Dependence-graph arrays for matrix-vector and matrix-matrix products

A nested `for` loop such as

    for i in 0..n-1: for j in 0..n-1: c[i] += a[i][j] * b[j]

can be laid out in hardware as a regular grid of identical processing elements (PEs), one
per loop iteration, that talk only to their neighbours. Such a grid is a *dependence graph*
(DG): each node evaluates one iteration of the loop body, and each arc carries a value from
the iteration that produced it to the iteration that uses it. A DG in which every node does
the same thing and has the same neighbours (it is *shift-invariant*) is the starting point
for systolic arrays on FPGAs and other embedded hardware.

This repository implements two such graphs in synthesizable SystemVerilog:

* `mv_dg`: an N x N grid that computes the matrix-vector product c = A·b;
* `mm_dg`: an N x N x N lattice that computes the matrix-matrix product C = A·B;

with N = 4 by default, and a top level, `dg_top`, that puts both side by side behind a
registered start/done interface.

## From loop to graph: making every value local

The obstacle in the loop above is that `b[j]` is used by every row `i`, and `c[i]` is read
and overwritten `n` times. Neither fits a graph whose nodes may only talk to neighbours.
Two rewrites fix that:

1. **Single assignment.** Give `c` the recursion index as an extra subscript, so each partial
   sum is a distinct value: `c[i][j] = c[i][j-1] + a[i][j]*b[j]`, with `c[i][-1] = 0`.
2. **Transmission instead of broadcast.** Give `b` the row index too, and copy it from the
   row above: `b[i][j] = b[i-1][j]`, with `b[-1][j] = b[j]` as the value fed in at the edge.

The loop body is now *locally recursive*: every right-hand side refers to a neighbour that
differs in exactly one index. Each iteration becomes a PE, each such reference becomes an arc
between adjacent PEs, and the values with index -1 become the primary inputs on the graph's
boundary.

The matrix-matrix product gets the same treatment in three dimensions:

    a[i][j][k] = a[i][j-1][k]                       // A travels along j
    b[i][j][k] = b[i-1][j][k]                       // B travels along i
    c[i][j][k] = c[i][j][k-1] + a[i][j][k]*b[i][j][k]   // partial sum travels along k

so `a[i][k]` is no longer broadcast to every `j`, nor `b[k][j]` to every `i`.

## The processing elements

| PE      | inputs                | outputs               | function                                  |
|---------|-----------------------|-----------------------|-------------------------------------------|
| `mv_pe` | `a`, `b_in`, `c_in`   | `b_out`, `c_out`      | `b_out = b_in`, `c_out = c_in + a*b_in`   |
| `mm_pe` | `a_in`, `b_in`, `c_in`| `a_out`, `b_out`, `c_out` | `a_out = a_in`, `b_out = b_in`, `c_out = c_in + a_in*b_in` |

Each PE is one multiply-accumulate plus wires that pass the operand(s) on. It has no
registers: a DG node is an iteration, not a clock cycle. The pass-through outputs are pure
wires in the netlist; they exist because they are the arcs of the graph.

## The matrix-vector graph (`mv_dg`)

Node (i, j) sits in row i, column j.

* `a[i][j]` enters node (i, j) directly.
* `b[j]` enters at the top of column j and is passed down the column, row by row.
* The partial sum enters row i from the left as 0 and grows by one product per node;
  `c[i]` leaves at the right end of row i.
* The copies of `b` that leave the bottom row are available on `b_out`; they must equal `b`.

## The matrix-matrix graph (`mm_dg`)

Node (i, j, k) sits in an N x N x N lattice.

* `A[i][k]` enters on the j = 0 face at (i, 0, k) and travels in +j.
* `B[k][j]` enters on the i = 0 face at (0, j, k) and travels in +i.
* Every (i, j) chain starts from 0 at k = 0, and `C[i][j]` leaves the node at k = N-1.
* The copies leaving the far faces are available on `a_out` (indexed `[i][k]`) and on
  `b_out` (indexed `[k][j]`).

The matrix-vector graph has N² multipliers, and the matrix-matrix graph has N³ (16 and 64 at
N = 4). In both graphs the longest combinational path is one multiplier plus N adders.

In the RTL each node is a generate block that declares the signals it drives. Its inputs
come either from the boundary or from the neighbouring block by hierarchical name, for
example `g_i[i].g_j[j-1].g_k[k].a_o`. Keeping every arc a separate net means no array
appears to feed itself, so lint tools see no false combinational loop.

## Timing: the registered top (`dg_top`)

The graphs are combinational, so `dg_top` gives them registered boundaries. The two halves
(`mm_*` and `mv_*` ports) are independent and identical in timing:

| clock edge | event                                                              |
|------------|--------------------------------------------------------------------|
| t          | `*_start` = 1: operands on `*_a`, `*_b` are captured               |
| t+1        | graph output is captured into `*_c`; `*_done` rises                |
| t+2        | `*_done` falls unless another start was given at t+1               |

Seen from outside, the results are valid together with `*_done`, two clocks after the start.
A new start is accepted in every clock, so each half delivers one complete product per clock.
`*_c` holds its value until the next completion. Reset (`rst_n`) is synchronous and active
low and clears every register. Assertions in `dg_top` check two things: that `done` follows
`start` by two clocks, and that the A and B values leaving the far faces of the graphs equal
the captured operands.

## Number format

Elements are signed two's-complement integers of `DATA_W` = 16 bits. Partial sums are
`ACC_W = 2*DATA_W + clog2(N)` bits wide, 34 bits at the defaults. That is enough for the sum
of N products of the most negative values, so no result ever overflows or wraps. The defaults
live in `rtl/dg_pkg.sv` (`DG_N`, `DG_DATA_W`, `acc_width()`), and every module takes `N`,
`DATA_W` and `ACC_W` as parameters.

## What follows the method and what is a design choice

These parts follow the method: the loop rewrites, the PE functions, the arc directions, the
zero boundary for partial sums, the entry faces for A, B and b, and the 4 x 4 sizes.

These parts are design choices:

* The operand width and the signed format.
* The full-precision accumulator.
* The modelling of nodes as combinational logic.
* The exit copies `a_out` and `b_out`, brought out as ports.
* The whole of `dg_top`: the registers, the start/done handshake and the reset.

The loop bounds in the original pseudo-code read `i < n-1`, which would skip the last index.
The RTL follows the summation formulas instead: every index runs from 0 to n-1.

Not built: a systolic array obtained by projecting these graphs onto fewer PEs with a
schedule (the graphs are the input to that step, which is left to the user), and graphs for
loop nests deeper than three, which are not worked out.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the design against
products computed independently in 64-bit integers.

| testbench    | covers                                                                           |
|--------------|----------------------------------------------------------------------------------|
| `tb_mv_pe`, `tb_mm_pe` | ~2000 random and corner operands (most negative, most positive, zero), sums and pass-through |
| `tb_mv_dg`   | zeros, identity, all-extreme operands, a single non-zero `a` at each of the 16 nodes, 500 random cases; exit copies of b |
| `tb_mm_dg`   | zeros, identity·B, extremes, a single non-zero A element at each position, 300 random cases; exit copies of A and B |
| `tb_dg_top`  | full default size, ~600 products per half. Covers isolated, back-to-back and simultaneous starts, and extreme operands. Checks the exact two-clock latency, that results hold between completions, and the reset values. It counts each of these events and fails if any never occurred |

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Irtl -Itb rtl/dg_pkg.sv tb/tb_dg_top.sv \
              --top-module tb_dg_top
    ./obj_dir/Vtb_dg_top

Replace `tb_dg_top` with any other testbench name to run that one. Lint alone:

    verilator --lint-only -Wall -Irtl rtl/dg_pkg.sv rtl/dg_top.sv --top-module dg_top

To change the order of the matrices, change `DG_N` in `dg_pkg` or pass `N` to the module.
Widths follow from `DATA_W`. The hardware grows as N² for `mv_dg` and N³ for `mm_dg`.
