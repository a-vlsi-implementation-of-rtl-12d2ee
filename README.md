# Mesh-of-trees simplex engine

The simplex method spends almost all of its time in the pivot step. Every entry of the
tableau is updated there as `a_ij := a_ij - a_ik * a_hj`, and a processor does that in
O(mn) time. This design keeps the whole tableau inside a two-dimensional array of small
processing elements, with one entry per element. Every row and every column of the array
has its own binary tree on top, so that a datum can be spread to, or a minimum gathered
from, a whole row or column in log2 steps. Choosing the pivot column, choosing the pivot
row and pivoting then each take a number of cycles proportional to log n, not to m*n.

The structure is the *mesh of trees* from the paper "A VLSI Implementation of the Simplex
Algorithm". It is written here as synthesizable SystemVerilog. The RTL is the chip: leaves,
internal tree nodes, trees and the mesh. A host processor sequences the algorithm and keeps
the basis. That host is outside the chip, and `tb/mot_host.sv` supplies it as a behavioural
model.

## The array and where the tableau lives

`mot_top #(M, N)` holds M x N leaves `lambda(i,j)`. The leaves of row i are the leaves of
row tree `rt_i`, and the leaves of column j are the leaves of column tree `ct_j`. Every leaf
therefore has two parents. M and N must be powers of two. The default is 4 x 4.

| leaf              | holds                                   |
|-------------------|-----------------------------------------|
| (0,0)             | -z, the objective value with its sign changed |
| (0,j), j >= 1     | reduced cost c_j                        |
| (i,0), i >= 1     | right-hand side d_i                     |
| (i,j), i,j >= 1   | constraint coefficient a_ij             |

A tableau with m-1 constraints and n-1 variables needs an m x n mesh. For the plain simplex
method, the starting tableau must already be in canonical form for a known basic feasible
solution. Otherwise the two-phase method below finds one. The host pads
problems that are smaller than a power of two with dummy rows and columns.

The host reaches the chip only through the tree roots. For each tree it drives one downward
input (`row_dn[i]`, `col_dn[j]`) and reads one upward output (`row_up[i]`, `col_up[j]`). The
mesh has no central controller. The output `datum[i][j]` shows every resident value, for
observation only.

## Links and packets

Each tree edge is a pair of one-way links (`mot_pkg`):

* **downward `dn_t`**: a 5-bit operation code, a 32-bit datum and an 8-bit signed index. A
  code and its parameters travel together in one cycle.
* **upward `up_t`**: a valid bit, a datum and an index. It is a one-cycle pulse. An idle node
  sends all zeroes.

Data are signed fixed point with 32 bits, 16 of them fraction bits, so the integer v is loaded
as `v << 16`. Indexes are signed, so that the "no candidate" answer -1 can never be mistaken
for a real row or column.

Operation codes:

| code | executed by | effect |
|------|-------------|--------|
| BROADCAST | internal node | copy the packet to both children; at a leaf the datum becomes an operand |
| SENDDOWN | internal node | copy the packet only towards the leaf named by the index; at that leaf the datum becomes an operand |
| MIN / MINPOS | internal node | upward: the smaller datum with its index / the smaller nonnegative one, or -1 with index -1 |
| SENDUP | internal node | upward: bitwise OR of the children, i.e. pass on the one answer |
| SUM | internal node | upward: sum of the children |
| SELNZ | internal node | upward: the right child if it is nonzero and the left one is zero, otherwise the left child |
| STORECOL | leaf | store the column operand if its index equals this leaf's row |
| SENDUPROW / SENDUPCOL | leaf | send the resident datum up the row tree with the column index / up the column tree with the row index |
| SENDUPROWT / SENDUPCOLT | leaf | the same for the second register, `tmp` |
| DIV | leaf | `tmp = row operand / datum`, or -1 if datum <= 0 |
| SIMPLEDIV | leaf | `datum = datum / row operand`, unless the operand is 0 |
| COMPUTE | leaf | `datum = datum - row operand * column operand` |
| MULPOS | leaf | `tmp = datum * column operand` if datum < 0 and operand >= 0, else the largest positive number |
| SUB | leaf | `datum = datum - column operand` |
| MULROW / MULCOL | leaf | `tmp = datum * row operand` / `* column operand` |
| IDLE | leaf | cancel a pending leaf operation |

The first eleven names (BROADCAST to COMPUTE, without SUM, SELNZ and the T variants) are the
elementary operations of the original design. The others implement operations that the paper
only names for the greatest decrement rule, the two-phase method and the revised method.

## Internal nodes (`mot_inode`)

An internal node registers every downward packet and passes it on one cycle later. Every
internal-node code that passes through is also latched in the node's mode register. The mode
then decides how the node combines its two children's upward packets, and that result is
registered as well. So a level costs one cycle in each direction. (The paper calls this
per-level time T_C; here T_C = 1.)

SENDDOWN routes by the index. The node at level d, counted from 0 at the root, looks at bit
`log2(leaves)-1-d` of the index. The index itself arrives at the leaf unchanged, and the
leaf compares it with its own row.

MIN, MINPOS and SUM ignore a child whose index is 0. In a row tree that child is the column-0
leaf (-z or d_i); in a column tree it is the row-0 leaf (-z or c_j). This keeps those entries
out of pricing, ratio tests and sums without any extra control. Ties go to the lower index.

## Leaves (`mot_leaf`)

A leaf has two words, the resident `datum` and `tmp`, and knows its row and column index as
parameters. It is the most involved part of the design, because two trees feed it
independently.

* **Send codes** act at once. One cycle after SENDUPROW arrives, the leaf's row-tree output
  carries `{datum, column index}` for one cycle. The other send codes work the same way.
* **Every other leaf code is stored as the pending operation.** Storing a new pending code
  discards any operands latched before it.
* **Operands** are the data of BROADCAST or SENDDOWN packets that reach the leaf. They are
  latched separately for the row tree and the column tree.
* **A pending operation runs once, as soon as its operands are present.** The leaf then goes
  back to idle. COMPUTE waits for both operands, STORECOL for a column operand with its own
  row index, and DIV and SIMPLEDIV for a row operand.

The host therefore sends a code and then its data. The code may arrive in the same cycle as
the data, but not later. The two operands of COMPUTE may arrive at different times. This
differs from the original timing scheme, which made both operands land in the same cycle by
starting the shallower tree later. Operand latching tolerates that timing and any other.

Divisions use a restoring divider (`mot_fxdiv`) that produces one quotient bit per cycle. It
takes 48 cycles, and the result is in place 50 cycles after the operand reaches the leaf.
Quotients are truncated towards zero and saturate on overflow. A leaf ignores codes while it
is dividing. Products come from a combinational multiplier, are truncated and take effect in
one cycle.

## One pivot step, as the host runs it

All of these are tasks in `tb/mot_host.sv`. L_n = log2 N and L_m = log2 M.

1. **Loading.** STORECOL goes into every column root. Then each row goes in as one SENDDOWN
   per column root, carrying its datum and the row index, at one row per cycle. The whole
   tableau is in place about M + L_m cycles later.
2. **Pivot column, most-negative rule.** SENDUPROW goes into `rt_0`, and MIN follows one cycle
   later. The minimum reduced cost and its column k appear at `row_up[0]` 2 L_n cycles after
   the MIN code. If the minimum is >= 0, the tableau is optimal.
3. **Pivot row, ratio test.**
   * OUTPUT brings every d_i to its row root: SENDUP goes into the row roots and SENDUPROW
     into `ct_0`.
   * INPUT-AND-DIVIDE follows: DIV, then SENDDOWN `{d_i, k}` into each row root i >= 1. This
     puts `d_i / a_ik` in the tmp word of leaf (i,k), or -1 if a_ik <= 0.
   * POSITIVE-MINIMUM on `ct_k` (SENDUPCOLT, then MINPOS) returns the pivot row h. If it
     returns -1, the problem is unbounded.
4. **Pivoting, stage 1.** OUTPUT brings a_hk to `rt_h`. BROADCAST-AND-DIVIDE then sends
   BROADCAST a_hk into `rt_h` and SIMPLEDIV into every column root, which divides row h.
5. **Pivoting, stage 2.**
   * OUTPUT brings a_ik to every other row root, and OUTPUT on all column trees brings the new
     a_hj up.
   * BROADCAST-AND-COMPUTE: COMPUTE goes into every column root, a_ik is broadcast down every
     row tree i != h, and a_hj down every column tree. Every leaf outside row h computes
     `a_ij - a_ik * a_hj`. That covers c, d and -z, because they are ordinary leaves.
   * IDLE then clears the COMPUTE still pending in row h.
6. **Output.** OUTPUT on all row trees with column 0 delivers -z and the values of the basic
   variables. The host knows which variable each row belongs to.

Each stage is a fixed number of tree traversals, so a pivot step takes O(log n) cycles plus
two divisions.

**Greatest decrement rule.** This replaces steps 2 and 3. The chosen pivot is the one that
lowers the objective the most.
* DIV with BROADCAST instead of SENDDOWN divides every column at once.
* MINPOS on all column trees in parallel gives each column's minimum ratio.
* SENDDOWN returns each ratio to the row-0 leaf, where MULPOS forms `c_j * ratio`.
* MIN on `rt_0` over those products picks k. The row h is the one found for column k.

## Two-phase and revised methods

These run on the same chip. The difference lies in what the host does.

* **Phase one** runs on an m x (n+m-1) mesh, with artificial costs of 1 in row 0. SUMMATION
  (SENDUPCOL, then SUM) adds each column over rows 1..m-1, and INPUT-AND-SUBTRACT (SUB) takes
  the sums from row 0.
* **Basic artificial variables.** An artificial variable can still be basic (at value zero)
  when phase one ends. SELNZ on its row returns the first nonzero entry; d_i is zero there,
  so column 0 never wins. If that entry is in a real column, the host pivots on it, even when
  it is negative, which swaps a real variable in. If it is in an artificial column, no real
  column is nonzero, so the constraint is redundant and the host deletes the row by writing
  zeros into it.
* **Phase two.** The artificial columns are cleared with INPUT-AND-STORE, and the real costs
  are loaded into row 0. BROADCAST-AND-MULTIPLY (MULROW) multiplies each row by the cost of
  its basic variable into tmp. SUMMATION of tmp (SENDUPCOLT) and SUB then put row 0 back in
  canonical form.
* **The revised method** keeps only -pi, d, -z and B^-1 in an (m+1) x (m+1) mesh. Reduced
  costs are formed one column at a time: INPUT-AND-MULTIPLY (MULCOL into row 0) is followed
  by SUM on `rt_0`. B^-1 A_k comes from MULCOL broadcasts on the column trees and SUM on the
  row trees. It is stored into column m, and the pivot is then selected and applied as above.
  A two-phase start begins with B^-1 = I for the artificial basis and -w = -sum d_i in leaf
  (0,0). Phase one prices with r_j = -sum_i a_ij - pi A_j. At the switch to phase two,
  -pi = -c_B B^-1 and -z = -c_B d are written into row 0. They are formed like the phase-two
  transition above: MULROW by the basic costs, then SUMMATION of tmp on the column trees.

## Departures and limits

* The host processor, its main memory and the control sequences are not hardware here. The
  original design also puts them in the host. The procedures in `tb/mot_host.sv` are
  sequential versions of the published ones: they do not overlap the row-tree and column-tree
  OUTPUTs. BROADCAST-AND-COMPUTE can run either way (the host's `paper_timing` switch). In
  the published schedule the column trees start log n - log m cycles after the row trees, so
  that the COMPUTE code reaches every leaf one cycle before both operands. Otherwise all roots
  start together. The tests use both.
* The design gives no word length, number format or operation latency. The 32-bit Q16.16
  fixed point, T_C = 1, the 48-cycle divider and the single-cycle multiply-subtract are
  choices made for this RTL. Rounding errors build up over pivots; the tests accept 0.01.
* Fixed-point residues make exact zero tests unreliable in the host. A reduced cost counts
  as negative only below -2^-8. If the greatest
  decrement rule finds no product below -2^-8 (for example, when every candidate step is
  degenerate), the host falls back to the most-negative rule for that step.
* The greatest decrement rule is applied over every column, not only columns 1..m-1 as the
  original text says.
* Internal nodes decode their mode directly in logic, not with a stored program. Row and
  column indexes are parameters, not loaded registers. A leaf holds more state than the
  original two data registers: two operand latches, the pending code and the divider. That
  is the price of accepting operands at any time. Each bidirectional bus is built as
  two one-way links.
* A valid bit rides with every upward packet. Without it, "no datum" could not be told apart
  from a datum of 0.
* ABSOLUTE-MINIMUM takes one cycle more than the original count (2 L_n + 1 after
  SENDUPROW), because the leaf registers its answer. OUTPUT on a row tree matches the
  original count: the answer reaches the row root 2 L_n + 1 cycles after SENDUP, when
  SENDUPROW goes into the column root L_n - L_m cycles after SENDUP. The system tests check
  this on every row-tree OUTPUT.
* Not built: the partitioned operation of a large problem on a small q x q mesh (only
  sketched in the original), and the external matrix-inversion chip suggested for refreshing
  B^-1.
* Index width 8 limits a mesh to 128 rows and 128 columns.
* SENDDOWN does not shift the index as it passes a level. Each node reads the bit for its own
  level instead, so the leaf receives the full index, which STORECOL needs anyway.
* In phase one of the revised method the host forms the column sums -sum_i a_ij of the
  artificial objective itself, from the columns it reads out of main memory, and adds them
  to the mesh's -pi A_j. A basic artificial variable left at the end of the revised phase
  one is not handled.

## Files

| file | contents |
|------|----------|
| `rtl/mot_pkg.sv` | widths, operation codes, packet structs, fixed-point product |
| `rtl/mot_inode.sv` | internal tree node |
| `rtl/mot_fxdiv.sv` | sequential fixed-point divider used by the leaf |
| `rtl/mot_leaf.sv` | leaf processing element |
| `rtl/mot_tree.sv` | complete binary tree of internal nodes |
| `rtl/mot_top.sv` | the M x N mesh of trees |
| `tb/mot_host.sv` | behavioural host: tree procedures, simplex steps, real-valued reference tableau |
| `tb/tb_mot_inode.sv`, `tb_mot_leaf.sv`, `tb_mot_tree.sv` | unit tests against independently computed results |
| `tb/tb_mot_full.sv` | default 4 x 4 mesh, simplex steps on a 4 x 4 tableau until optimal |
| `tb/tb_mot_top.sv` | 4 x 8 mesh: three two-phase problems with both pricing rules, artificial replacement and redundant-row deletion; an infeasible and an unbounded problem; a second, 8 x 16 mesh solving 7 constraints and 8 variables, checked against the original data |
| `tb/tb_mot_revised.sv` | revised method on the 4 x 4 mesh: from a slack basis, and two-phase from the artificial basis |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mot_pkg.sv rtl/mot_fxdiv.sv \
    rtl/mot_inode.sv rtl/mot_leaf.sv rtl/mot_tree.sv rtl/mot_top.sv \
    tb/mot_host.sv tb/tb_mot_top.sv --top-module tb_mot_top -Mdir obj_top
./obj_top/Vtb_mot_top
```

For the unit tests, pass only the package, the module under test (plus `rtl/mot_fxdiv.sv`
for the leaf and `rtl/mot_inode.sv` for the tree) and the testbench. All of them finish in
well under a second.

To change the mesh size, set `M` and `N` on `mot_top`. To change the word length or the
fraction bits, edit `DATA_W` and `FRAC_W` in `mot_pkg`; the division latency follows as
DATA_W + FRAC_W cycles. The host model assumes 16 fraction bits when it converts reals.

## Verification status

* The unit testbenches check every internal-node mode and every leaf operation against
  results computed independently, including the division latency and the tree latencies.
* The system tests solve seven linear programs completely: two with the ordinary method,
  three with the two-phase method, and two with the revised method (one of them two-phase).
  They also detect an infeasible problem, whose phase one ends with w > 0, and an unbounded
  problem. One two-phase problem leaves an artificial variable basic, which has to be
  replaced by a pivot of -1. Another has a redundant row, which is deleted. After each step
  the tests compare the whole mesh with a real-valued reference.
* The cycle counts checked are: loading, ABSOLUTE-MINIMUM, row-tree OUTPUT, division and the
  tree latencies.
* Each test was also run against a deliberately broken copy of its module and failed, as it
  should.
* Not verified: host schedules other than the sequential one used here and the published
  BROADCAST-AND-COMPUTE timing, meshes larger than 8 x 16, and word lengths other than 32/16.
