# Systolic arrays: priority queues, tree machines, comparison arrays and a matrix inverter

A systolic array is a grid of small identical processors with only
neighbour-to-neighbour wires. Data is pumped through it in regular waves.
Each processor does a small step on whatever passes it, so the array works on
many items at once. A new problem can enter every one or two clocks, even
though one item takes O(N) or O(log N) clocks to get through.

This repository holds synthesizable SystemVerilog for a family of such
designs:

| design | module | what it does | rate / latency |
|---|---|---|---|
| matrix inverter | `matrix_inverter` (cells `gj_cell`) | Gauss-Jordan inverse of a stored N x N matrix, no pivoting | done 6N-1 clocks after start |
| priority queue, queue, stack | `systolic_linear_array` (cells `lin_cell`) | INSERT/XMIN, ENQUEUE/DEQUEUE or PUSH/POP on up to N keys | one command per 2 clocks; answer 2 clocks later |
| tree dictionary | `tree_dictionary` | MEMBER/INSERT/DELETE on up to N keys | one command per clock; answer after 2 log2 N clocks |
| L-machine | `l_machine` | MEMBER/INSERT/DELETE/XMIN on a sorted set of up to N keys | one command per clock; XMIN after log2 N clocks, other answers after 2 log2 N |
| L-machine with holes | `l_machine_holes` | the same, also accepting repeated inserts and deletes of absent keys; up to N/2 keys | one command per 3 clocks; same latencies |
| tuple comparator | `tuple_comparator` | compares a fixed tuple with a stream of skewed tuples | one tuple per clock |
| pattern matcher | `pattern_matcher` | flags every place where a pattern of N characters ends in a text | one character per 2 clocks |
| inner products | `inner_product_array` | dot products of skewed vector pairs | one pair per clock |
| set intersection | `intersection_array` (cells `grid_cell`) | flags which of K tuples b also occur among K tuples a | done 4K+N-1 clocks after start |
| matrix product | `matmul_array` (cells `grid_cell`) | C = A * B for N x N matrices | done 4N-1 clocks after start |

`systolic_suite` is the top level. The designs do not share data, so it
places them side by side. Each design keeps its own ports, with a prefix:
`inv_`, `pq_` (priority queue), `fq_` (queue), `st_` (stack), `tc_`, `pm_`,
`ip_`, `is_`, `mm_`, `td_`, `lm_` and `lh_`. All designs share one clock and one
active-low asynchronous reset. Shared types are in `rtl/systolic_pkg.sv`.

## The matrix inverter

This is the largest and least obvious design.

### Algorithm

Plain Gauss-Jordan inverts A by row operations on the N x 2N matrix (A | I).
For each i, row i is scaled by 1/a_ii ("rowmul"). Then a_ji times row i is
subtracted from every other row j ("rowsub"). The left half becomes I and the
right half becomes A^-1.

The array changes how the data moves so that every step looks the same.
Each step has two waves:

1. A **right wave** runs along each row. The pivot row is scaled. At the same
   time, every row's first column is moved to the right end.
2. A **down wave** runs down each column. The pivot row moves to the bottom,
   and every other row moves up by one place and subtracts a multiple of the
   pivot row.

After N steps the rows are back in their original order and A^-1 sits where
A was. At the start of every step the right half is the identity again.
That is why the N x 2N array can be cut to N x N: the missing half only ever
supplies zeros from the right, plus the scaled one at the top.

`CURTAILED` (default 1) selects the cut-down N x N array. With
`CURTAILED=0`, the full N x 2N array is built. It loads the identity into
its right half, and its right-column cells take the moved first column
(exactly 1 in the top row). Both forms give the same result; the full one
needs twice the cells and N more clocks (7N-1).

### Cells and their four-phase clock

Each `gj_cell` has two registers:

- `a`: the matrix element it holds.
- `b`: the row multiplier that travels along its row.

A cell steps through four states, **l, r, u, d**:

| state | action |
|---|---|
| l | `b` takes the left neighbour's `b`. In the left column `b := a`; in the top-left cell `b := 1/a`. |
| r | `a` takes the right neighbour's `a`. In the top row it is also multiplied by `b`. In the N x N array the right column takes 0 and the top-right cell takes `b`. |
| u | `a` takes the value from the cell above (not in the top row). |
| d | `a := a_below - b_below * a` (not in the bottom row). |

Cell (i, j) is in phase (t - i - j) mod 4. The waves therefore run
diagonally through the array, one cell per clock. A new step starts at the
top-left corner every four clocks, before the previous step has left the
array. This overlap is why the inverse takes O(N) time rather than O(N^2).

Parameters `TOP`, `BOTTOM`, `LEFT` and `RIGHT` select the edge behaviour of
each cell. They correspond to the nine cell categories (corners, edges,
interior) of the original design.

### Start, stop and timing

- Pulse `load` to write `mat_in` into all `a` registers. Then pulse `start`.
- A start token enters the top-left cell and spreads right along the rows and
  down the left column, one cell per clock.
- A stop token follows 4N clocks later. Each cell therefore runs exactly N
  four-state cycles and then freezes.
- `done` pulses when the stop token reaches the bottom-right cell, 6N-1 clocks
  after `start`. `mat_out` then holds A^-1.

Numbers are signed fixed point: 32 bits with 16 fraction bits (`WIDTH`,
`FRAC`). Products are truncated. `1/a` is computed by one divider in the
top-left cell. There is **no pivoting**, so the matrix must be one where
Gaussian elimination never meets a zero or tiny pivot, such as a symmetric
positive-definite or diagonally dominant matrix. A zero pivot saturates to
the largest positive number and gives no error signal.

## Linear arrays: priority queue, queue and stack

`systolic_linear_array` is a chain of N `lin_cell`s with an IO pad at the
left end. Each cell holds two keys, A and B. Odd and even cells act on
alternate clocks. When a cell acts, it works on its own registers and on its
left neighbour's, which is idle at that moment. The pad acts as cell 0 and
drives the array with values set by the command:

| command | pad A | pad B |
|---|---|---|
| PUT k (INSERT / ENQUEUE / PUSH) | -inf | k |
| TAKE (XMIN / DEQUEUE / POP) | +inf | +inf |
| none | -inf | +inf |

Keys are `{kind, value}`, with kind 0 = -inf, 1 = key and 2 = +inf. A +inf
register is empty. This lets every comparison be a plain unsigned compare.

`MODE` selects the cell program:

- **Priority queue:** the cell sorts the three keys A_left, B_left and A.
  The smallest goes to A_left, the middle one stays in A and the largest
  moves on in B. The smallest key is therefore always in cell 1's A, ready
  for XMIN.
- **Queue and stack:** guarded copies move keys one cell at a time. In the
  queue, a new key travels right until it reaches the end of the occupied
  cells. In the stack, every key shifts right by one on a push. On a take,
  keys shift left to fill the hole. In this design a copy out of B_left also
  empties B_left, so no key is ever held twice.

Commands are accepted when `cmd_ready` is high, which is every second clock.
A TAKE is answered on `out_valid` two clocks later. If the structure was
empty, `out_empty` is set. Nothing signals a full array: an insert into a
full priority queue silently loses the largest key.

## Tree machines

Both tree designs send commands from a root down a pipelined binary
broadcast tree (`bcast_tree`) to N leaf processors. The answers come back up
a pipelined OR tree (`merge_tree`). Each tree level has one register, so a
new command can enter every clock. N must be a power of two.

**`tree_dictionary`** stores each key in one free leaf. Finding a free leaf
without a search uses tickets:

- A counter F at the root holds the number of free leaves.
- Each free leaf holds a distinct ticket from 1..F. A full leaf holds no
  ticket.
- INSERT is tagged with ticket F, and F decreases. Only the leaf holding
  ticket F stores the key.
- DELETE is tagged with F+1, and F increases. The leaf holding the key
  frees itself and takes ticket F+1.

When F = 0, an INSERT is refused and answered with `resp_hit = 0`. Keys must
be unique, and a DELETE must name a key that is present.

**`l_machine`** also links the leaves into a linear array with a pad at the
left end. It keeps the keys sorted at the left. Every leaf decides its move
from the key k, its own key and its left neighbour's key:

- **INSERT:** the keys above k shift right by one.
- **DELETE:** the keys from k on shift left by one.
- **XMIN:** every key shifts left, and the smallest key drops into the pad.
- **MEMBER:** nothing moves.

All leaves act on the same clock. The answer to XMIN is ready at the pad
log2 N clocks after the command enters. "Was the key present" comes back
from the OR tree after 2 log2 N clocks. As in the dictionary, INSERT must
bring a new key and DELETE must name a key that is present.

**`l_machine_holes`** drops that restriction by letting the sorted segment
contain holes:

- **Holes.** Each processor has a star bit. A starred processor keeps a value
  only so that the neighbour comparisons still see a sorted array.
- **DELETE(k)** just stars the processor holding k. Nothing moves, and an
  absent k changes nothing.
- **INSERT(k)** shifts right as before. If k was already present, the
  shifted old copy is starred, which leaves a hole instead of a duplicate.
- **XMIN** shifts everything left.
- **COMPRESS.** On the two clocks after every command, each processor does a
  COMPRESS step. A starred processor whose right neighbour is unstarred takes
  that neighbour's contents, and the neighbour becomes starred. Holes
  therefore drift right and disappear into the empty tail.

COMPRESS keeps two invariants, which assertions check whenever a command
arrives:

1. The first processor is never a hole, so XMIN always finds the minimum.
2. No two holes are adjacent, so at most half the array is holes.

Capacity is therefore N/2 keys. A command is taken every third clock
(`cmd_ready`).

## Comparison and product arrays

These all build on one idea. A signal `s` moves right through a row of
processors. Processor i combines `s` with its own pair (a_i, b_i), either
`s AND (a_i == b_i)` or `s + a_i * b_i`. The tuple components are skewed:
component i enters one clock after component i-1. Each component therefore
meets `s` exactly when `s` arrives.

- **`tuple_comparator`:** a fixed tuple against a stream of tuples. The
  result comes out one clock after the last component enters.
- **`inner_product_array`:** the same chain with multiply-add.
- **`pattern_matcher`:** the text moves left while `s` moves right, so each
  text character meets a whole pattern window. Characters enter every second
  clock (`text_ready`). If no character is offered in its slot, the whole
  array holds, so gaps in the text are allowed. `match` is valid one clock
  after each character once N characters have entered. It flags the window
  that ends at that character.
- **`intersection_array`:** a (2K-1) x N grid of `grid_cell`s. a-tuples move
  up and b-tuples move down, so every a(k) meets every b(l) in some row. A
  column of OR cells on the right gathers the row results into one flag per
  b-tuple. `match[l]` says whether b(l) equals any a(k).
- **`matmul_array`:** the same grid with multiply-add and no OR column.
  c(k,l) leaves row k-l+N-1. The module collects the results into `mat_c`.

Both grid modules load their operands in parallel on `start`. An internal
sequencer then feeds them in the skewed order, and `done` pulses when the
last result is in.

## How far to trust it, and where it departs from the original designs

Choices made in this design:

- All word widths, the fixed-point format, and how results are loaded and
  read out.
- Valid bits that travel with the data.
- The pattern matcher's hold on text gaps.
- In the L-machine with holes, two COMPRESS steps by every processor after
  every command, rather than only to the right of the update.
- Refusing inserts into a full tree dictionary.
- The empty flag on takes from an empty structure.
- The boundary behaviour of the inverter's right column, derived from the
  algorithm.

Not built:

- DELETE(k) of an arbitrary key in the linear priority queue. As in the
  original design, only the special case XMIN is programmed into the cells.
- The LU-decomposition variant of the inverter. It is only outlined, with no
  cell transitions to build from.
- Pivoting. It would add a backward wave that prevents the overlap of steps.

Default sizes follow the example drawings: inverter 5 x 5, comparator and
inner products 8, pattern 6, intersection K = N = 4, matrix product 4 x 4,
tree machines and L-machines 8 leaves, and linear arrays 8 cells (an assumed size).

## Verification

Each module has a self-checking testbench in `tb/`. It compares the module
against a model in the testbench and checks the latencies listed above. Each
run ends with a `TB_RESULT checks=... failures=...` line.

- The inverter is checked in both array forms, with latency. The tests use a
  worked 3 x 3 example and random diagonally dominant matrices.
- The linear arrays are checked against queue, stack and sorted-list models
  under random command streams, including overflow.
- The tree machines are checked against set models. The L-machine with holes
  also gets a steady stream of repeated inserts and deletes of absent keys.
- The grids are checked against direct loops.

`tb/tb_systolic_suite.sv` drives the top level at its default sizes. It runs
each design through complete operations and counts the mechanisms it
exercises: overflow, empty take, refused insert, text-gap hold, XMIN down to
empty, repeated insert and delete of an absent key, and so on. A mechanism that never occurs counts as a failure.

To simulate one testbench with Verilator:

```
verilator --binary --timing --assert -y rtl --top-module tb_matrix_inverter \
    rtl/systolic_pkg.sv tb/tb_matrix_inverter.sv
./obj_dir/Vtb_matrix_inverter
```

Testbenches may override sizes; the RTL defaults are the sizes above.
