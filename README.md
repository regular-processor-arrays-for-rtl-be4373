# A linear processor array for Gaussian elimination with partial pivoting

Partial pivoting is what makes Gaussian elimination numerically usable. It
is also what breaks a systolic array: at every step the pivot row is the row
with the largest element in the current column, and which row that is
depends on the data. This design works around that by never swapping rows.
A one-bit tag marks each row once it has been a pivot row. The pivot search
skips tagged rows, elimination leaves them alone, and the pivot row number
of every step is reported so the result can be put in triangular order
afterwards. With that change the data flow no longer depends on the data,
and the algorithm maps onto a regular linear array of N processors.

The array is not systolic in the strict sense. The pivot search of every
step is a chain through all M rows, so a run takes O(M^2) cycles rather
than O(M). Apart from that it keeps the usual properties: identical
neighbour-connected cells, registered links, and one operation per cell per
cycle.

## The algorithm the hardware runs

The input is an M x N matrix with M <= N. A typical input is the augmented
matrix [A | b] of M equations, with N = M + 1. Every row i has a tag c(i),
which starts at 0. Step k, for k = 1 .. M-1, has two passes:

1. **Search pass, rows 1..M.** Each row is tested with
   `t(i) = (p < |a(i,k)|) and not c(i)`, where p is the magnitude of the best
   candidate among the rows before it (p is 0 before row 1). When t(i) = 1,
   row i becomes the candidate r. Every column j keeps `s(j)`, the
   candidate row's element: `s(j) := t(i) ? a(i,j) : s(j)`. After row M, r is
   the pivot row of step k, and the s values are the pivot row itself. They
   are copied into w. The comparison is strict, so when two rows have equal
   magnitudes the first one wins.
2. **Elimination pass, rows M..1.** Each row gets the multiplier
   `rho(i) = a(i,k) / w(k)`. rho(i) is forced to 0 if row i is tagged or is
   the pivot row. Then every column computes `a(i,j) := a(i,j) - rho(i) * w(j)`
   and `c(i) := c(i) or (i = r)`.

After step k, the untagged rows of column k hold only residue, which is
zero up to rounding. The pivot row r_k holds row k of the upper-triangular
factor U, from column k onwards. The rows tagged earlier hold the U entries
above the diagonal in column k. After M-1 steps exactly one row is still
untagged: it is row M of U.

## Array geometry

```
            tok (kind,row,t,x,rho)   tok            tok
  output <- [ P0 ] ------------> [ P1 ] -------> [ P2 ] --> ... [ P(N-1) ]
   a, c      |   <------------     |   <-------    |               |
             |    col (a, c)       |    col        |               |
          column 1              column 2        column 3        column N
```

Processor q holds column j = k + q during step k. At the start, processor q
holds column q+1. During every elimination pass each processor sends its
updated column to its left neighbour, so after step k all columns have moved
one processor to the left. The column that leaves processor 0 is the
array's output.

- **Processor 0** (`ge_pivot_pe`) always holds the pivot column k. It
  contains all the pivot logic: the comparison that gives t, the candidate
  registers p and r, the pivot row x, and the divider that gives rho. It also
  contains the sequencer that issues one token per cycle. Its own column is
  kept in an ordinary elimination cell.
- **Processors 1..N-1** (`ge_elim_pe`) only keep s and w, eliminate, and
  forward the token. Each one holds one column of M elements and M tags in
  `ge_col_mem`.
- **Links.** Every link is a single register stage. A token issued by
  processor 0 in cycle T is handled by processor q in cycle T + q. The
  updated element that processor q produces in that cycle is stored by
  processor q-1 at the end of cycle T + q + 1.

## Timing: why the passes fit together

This is the part that needs care. All processors handle the same token
sequence, each one a fixed number of cycles after processor 0, so every
dependency can be checked relative to processor 0:

- **Search pass, then elimination pass.** w is latched when search row M is
  handled. The first elimination token (row M) comes one cycle later in
  every processor. No bubble is needed.
- **Storing the incoming column in place.** Processor q sends row i to the
  left two cycles before processor q+1's row i reaches it. By then processor
  q has already read its own row i. The elimination pass visits the rows in
  falling order, so each arriving element overwrites a row that has already
  been sent. One memory per processor is enough, with no double buffer.
- **Elimination pass, then the next search pass.** The next search pass
  starts at row 1, but row 1 is the last row to arrive from the right. It
  can be read GAP_CYC = 2 cycles after the last elimination token. This
  gap is the only idle time in a step.
- **Drain.** After step M-1, columns M..N are still in the array. N-M+1
  drain passes shift them out. A drain pass is an elimination pass with
  rho = 0 and x = 0, followed by the same gap.

A run takes `(M-1)(2M+2) + (N-M+1)(M+2)` cycles from the clock edge that
samples `start` to the first cycle with `done` high. That is 146 cycles for
the default 8 x 9. Each processor has a `full` flag that says whether it
holds a column. Processor q clears it when its own row 1 leaves and sets it
again when a full neighbour's row 1 arrives. Processors at the right end
therefore empty out one per step.

## Number format

Elements are 32-bit two's-complement fixed point with 16 fraction bits, set
by `DATA_W` and `FRAC_W` in `ge_pkg`. Products are rounded toward minus
infinity (an arithmetic shift of the 64-bit product). Quotients
`(a << 16) / w` are truncated toward zero by a single-cycle divider in
processor 0. The pivot is the largest untagged magnitude, so |rho| <= 1 and
rho cannot overflow. The matrix entries can still grow, by up to a factor of
2^(M-1) in the worst case. Input values must leave headroom for that growth.

## Interface of the top, `ge_pivot_array #(M = 8, N = 9)`

| port | dir | meaning |
|---|---|---|
| `load_valid`, `load_row`, `load_data[N]` | in | Writes row `load_row` (1..M) of every column; `load_data[q]` is column q+1. Rows may be loaded in any order. Ignored while `busy`. Loading clears the tags. |
| `start` | in | Begins a run when the array is not busy. |
| `busy`, `done` | out | `busy` is high during the run. `done` is high from the end of the run until the next start. |
| `pivot_valid`, `pivot_step`, `pivot_row` | out | One pulse per step k = 1..M-1 with the pivot row r_k. `pivot_row` is 0 if column k has no non-zero untagged element. |
| `singular` | out | At least one step had no pivot. It stays set until the next start. In such a step no row is tagged and every rho is 0. |
| `out_valid`, `out_col`, `out_row`, `out_a`, `out_c` | out | The raw output of processor 0. It gives column 1 (rows M..1, with their tags) after step 1, then column 2, and so on, then the drained columns M..N. Every element of the final matrix appears exactly once. |
| `u_valid`, `u_row`, `u_col`, `u_data` | out | Elements U(m, j) of the upper-triangular factor (j >= m), one cycle after the raw element. They come in the order the raw stream gives them, not in row order. |

All outputs are registered. The clock is `clk`, and `rst_n` is an
active-low asynchronous reset. Sizes are limited to 2 <= M <= N <= 255.

## Triangular order (`ge_triangularize`)

Because rows are never swapped, "row m of U" means "the row that was the
pivot of step m". The triangularizer keeps a rank table: rank(r_k) = k. It
routes each raw element of a tagged row to U(rank, j). In the drained
columns, the single untagged row goes to row M of U. Untagged elements of
columns j < M lie below the diagonal and are dropped. The whole job takes
one table lookup per element. If the matrix is singular, some ranks are
missing and U is incomplete.

## What is specified and what is this design's own

These parts follow the derivation of the array:

- the tagged, swap-free form of partial pivoting;
- the equations for t, r, s, w, x, rho, a and c;
- the assignment of index point (i, j, k) to processor j - k, with N
  processors;
- all pivot and multiplier work in processor 0;
- the directions of the links: t, x and rho to the right, a and c to the
  left;
- one column input per processor, and the output from the leftmost
  processor.

These are this design's own choices:

- the fixed-point format and its rounding;
- the cycle-level schedule: the row order of the two passes, one-cycle
  hops, the 2-cycle gap and the drain passes;
- storing the incoming column in place;
- the `full` flag;
- the way a missing pivot is handled;
- the load interface;
- the rank-table triangularizer.

Limits and departures:

- The multipliers rho are not kept or output, so the array gives U but not
  the lower factor L. In the array's formulation the multipliers are
  consumed and not stored.
- The comparison register p exists only in processor 0. It is the magnitude
  of the current candidate. The other processors never compare, so they do
  not keep it.
- Back substitution is not part of the hardware.
- The divider is a single-cycle combinational divider. A real
  implementation would pipeline it, or use an iterative divider with a
  matching stall.
- Other arrays of the same family are not built. These include the
  row-oriented array with M processors, the column and block-column arrays,
  and the 2-D arrays.

## Verification

Each module has a self-checking testbench in `tb/`:

| testbench | what it checks |
|---|---|
| `tb_ge_col_mem` | random loads, writes and reads against an array model; load priority; out-of-range rows |
| `tb_ge_elim_pe` | cycle-level model of s, w, `full`, the forwarded token and a - rho*w, c or (i = x); 20 000 random cycles |
| `tb_ge_sequencer` | the complete token stream and run length at 8 x 9 and 3 x 6; `start` is ignored while busy |
| `tb_ge_pivot_pe` | processor 0 alone, with the testbench acting as processor 1: tokens (t, x, rho), pivot rows, output column, singular flag, run length |
| `tb_ge_triangularize` | rank-table placement for random pivot orders; clear; rows outside 1..M |
| `tb_ge_pivot_array` | the whole array at the default size. Exact comparison with a sequential model of the algorithm: pivot rows, every output element, every U element, cycle count. It includes a tie, a zero column and a diagonal matrix. It counts how often each mechanism happens (pivot search, a tagged row that is larger than the chosen pivot, a tie, a missing pivot, column shifts, drain passes) and requires each to happen at least once. |
| `tb_ge_linear_solve` | 20 systems of 8 equations with known solutions, solved by back substitution from U. In half of them the diagonal is zero, so they cannot be solved without pivoting. |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. The models in the testbenches apply the same fixed-point rules as
the hardware, so results are compared bit for bit.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert rtl/ge_pkg.sv rtl/ge_col_mem.sv \
  rtl/ge_elim_pe.sv rtl/ge_sequencer.sv rtl/ge_pivot_pe.sv \
  rtl/ge_triangularize.sv rtl/ge_pivot_array.sv tb/tb_ge_pivot_array.sv \
  --top-module tb_ge_pivot_array -Mdir obj -o sim
./obj/sim
```

For the other testbenches, change the testbench and the top module. The
block testbenches need only the package and the modules below their block.
To change the size, set `M` and `N` on `ge_pivot_array`. To change the
number format, change `DATA_W` and `FRAC_W` in `ge_pkg`. The bit-exact
testbench models read `FRAC_W`. The stimulus ranges and the linear-solve
test assume 16 fraction bits.

## Files

- `rtl/ge_pkg.sv`: types (`tok_t`, `col_xfer_t`), the number format and
  the fixed-point helpers.
- `rtl/ge_col_mem.sv`: the column store.
- `rtl/ge_elim_pe.sv`: the elimination processor.
- `rtl/ge_sequencer.sv`: the schedule.
- `rtl/ge_pivot_pe.sv`: processor 0.
- `rtl/ge_triangularize.sv`: the rank table.
- `rtl/ge_pivot_array.sv`: the top.
