# Systolic histogram-packing picture comparator

Two pictures of the same scene taken under different lighting have
different gray-level histograms. One way to decide whether they show the
same scene is to rescale the gray levels of one picture so that its
histogram comes as close as possible to the other's. This design does that
rescaling in hardware.

The input picture has `M` gray levels with histogram `H1`. The reference
picture has `N` levels with histogram `H2`. The rescaling is monotone:
consecutive input levels `X_{j-1} .. X_j-1` all become reference level `j`.
Its cost is the sum over `j` of `|H2(j) - (pixels of the input levels mapped
to j)|`. Seen as packing, the `M` input bins are objects packed in order into
`N` boxes of sizes `H2(j)`. The cost is the total over-packing plus the
total space left over.

The smallest cost comes from a dynamic program:

```
S_0(i) = H1(1) + ... + H1(i)          (nothing packed yet: every object is error)
S_j(0) = H2(1) + ... + H2(j)          (boxes 1..j empty)
S_j(i) = min over u = 0..i of  S_{j-1}(u) + | H2(j) - (H1(u+1) + ... + H1(i)) |
```

`S_N(M)` is the minimal error. The `u` that wins at `(i,j)` tells which
input levels go into box `j`. When `u = i`, box `j` stays empty. On one
processor this takes O(M²N) time. The `M x N` systolic array here computes
it in `2M+N+3` clock cycles. It can then recover the packing in at most
`M+N` more cycles.

## How the array computes S_j(i)

Each processing element `PE(i,j)` (`rtl/pc_pe.sv`) owns one entry `S_j(i)`.
It has a subtracter, an absolute-value unit, an adder and a comparator. All
links go to nearest neighbours and are registered, so every value moves one
PE per clock cycle. In this README a clock cycle is called a *time unit*.

- **Rows carry the input picture.** `H1(i)` enters row `i` from the left
  and every PE in the row keeps a copy.
- **Columns carry candidates.** Down column `j` flows a stream of *tuples*
  `(S_{j-1}(u), r, u, H2(j))`, one for each `u`. The tuple for `u` enters
  the column at row `u`. `r` is the space still free in box `j` once input
  levels `u+1 .. i-1` are packed into it. When `PE(i,j)` receives the tuple,
  it subtracts its own `H1(i)` to get the new `r`, forms the candidate
  `S_{j-1}(u) + |r|`, keeps it if it beats the running minimum, and passes
  the tuple down.
- **The identification signal closes an entry.** It reaches `PE(i,j)` from
  the left together with `S_{j-1}(i)`, after every tuple with `u < i` has
  gone past. The PE then compares its running minimum with
  `S_{j-1}(i) + H2(j)` (the case "box `j` empty"), which is the `u = i`
  term. It sends `S_j(i)` to the right, stores the winning `u` in its index
  register, and starts tuple `u = i` down its own column.

The timing follows from this:

| event at PE(i,j)                        | time unit        |
|-----------------------------------------|------------------|
| tuple `u` arrives                       | `u + i + j + 2`  |
| identification signal arrives           | `2i + j + 2`     |
| `S_j(i)` leaves to the right            | `2i + j + 3`     |

The identification signal starts at PE(1,1) at time unit 5. It moves one
column per time unit and, along the left edge, one row per two time units.
Tuples in a column never collide with each other or with the signal: at row
`i` the tuples fill time units `i+j+2 .. 2i+j+1` and the signal arrives
right after them. Assertions in `pc_pe` check this. `S_N(M)` is ready at
time unit `2M+N+3`.

Ties are broken towards the smaller `u`. A strictly smaller candidate
replaces the running minimum, and the empty-box term wins only when it is
strictly smaller. The testbench model uses the same rule, so the packing it
expects matches the hardware bit for bit.

## Edges: pc_sequencer

The array needs boundary values at fixed time units. `rtl/pc_sequencer.sv`
latches both histograms when `start` is accepted. It forms the initial
conditions with two adder chains, counts time units and drives:

| time unit `t` | edge input                                                  |
|---------------|-------------------------------------------------------------|
| 1             | `H1(i)` into the left end of every row                      |
| `j + 3`       | tuple `u = 0` into the top of column `j`: `S_{j-1}(0)`, `H2(j)` |
| `2i + 3`      | identification signal with `S_0(i)` into the left of row `i`  |

Time unit 1 is the cycle after the `start` edge. At `t = 2M+N+3` the sequencer
latches `S_N(M)` and pulses `res_valid`, so the error is on the `err` port
during time unit `2M+N+4`. Only one comparison is in the array at a time:
`start` is ignored while `busy` is high.

## Recovering the packing: the backtracking tag

When `path = 1`, a tag carrying a target row goes through the array after
the error is known:

1. The tag enters PE(M,N) from the right at time unit `2M+N+4`, with target
   `M`.
2. In a column, a PE whose row is not the target passes the tag up one row.
3. The PE whose row equals the target reports a *hit*. The box of that
   column ends at this input level. The PE sends its stored `u` one column
   to the left as the new target.
4. Target 0 means that all the remaining boxes are empty. Row 1 accepts it
   as an "empty" hit and passes 0 on.

The tag makes at most `M-1` upward moves and `N` left moves, so
backtracking ends within `M+N` time units. `rtl/pc_bt_collect.sv` turns the
hits into `last_lvl[j-1]`, the last input level mapped onto reference level
`j` (`X_j - 1`), or 0 for an empty box. It also returns `unpacked`, the
target left after column 1. That target is always 0 for an optimal packing:
by the triangle inequality, packing leading levels into box 1 never costs
more than leaving them out.

With `path = 0` the operation ends as soon as the error is out (`done` at
the same time as `res_valid`). This is the lighter mode for applications
that need only the matching error.

## Comparing many pictures: pc_match_select

To find which of several pictures best matches a reference, run them one
after another, usually with `path = 0`. `rtl/pc_match_select.sv` numbers the
results with a counter and keeps the smallest error with its number in a
two-part register. The first of several equal errors wins. `clear_best`
starts a new series. The error register starts at its maximum, so the first
result is always taken.

## The one-dimensional engine: pc_linear

`rtl/pc_linear.sv` computes the same `S_N(M)` with a single column of `M`
PEs. It is the partitioned form for when an `M x N` grid is too large. The
column is computed `N` times:

- A feedback register in each row holds `S_0(i)` at first. At the end of
  each pass it takes that pass's `S_j(i)`.
- The identification signal of the next pass brings the register's value
  back into the PE.
- Passes start `M+1` time units apart. That is the smallest spacing at which
  a PE's work for two passes cannot overlap.
- A shift register carries the identification signal down the column, one
  row every two time units. The rows of consecutive passes therefore
  overlap without extra control.

The result is ready at time unit `2M+4+(N-1)(M+1)`, which is O(MN). This
engine gives the error only. The top instantiates it beside the grid. It
shares the `h1`/`h2` inputs and has its own `lin_start`, `lin_busy`,
`lin_done` and `lin_err` ports.

## Top level: picture_comparator

`rtl/picture_comparator.sv` connects `pc_sequencer`, `pc_array` (the grid of
`pc_pe`), `pc_bt_collect`, `pc_match_select` and `pc_linear`. Ports:

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock (one time unit per cycle), asynchronous active-low reset |
| `start`, `path` | in | start a comparison; `path=1` also backtracks |
| `h1[M]`, `h2[N]` | in | histograms, `h1[i-1] = H1(i)`, sampled at `start` |
| `busy`, `done` | out | operation in progress / one-cycle end pulse |
| `res_valid`, `err` | out | `S_N(M)`, one-cycle pulse |
| `last_lvl[N]`, `unpacked`, `path_valid` | out | the packing |
| `clear_best`, `best_err`, `best_idx`, `count` | in/out | best-match register |
| `lin_start`, `lin_busy`, `lin_done`, `lin_err` | in/out | one-dimensional engine |

Parameters:

- `M = 16`, `N = 16`: gray levels.
- `HW = 16`: bits per histogram bin.
- `PW = 8`: bits of the picture number.

The widths are derived in `rtl/pc_pkg.sv`. Errors use
`HW + clog2(2M+N) + 1` bits and the signed remainder `HW + clog2(M+1) + 2`
bits, so no histogram with `HW`-bit bins can overflow. At the defaults the
design has 272 PEs and about 43k flip-flops, most of them in the PEs' tuple
registers.

## Where this design departs from, or adds to, the original scheme

- **Sizes.** The scheme leaves the array size symbolic. The 16 x 16 levels
  and 16-bit bins are choices made here. For 256-level pictures, set
  `M = N = 256`. That gives 65,536 PEs, and the cycle counts scale as stated
  above.
- **Range of u.** The recurrence runs over `u = 0 .. i`. `u = i` is the
  "box `j` empty" term, compared when the identification signal arrives.
- **Running remainder.** A PE does not receive a prefix sum of `H1`.
  Instead, each tuple carries the remainder `r` and each PE subtracts its
  own `H1(i)`. The result is the same, and each PE needs only one
  subtracter.
- **H1 loading.** All `H1(i)` are loaded at time unit 1 and each PE keeps
  its own, instead of arriving skewed.
- **Interfaces.** The handshakes are choices made here: `start`/`busy`/`done`,
  and valid and `first` flags on the links.
- **Best-match register.** It is initialised to its maximum rather than 0.
  Starting at 0, a smaller error could never replace it.
- **Several pictures.** Comparisons run one after another: a series of `P`
  comparisons takes about `P(2M+N+5)` cycles. They are not overlapped in the
  array, and no three-dimensional `P x M x N` array is provided.
- **Backtracking.** Only the index-register-and-tag method is built. The
  other options need a host or a separate search unit: the host computer
  does the backtracking, or a dedicated unit searches the index pairs, or
  each PE keeps a growing index list. The one-dimensional engine does not
  backtrack.
- **K x l partitioning.** A two-dimensional array smaller than `M x N`,
  with feedback queues, is not built. Its queue lengths depend on `M` and
  `N`, and the one-dimensional engine covers the partitioned case.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog.
`tb/pc_ref_pkg.sv` is a plain software model of the recurrence, the trace
back and the cost of a packing.

- `tb_picture_comparator` runs the whole design at the default size. It
  uses random, rebinned (exact match exists), sparse and full-scale
  histograms. It checks:
  - the error value, and that it appears exactly at time unit `2M+N+3`;
  - every packing boundary, and that the reported packing costs exactly
    the reported error;
  - that backtracking ends within `M+N` time units;
  - the best-match register over a series of pictures;
  - the one-dimensional engine's error and its time unit.

  It also counts each mechanism: error-only runs, path runs, empty boxes,
  tag 0 reaching row 1, best-match replaced and kept, and one-dimensional
  runs. It fails if any of them never happened.
- `tb_pc_pe`, `tb_pc_array`, `tb_pc_sequencer`, `tb_pc_bt_collect`,
  `tb_pc_match_select` and `tb_pc_linear` test the parts, at reduced sizes
  where that helps.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing -Irtl -Itb rtl/pc_pkg.sv tb/pc_ref_pkg.sv rtl/*.sv \
    tb/tb_picture_comparator.sv --top-module tb_picture_comparator
./obj_dir/Vtb_picture_comparator
```

For a unit test, replace the last file and the top module. Add `--assert`
to turn the handshake assertions on.
