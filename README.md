# Double-precision Jacobi solver in SystemVerilog

This RTL computes one step of the Jacobi iteration for a linear system `A x = b`
in IEEE-754 double precision:

    x_i(new) = (1 / a_ii) * ( b_i - sum over j != i of a_ij * x_j(old) )

The circuit is deeply pipelined and K lanes wide. K matrix values enter every
clock cycle, a tree of K multipliers and K-1 adders turns them into one partial
sum per cycle, and a serial reducer adds up each row's partial sums. A
subtract-and-scale back end then produces one element of `x(new)` per row. The
slow divider stays off the critical path because every `1/a_ii` is computed
while its row is still in the tree.

There are two circuits, placed side by side in `jacobi_top`:

| circuit | module | matrix | default size |
|---|---|---|---|
| dense | `jac_core` | full N x N, streamed row by row | N = 64, K = 8 |
| sparse | `sjac_core` | compressed sparse row (CSR) | N = 4929, K = 8, up to 64 non-zeros per row |

They share the tree, the reducer and the back end. They differ in how `x` is
stored and how the matrix is streamed in.

The structure, the latencies and the cycle counts follow a published design:
an FPGA Jacobi solver on a Xilinx Virtex-II Pro with n = 64, k = 8 and
floating-point cores of latency 10 (multiply), 14 (add) and 58 (divide). The
floating-point cores, the reducer's insides and the port protocol are this
design's own. The section "Where this RTL departs from the original" lists
every such choice.

## Data flow

```
        x(old) ──► x stores (K lanes) ──┐
                                        ▼
 A ──► input reg ──► leaf reg ──► K multipliers ──► adder tree (lg K levels)
          │                                            │ one partial sum / cycle
          │ a_ii (diagonal mux)                        ▼
          ▼                                         reduce ──► b_i - sum ──► × 1/a_ii ──► x_i(new)
       1.0 / a_ii (divider, 58 cycles) ──► D^-1 store ───────────────────────────┘
                                             b store ──► b_i
```

### Dense circuit (`jac_core`)

1. **Load.** `x(old)` and `b` come in one K-vector per cycle. Word `w` holds
   elements `w*K .. w*K+K-1`. In the `x` store, lane `h` of every word is the
   block RAM that feeds leaf multiplier `h`. Because `x` is strided this way,
   leaf `h` only ever needs elements `j` with `j mod K = h`.
2. **Start.** A one-cycle `start` pulse clears the row and block counters. It
   may share a cycle with the last `b` write.
3. **Stream A.** Each row is sent as N/K K-vectors, one per `a_valid` cycle.
   Idle cycles between `a_valid` cycles are allowed. A K-vector first goes
   into an input register. From there the control issues the read of block
   `t` of `x`. The matrix values wait one more cycle in the leaf register, so
   both arrive at the multipliers together.
4. **Diagonal.** In block `i / K` of row `i`, lane `i mod K` holds `a_ii`.
   That lane is flagged "ignore", and its matrix operand is replaced by zero
   before the multiplier. This removes `a_ii x_i` from the sum. The same value
   goes to the divider as `1.0 / a_ii`, and the result is written to the
   D^-1 store at address `i`.
5. **Tree and back end.** See below. `x_i(new)` leaves on
   `x_new_valid / x_new_idx / x_new_data`, rows in order. `done` marks row N-1.

### Sparse circuit (`sjac_core`)

The matrix comes as CSR:

- `val`: the non-zero values, row by row.
- `col`: the column of each value.
- `ptr`: where each row starts in `val`.

Row `i` has `len_i = ptr[i+1] - ptr[i]` non-zeros. Loading and streaming work
differently from the dense circuit:

- **Full copy of x per leaf.** A lane may need any element of `x`, and a block
  RAM delivers one value per cycle. Each of the K leaves therefore has its own
  complete copy of `x`. One load cycle writes the same K-vector into all K
  copies, so loading takes no more cycles than in the dense circuit. Leaf `h`
  reads word `col_h / K`, lane `col_h mod K`, of its copy.
- **ptr store.** `ptr` (N+1 entries of 16 bits) is loaded like `x`. The
  control keeps `ptr[i]` and `ptr[i+1]` of the current row in two read
  ports. It reads them one cycle ahead, so `len_i` is ready when the row's
  first K-group arrives. The first group may follow `start` one cycle later.
- **K-groups.** Each row is sent as `ceil(len_i / K)` K-groups of
  `(val, col)` pairs. The host pads the last group to K lanes with any values
  and any valid column. The control counts groups within the row, ignores
  lanes past `len_i`, and flags the row's last group for the reducer.
- **Diagonal.** A used lane whose `col` equals the row index holds `a_ii`. It
  is ignored in the tree and sent to the divider, as in the dense circuit.
  Every row must contain its diagonal element.
- **ptr arithmetic.** Only differences of `ptr` entries are used. `ptr` may
  therefore start at 0 or 1 and may wrap past 2^16, which matters for
  matrices with more than 65535 non-zeros. `col` and the row index are
  0-based.

### Tree (`reduction_tree`)

The tree has K leaf multipliers and `lg K` levels of adders; the adder at each
level sums lanes `2j` and `2j+1`. It accepts one K-vector per cycle. Its
partial sum leaves `ALPHA_M + ALPHA_A * lg K` cycles later: 10 + 14·3 = 52
cycles at the defaults. A tag bit, "last K-vector of the row", travels
alongside.

### Reducer (`reduce_unit`): the part that needs the most care

Each row delivers N/K partial sums on successive cycles; in the sparse circuit
it is the row's number of groups. These must be added to one value. A simple
accumulator loop does not work, because the adder has a latency of 14 cycles
while a new value arrives every cycle.

This reducer lays a binary addition tree out in time:

- Level `l` holds at most one waiting value.
- When the next value of the same row arrives, the pair enters that level's
  pipelined adder.
- When a row ends on an unpaired value, that value is added to zero, so the
  row still leaves the level as a single stream in order.
- After `ceil(lg M)` levels each row is one value.
- Rows may follow each other with no gap, and row order is kept.
- Each level's adder receives at most one operand pair per cycle, and each
  level passes on at most half as many values as it receives. No back-pressure
  is needed.

The original design uses a reduction circuit from other work and specifies
only its latency, counted from the row's first value:

    alpha_r = m + 2^(ceil(lg m) + 1) + (alpha_a - 1) * ceil(lg m) - 2    (61 for m = 8, alpha_a = 14)

This reducer's own latency is `M - 1 + ceil(lg M) * ALPHA_A` (49 at the
defaults). A delay line adds the difference (12). A row of M back-to-back
values therefore finishes exactly `alpha_r` cycles after its first value, and
the original cycle budget holds. For any row, the result leaves a fixed
`alpha_r - (M - 1)` = 54 cycles after the row's last value.

The price is `ceil(lg M)` adders instead of one. An assertion rejects rows with
more than `2^ceil(lg M)` partial sums.

### Back end (`jacobi_backend`)

Rows leave the reducer in order, so a counter names the row of each sum. The
`b` store and the D^-1 store are read one cycle ahead at the counter's next
value, so `b_i` and `1/a_ii` are ready in the same cycle as the sum. The
subtraction `b_i - sum` takes `ALPHA_A` cycles, and `1/a_ii` rides along as a
tag. The output multiplier then takes `ALPHA_M` cycles.

The reciprocal for row `i` must be in the D^-1 store before row `i` leaves the
reducer. An assertion checks this. At the defaults the margin is large: in
the dense circuit the reciprocal is ready about 60 cycles after `a_ii` enters,
and it is needed about 115 cycles after.

## Cycle budget (dense circuit, defaults)

| step | cycles |
|---|---|
| load x(old) | 8 (N/K) |
| load b | 8 (N/K) |
| input register for the first K-vector of A | 1 |
| x read, leaf register | 1 |
| tree | 52 |
| reduce | 61 |
| subtract | 14 |
| multiply, gives x_0(new) | 10 |
| remaining 63 rows, 8 cycles each | 504 |
| **total** | **659** |

So `x_0(new)` appears 139 cycles after the first `a_valid`, and the last
element appears 643 cycles after it. The testbenches check these counts to the
cycle.

In the sparse circuit, a row's result appears 132 cycles after its last
K-group: 2 + 52 + 54 + 14 + 10. One row costs `ceil(len_i / K)` cycles of
input.

The sparse circuit was run at its default size on synthetic systems with the
order `n` and non-zero count `n_z` of eight common benchmark matrices. These
systems have random columns, row lengths around `n_z / n`, and a dominant
diagonal. The table gives the cycles from `start` to the last result. The
estimate `n * nz_av / K` assumes that rows share K-groups. Here each row
starts a fresh K-group, which costs 10 % to 76 % more K-groups on these systems.

| system | n | n_z | K-groups | last result | n * nz_av / K |
|---|---|---|---|---|---|
| rdist1 | 4134 | 94408 | 13653 | 13785 | 11885 |
| gemat11 | 4929 | 33108 | 6611 | 6743 | 4312 |
| lns_3937 | 3937 | 25407 | 5189 | 5321 | 2952 |
| sherman5 | 3312 | 20793 | 4269 | 4401 | 2484 |
| mcfe | 765 | 24382 | 3365 | 3497 | 3060 |
| jpwh_991 | 991 | 6027 | 1255 | 1387 | 743 |
| bp_1600 | 822 | 4841 | 1037 | 1169 | 616 |
| str_600 | 363 | 3279 | 590 | 722 | 408 |

## Floating-point units

`fp_mul`, `fp_add` (also used to subtract) and `fp_div` are IEEE-754 binary64
units. Each accepts one operation per cycle and has a fixed latency:
`ALPHA_M` = 10, `ALPHA_A` = 14 and `ALPHA_D` = 58.

- Results are correctly rounded to nearest, ties to even.
- Subnormal inputs are read as zero, and subnormal results are flushed to
  zero.
- NaN results are the canonical quiet NaN.

The arithmetic lives in functions in `jacobi_pkg`. Each module computes its
result in the first pipeline stage and carries it, with a side tag, through
`LAT-1` more registers. This reproduces the latency and throughput of real
pipelined cores, but not their timing: at the original 13 ns clock, a real
implementation would have to spread the arithmetic over the stages. The
divider uses a 109-bit integer division.

## Interfaces

All ports are plain valid-strobed signals with no back-pressure. The circuit
accepts one item per cycle indefinitely.

| port (dense / sparse) | meaning |
|---|---|
| `clk`, `rst_n` | clock; asynchronous active-low reset. It clears pipeline valid bits and counters, not the stores. |
| `x_wr_en, x_wr_addr, x_wr_data[K]` | load `x(old)`, one K-vector (word) per cycle |
| `b_wr_en, b_wr_addr, b_wr_data[K]` | load `b` |
| `ptr_wr_en, ptr_wr_addr, ptr_wr_data[K]` | sparse only: load `ptr`, N+1 entries of 16 bits |
| `start` | pulse: new iteration, clears the row counters |
| `a_valid, a_data[K]` | dense: A row by row, N/K K-vectors per row |
| `val_valid, val_data[K], col_data[K]` | sparse: K-groups, each row padded to whole groups |
| `x_new_valid, x_new_idx, x_new_data` | one element of `x(new)` per row, in row order |
| `done` | high together with the last row's result |

For the next iteration, write the returned values back through `x_wr_*` and
stream the matrix again. Do not overwrite `x` while an iteration is still
reading it. In `jacobi_top` the ports carry the prefixes `jac_` and `sjac_`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 64 | dense matrix size (multiple of K) |
| `K` | 8 | data path width, a power of two |
| `M` | 8 | maximum partial sums per row in the reducer (dense: N/K) |
| `ALPHA_M`, `ALPHA_A`, `ALPHA_D` | 10, 14, 58 | multiplier, adder, divider latency |
| `SN` | 4929 | sparse matrix size |
| `SM` | 8 | sparse: up to SM·K non-zeros per row |

All except `SN` come from the original configuration. `SN` is sized for the
largest sparse matrix the original design was evaluated against (gemat11,
n = 4929). The original evaluation also used matrices of 363 to 4134 rows
with 6 to 32 non-zeros per row on average. Those matrices have zeros on
their diagonals, so they serve only as performance cases and cannot be
solved by a Jacobi step.

## Where this RTL departs from the original

- **Not built:** the simpler first form of the solver. That form feeds a
  whole matrix row per cycle into an N-leaf tree and divides at the end of
  the pipeline. The circuits here replace it with a K-wide tree, a reducer
  and a stored `1/a_ii`.
- **Floating-point cores:** built here as described above. The originals were
  third-party pipelined cores, and their area and clock rate are not
  reproduced.
- **Reducer:** built here as described above. It uses `ceil(lg M)` adders and
  is padded to the original latency formula.
- **Dense ordering:** N must be a multiple of K. The host streams A and reads
  results. There is no on-chip matrix storage and no host link, because the
  original specifies neither.
- **Sparse rows:** each row starts on a fresh K-group. The original speaks of
  K-groups "of the first matrix row" and counts `nz_av / K` cycles per row.
  Lanes past the row length are masked using `ptr`. How the original uses
  `ptr` and finds the diagonal is not specified, so the rules here (diagonal
  is `col == row`, every row must have it) are this design's own.
- **Stores:** the sparse circuit's `ptr` store has two read ports, for
  `ptr[i]` and `ptr[i+1]`.
- **Ignored lanes:** diagonal and unused lanes are removed by zeroing the
  matrix operand. With an `x` element that is infinite or NaN, this yields
  NaN instead of ignoring the lane.

## Verification

Each testbench checks its results to the bit. The expected values come from
the simulator's own IEEE doubles, adding in the circuit's order
(`tb/tb_ref_pkg.sv`): pairwise within a K-vector, then pairwise over a row's
partial sums, with odd leftovers added to zero.

| testbench | what it runs |
|---|---|
| `tb_fp_mul`, `tb_fp_add`, `tb_fp_div` | 400 operations each: special values plus random operands (near-cancelling pairs for the adder, reciprocals for the divider); latency exact |
| `tb_kvec_store` | random writes and two-port reads; read-during-write returns old data |
| `tb_reduction_tree` | 300 K-vectors with random ignored lanes and idle cycles; 52-cycle latency |
| `tb_reduce_unit` | 200 rows of 1..8 values, back to back and with gaps; 61 cycles from the first value of a full row, 54 from the last value of any row |
| `tb_jacobi_backend` | rows of 1..4 partial sums, reciprocals sent in shuffled order, restart |
| `tb_jac_core` | 64 x 64 system, two iterations (the second with idle cycles); 139 / 659 cycle counts |
| `tb_sjac_core` | 45-row sparse system (M = 4), rows of 1..32 non-zeros, garbage in padded lanes, two iterations |
| `tb_sjac_workloads` | the sparse circuit at its default size on eight benchmark-sized synthetic systems (table above), up to 94,408 non-zeros: every result, its 132-cycle delay and the streaming cycle count |
| `tb_jacobi_top` | both circuits at the default sizes: two dense iterations, plus one sparse iteration over 4929 rows with `ptr` wrapping past 2^16. It counts diagonal removals, reciprocals, odd reducer leftovers, masked groups, single- and multi-group rows, idle cycles and the wrap, and fails if any count is zero. |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/jacobi_pkg.sv rtl/delay_line.sv rtl/fp_mul.sv rtl/fp_add.sv rtl/fp_div.sv \
  rtl/kvec_store.sv rtl/reduction_tree.sv rtl/reduce_unit.sv rtl/jacobi_backend.sv \
  rtl/jac_core.sv rtl/sjac_core.sv rtl/jacobi_top.sv \
  tb/tb_ref_pkg.sv tb/tb_jacobi_top.sv --top-module tb_jacobi_top -o sim
./obj_dir/sim
```

The full-size top-level test builds in about 20 s and runs in well under a
second.

Not verified: subnormal and overflowing operands in the full circuits,
operation at a real FPGA clock rate, and synthesis results on an FPGA.

## Files

- `rtl/jacobi_pkg.sv`: `fp64_t`, the binary64 multiply, add and divide
  functions, and the reducer latency formula.
- `rtl/delay_line.sv`, `rtl/fp_mul.sv`, `rtl/fp_add.sv`, `rtl/fp_div.sv`:
  pipelines.
- `rtl/kvec_store.sv`: block-RAM store of K-vector words.
- `rtl/reduction_tree.sv`, `rtl/reduce_unit.sv`, `rtl/jacobi_backend.sv`:
  the shared data path.
- `rtl/jac_core.sv`, `rtl/sjac_core.sv`, `rtl/jacobi_top.sv`: the circuits
  and the top.
- `tb/`: the testbenches above and `tb_ref_pkg.sv`.
