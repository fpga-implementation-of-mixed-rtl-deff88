# Multi-core MIQP solver: branch and bound over pipelined QP cores

A mixed integer quadratic program (MIQP) minimises `½xᵀHx + gᵀx` under linear
equality and inequality constraints, with some entries of `x` restricted to
integers. Hybrid-system control of a mobile robot needs such problems solved
online and at low power. This design solves them by **branch and bound**: the
integer restrictions are dropped, the resulting QP "child sub-problems" are
solved, and the search tree is split on variables that came out fractional
and pruned where a sub-problem cannot beat the best integer solution found so
far. Each QP is solved by a **dual active set** (Goldfarb-Idnani) method,
which needs one "first point" (the unconstrained minimum). That point is the
same for every child, so it is computed once and reused. Several **QP solver
cores** work on different children at the same time, and the hot loops inside
a core are pipelined.

The RTL covers the system around the cores and the cores' arithmetic:

| file | block |
|---|---|
| `rtl/miqp_pkg.sv` | word format, sizes, record / solution / command types |
| `rtl/miqp_top.sv` | the whole solver |
| `rtl/input_module.sv`, `rtl/output_module.sv` | 8-bit host link to and from 36-bit words |
| `rtl/fp_calc.sv` | first point calculator: solves H·x₀ = −g once |
| `rtl/sram_arb.sv`, `rtl/spram.sv` | the two 36-bit local buses with their single-port SRAMs |
| `rtl/seq_ctrl.sv` | sequence control: child queue → idle cores |
| `rtl/bb_unit.sv` | branch-and-bound module: bound, branch, keep the incumbent |
| `rtl/qp_core.sv` | QP solver core arithmetic engine |
| `rtl/dot_pipe.sv` | pipelined dot product (n+3 cycles) |
| `rtl/nr_divider.sv` | pipelined non-restoring divider (N+1 = 37 cycles) |

One part is **not** in the RTL: the **dual active set sequencer** of each
core. This is the control that runs the Goldfarb-Idnani iterations: adding
and dropping constraints, updating the factors, choosing step lengths. Its
connections are ports of `miqp_top`, so it can be attached later.
`tb/qp_solver_model.sv` is a behavioural stand-in for it, used in simulation
only.

## Number format

Every word is 36-bit two's complement fixed point with 16 fractional bits
(`FRAC` in `miqp_pkg`). One is `1 <<< 16`. Multiplications keep the full
product, shift it right by `FRAC` and truncate it back to 36 bits.
Accumulators wrap; they do not saturate. The 36-bit width is the published
one. The 16-bit fraction is this design's choice.

## Data flow through `miqp_top`

```
host bytes ─► input_module ─► local bus 1 ─ SRAM1 (4096 x 36: problem | first point | child queue)
                                   ▲   ▲
   fp_calc (reads H, g; writes x0) │   │
   QP sequencers (ext1_* port)     │   │ queue tail (push)      queue head (pop)
                                   │   └──── bb_unit ◄──solution── seq_ctrl ──problem──► core k
                                   │           │                      ▲                 (qp_core +
                                   │           ▼                      └──solution─────── sequencer)
                                   │     local bus 2 ─ SRAM2 (17 x 36: x[0..15], f*)
                                   │           │
                                   └───────────┴──► output_module ─► host bytes
```

1. **Load.** The host sends five bytes per 36-bit word, least significant
   byte first. The first word is a header:
   - bits [15:0]: which of the 16 variables are binary;
   - bits [27:16]: how many problem words follow.

   The problem words are H (16×16, row-major) then g, then whatever further
   data the QP sequencers use. `input_module` writes them to SRAM1 from
   address 0 and pulses `problem_loaded`.
2. **First point.** `fp_calc` reads H and g, solves H·x₀ = −g and writes x₀
   at `FP_BASE` (2048). It then pulses `search_start`, which is an output.
   See below for how it solves the system.
3. **Search.** `bb_unit` clears the incumbent (SRAM2 objective ← largest
   word) and pushes the root record. `seq_ctrl` pops records and hands them to
   idle cores. Solutions come back through `seq_ctrl` to `bb_unit`, which
   prunes them or pushes two children, or else records a new incumbent.
4. **Finish.** `done` rises when all of these hold:
   - the queue is empty;
   - no core holds a problem;
   - `bb_unit` is idle.

   `output_module` then sends SRAM2: x₀…x₁₅, then the optimal value, five
   bytes per word. If the value is `FX_MAX`, no integer-feasible point was
   found.

### Child sub-problem records

A child is one 36-bit word (`prob_rec_t`): `fix_mask[15:0]` marks the fixed
variables and `fix_val[15:0]` gives the values they are fixed to. So the
integer variables are **binary (0/1)**. This is the simple child data
structure that lets one SRAM word hold a whole child. General integer bounds
would need a different record. The queue is a circular first-in first-out
buffer of 1024 records at SRAM1 address 3072. `bb_unit` owns the tail and
`seq_ctrl` owns the head (both pointers carry one extra wrap bit).

### Branch and bound rules (`bb_unit`)

- **Bounding.** A solution is dropped if it is infeasible or if its
  objective is `>=` the incumbent.
- **Branching.** Otherwise the lowest-numbered binary variable whose
  fractional part lies strictly between 1/256 and 1 − 1/256 is chosen. Two
  children are pushed: first the one fixing the variable to 0, then the one
  fixing it to 1.
- **Incumbent.** If no binary variable is fractional, x is written to SRAM2
  with binary entries rounded, followed by f. The incumbent is set to f.
- **Queue full.** If a child does not fit, it is dropped and `q_overflow` is
  set. The queue holds 1024 open children. The search is breadth-first,
  and with 16 binary variables a tree that prunes little can exceed that, so
  check `q_overflow` after a run: if it is set, the result may not be
  optimal.

The problem-index table inside `bb_unit` is one word per core. It stores the
record that core is solving; `seq_ctrl` writes it on dispatch, and `bb_unit`
reads it back when that core's solution arrives.

### Assigning sub-problems (`seq_ctrl`)

Records leave the queue in the order they were generated. Each goes to the
lowest-numbered idle core. A core stays busy until its solution is accepted.
Cores therefore finish in any order, and a fast core keeps taking new work
while a slow one is still busy. With two cores, problem 0 goes to core 0; its
children 1 and 2 go to cores 0 and 1; if 2 finishes first, its child 3 goes
to core 1 straight away. Every dispatch costs about 3 cycles: bus grant,
SRAM read, issue. When several cores finish together, their solutions go to
`bb_unit` lowest core first.

### Local buses (`sram_arb`)

Each SRAM sits behind a fixed-priority arbiter. Lower index wins, and the
grant comes in the same cycle as the request. A requester holds its request
until granted. Read data come one cycle after the grant, on a shared `rdata`,
marked by the requester's `rvalid` bit. An assertion checks that grants are
one-hot.

| bus | master 0 | master 1 | master 2 | master 3 | master 4 |
|---|---|---|---|---|---|
| bus 1 (SRAM1) | `bb_unit` | `seq_ctrl` | `input_module` | `fp_calc` | `ext1_*` |
| bus 2 (SRAM2) | `bb_unit` | `output_module` | | | |

## First point calculator (`fp_calc`)

The first point is the unconstrained minimum x₀ = −H⁻¹g. Every child
sub-problem starts from it, so it is computed only once per MIQP.
- `fp_calc` copies [H | −g] (16×17 words) into its own single-port work
  space.
- It runs Gaussian elimination without pivoting. H is symmetric positive
  definite, so the pivots are positive.
- The pivot row sits in a register array, so each element update needs one
  work-space read and one write.
- Each row multiplier comes from the calculator's own pipelined divider.
- Back substitution then divides once per entry.

For 16 variables this takes 9,538 cycles when the bus is free. It is
accurate to about 2⁻⁹ for well-scaled H with 16 fractional bits. The `ovf`
flag reports a saturated division, which means a singular or badly scaled H.

## Inside a QP solver core

The dual active set method spends most of its time in three loops:
- fixed-point division;
- the inequality values `s_j = a_jᵀx − b_j`, used to find the most violated
  constraint;
- the step vectors, which are matrix-vector products.

Only single-port RAM is available, so a loop cannot read two memory words per
cycle. The fix is to hold one operand in a register array and stream the
other out of the work-space SRAM.

### `nr_divider`

Non-restoring division on magnitudes:
- Start: P = |a|·2^FRAC; the divisor weight is |b|·2^(N−1).
- Each step:
  - **Op.A**: subtract the weighted divisor if P ≥ 0, otherwise add it; then
    halve the weight.
  - **Op.B**: the quotient bit is 1 if the new P ≥ 0.
- End: the sign a⊕b is applied.

The bits of this recurrence are exactly ⌊P/|b|⌋. Op.B of step i runs in the
same cycle as Op.A of step i+1, in a chain of pipeline registers. So a
division takes **N+1 = 37 cycles** instead of 2N = 72, and a new one can
start every cycle. Two cases set `ovf` and saturate the result to ±(2³⁵−1):
a quotient of 2³⁵ or more, and a divisor of zero.

### `dot_pipe`

The pipeline has four stages: address, SRAM read, multiply, accumulate. One
element enters per cycle. If `start` is seen in cycle t, `done` is high in
cycle **t+len+3**, so 19 cycles for n = 16 instead of 4n = 64. The result
stays valid until the next start.

### `qp_core`

The core is a command engine around the work-space SRAM (1024 words), a
17-entry vector register array, one `dot_pipe` and one `nr_divider`:

| command | effect |
|---|---|
| `QC_WR_MEM` | work space[addr] ← data |
| `QC_RD_MEM` | respond with work space[addr] |
| `QC_WR_VEC` | vreg[addr] ← data |
| `QC_MATVEC` | for j < rows: y_j = Σ_{i<len} W[addr+j·len+i]·vreg[i], stored at out_base+j; respond with min y_j and its j |

For inequality values, store each row as `[a_j, −b_j]` and the vector as
`[x, 1]` (len = n+1). The smallest response is then the most violated
constraint. Each row takes len+5 cycles: len+3 for the dot product, one cycle
to write back and one to restart. Step vectors use the same command without
the minimum. The divider is reached directly through `div_*` and is not
blocked by commands.

## Parameters

| parameter | default | where |
|---|---|---|
| `WORD_W` | 36 | package; published |
| `FRAC` | 16 | package; chosen here |
| `NVAR` | 16 | package; published problem size |
| `K` / `NCORE` | 2 | top; published configuration (1 or 2 cores evaluated) |
| `SRAM1_DEPTH` | 4096 words = 147,456 bit (≈148 Kbit published) | package |
| `SRAM2_DEPTH` | 17 words = 612 bit (published) | package |
| `Q_BASE`, `Q_DEPTH`, `FP_BASE` | 3072, 1024, 2048 | package; chosen here |
| `WS_DEPTH` | 1024 | package; chosen here |
| `TOL` | 1/256 | `bb_unit`; chosen here |

`K` may be raised (the published study goes up to 16 cores). Raising `NVAR`
beyond 16 needs a wider child record: `prob_rec_t` has only 4 spare bits.

## Where this departs from the published design

- No dual active set sequencer (see above). Without an outside sequencer,
  the cores cannot solve a QP by themselves.
- The input module writes the problem into SRAM1 directly, and `fp_calc`
  reads it from there. In the published design the problem passes through
  the first-point calculator, which writes both the problem and the first
  point. The elimination method inside `fp_calc` is this design's choice.
- Only binary integer variables, because of the one-word child record.
- All of these are choices made here, not published:
  - the byte order and header;
  - the SRAM1 memory map;
  - the bus arbitration;
  - the command set of the core engine;
  - the branching rule, the tolerance and the queue-overflow behaviour;
  - signed handling and saturation in the divider.
- The published NAND-gate counts, the 67 MHz result and the 4.2 W power
  figure refer to the FPGA build of the full solver. Nothing here reproduces
  them.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_miqp_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/miqp_pkg.sv tb/tb_miqp_top.sv
./obj_dir/Vtb_miqp_top
```

Replace `tb_miqp_top` by `tb_nr_divider`, `tb_dot_pipe`, `tb_qp_core`,
`tb_bb_unit`, `tb_seq_ctrl`, `tb_sram_arb`, `tb_spram`, `tb_input_module` or
`tb_output_module` or `tb_fp_calc` to run the others.

What the unit testbenches check:
- `tb_nr_divider`: 400 streamed divisions against a 128-bit reference, and
  the 37-cycle latency.
- `tb_dot_pipe`: results and the len+3 latency.
- `tb_qp_core`: every stored s_j, the minimum and its index, the sweep cycle
  count and the divider stream.
- `tb_bb_unit`: a hand-played search.
- `tb_seq_ctrl`: FIFO order, lowest-idle-core choice and the completion
  condition.
- `tb_fp_calc`: a random SPD system against a double-precision solution, and
  a diagonal one exactly.

`tb_miqp_top` runs the solver at its default parameters (16 variables, 2
cores) from start to finish:
1. It sends a 16-variable problem over the byte link. The objective is
   separable, 6 variables are binary, and binaries 0 and 1 must not both
   be 1.
2. The design computes the first point itself and starts the search. The
   testbench checks x₀ in SRAM1 against quotients from core 0's divider.
3. Two `qp_solver_model` instances solve the sub-problems. They compute gᵀx
   on the real core engines and finish after random delays.
4. It compares the optimal value and solution sent to the host with a
   brute-force search over all binary assignments.

The testbench also counts how often each mechanism happened and fails if one
never did. The mechanisms are branching, pruning by bound, pruning by
infeasibility, incumbent updates, both cores busy at once, dispatch while
another core is busy, and a queue holding several records. A typical run
solves about 25 sub-problems in under 2,000 cycles.
