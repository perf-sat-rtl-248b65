# Perf-Sat: run-time thread block throttling for a GPU work distributor

A GPU hides memory latency by keeping many warps resident on each core (SM),
and its thread block scheduler normally packs every SM with as many blocks as
the SM's resources allow. That count, N_max, is not always the best one. Past
some point more blocks only trade scoreboard stalls (warps waiting for a
result) for pipeline stalls (warps waiting for a busy unit, an MSHR, a memory
queue) and cache contention. Performance then flattens out or even drops. The
kernel still occupies registers and thread slots that could be power-gated or
handed to another kernel.

This RTL adds a small controller to each SM, Perf-Sat, that finds this
saturation point while the kernel runs. It watches one number per sample
period: the **stalled cycle count**, the scoreboard stall cycles plus the
pipeline stall cycles. It moves the SM's block limit one block at a time while
that number keeps falling, and stops where it turns. It needs no tuned
thresholds. Every decision is a comparison between two samples of the same
core.

The work distributor here has four parts:

* `nmax_calc` works out N_max from the kernel's per-block needs.
* `tb_scheduler` issues blocks to SMs in round-robin order, each SM kept below
  `min(N_max, limit[i])`.
* One `stall_classifier` per SM sorts each of that SM's cycles into active,
  scoreboard stall, pipeline stall or idle.
* One `perfsat_unit` per SM produces `limit[i]`.

The SMs themselves are not part of the RTL. They connect through ports. Each
SM takes issued blocks and reports every cycle whether it issued an
instruction, the status of each warp slot, and block completions.

## The detection algorithm

Each Perf-Sat unit goes through three phases per kernel.

### 1. Sample period

Samples must be long enough that the phase behaviour of individual warps
averages out. A sample that catches a compute-heavy stretch must not be
compared with one that catches a memory-heavy stretch. The unit starts the
core at `N0 = ceil(N_max/2)` blocks and counts the cycles until the core's
first block completes (`One_TB_cycles`). The sample period is then fixed at
`One_TB_cycles * N_max`, roughly the time it takes N_max blocks to run. The
first window starts the cycle after that first completion. Windows then follow
each other without a gap.

### 2. Direction of throttle

The optimum may lie above or below N0. The machine has four decision states:
weak-increase, weak-decrease, strong-increase and strong-decrease. It keeps
three pieces of state:

* **PS**, the stored sample;
* **H**, the history bit;
* **D**, the direction bit.

A sample from the current period is called **CS**. Fewer stalled cycles is
better.

* After the first window (at N0): `PS <= CS`, `N <= N0+1`, go to
  weak-increase.
* In a weak state with D = 0, the count being tried is compared with PS. PS
  holds the sample of the other count.
  * `CS < PS` means the move was right. The first time, H is set and N stays.
    The second time in a row, D is set, `PS <= CS`, and the machine enters the
    strong state of that direction with one more step.
  * Otherwise the machine swaps to the opposite weak state: `PS <= CS`, N goes
    back to the other count and H is cleared.
  * If it has swapped more than three times, the optimum is too close to N0 to
    resolve. The count is fixed at `N0+1`, the higher of the two.

So a direction is adopted only after two consecutive samples agree.

### 3. Detection of the optimum

* In a strong state, each sample with `CS <= PS` stores CS in PS and moves N
  one more block.
* The first sample with `CS > PS` is discarded. N stays where it is, and the
  machine drops back to the weak state of the same direction (D stays 1).
* In that weak state, a second `CS > PS` confirms the turn. The optimum is the
  previous count (N-1 going up, N+1 going down), and the unit stops.
* If that second sample is not worse, the machine returns to the strong state
  and goes on. After more than three such returns it stops at the previous
  count.
* The search also stops when it reaches N_max going up, or 1 going down.

Worked example, with N_max = 15 and the optimum at 12. The unit starts at 8
and takes its first sample there. It moves to 9 and takes two samples at 9 to
set the direction. It then steps through 10, 11 and 12. At 13 the count is
worse, so that sample is discarded, and a second sample at 13 is worse again.
The limit settles at 12 after eight samples. `tb_perfsat_fsm` checks exactly
this sequence.

The limit is the only thing Perf-Sat controls. Raising it lets the scheduler
issue more blocks at once. Lowering it stops issue to that SM until enough of
its running blocks have finished. Nothing is preempted.

## Blocks

| file | what it is |
|---|---|
| `rtl/perfsat_pkg.sv` | state enum `ps_state_e`, `block_req_t`, widths, toggle limit, K20X and M2090 capacities |
| `rtl/stall_classifier.sv` | per-SM cycle classifier: active, scoreboard stall (ALU/memory), pipeline stall (ALU/memory), idle |
| `rtl/stall_counter.sv` | per-SM accumulator: adds `sb_stall + pipe_stall` (0..2) per cycle, saturating, delivers one sample per window |
| `rtl/sample_period_unit.sv` | phase 1: times the first block, computes `One_TB_cycles * N_max` (one multiplier, used once per kernel), marks window ends |
| `rtl/perfsat_fsm.sv` | phases 2 and 3: the decision machine above |
| `rtl/perfsat_unit.sv` | the three above wired together for one SM |
| `rtl/nmax_calc.sv` | occupancy calculator: largest n with n ≤ MAX_TB and n·need ≤ capacity for threads, register bytes and shared memory bytes |
| `rtl/tb_scheduler.sv` | round-robin block issue, one block per cycle, per-SM active counts, kernel end detection |
| `rtl/perfsat_top.sv` | `nmax_calc` + `tb_scheduler` + `NUM_SM` × (`stall_classifier` + `perfsat_unit`) |

`nmax_calc` needs no divider. It steps n up by one each cycle while keeping
running sums of the three needs, so the answer comes at most `MAX_TB + 1`
cycles after `start`. A need of zero never limits. A block that does not fit
at all gives `nmax = 0` and `no_fit`, and the kernel is not launched.

### Classifying core cycles

The stalled cycle count only means something if every cycle is classified the
same way. `stall_classifier` looks at the warp scheduler's view of one SM for
a cycle: whether an instruction issued, and for each warp slot four bits
(`valid`, `sb_wait`, `res_wait`, `mem`). It then decides:

* **active**: an instruction issued;
* **pipeline stall**: nothing issued and at least one warp has a ready
  instruction held by a busy unit, MSHR or memory queue;
* **scoreboard stall**: nothing issued and the warps wait on dependencies;
* **idle**: none of the above, i.e. warps at a barrier or no warp resident.

A stall is of the memory kind if a warp in its category involves a memory
instruction, and of the ALU kind otherwise. When some warps wait on
dependencies and others on busy units, the cycle counts as a pipeline stall:
a warp was ready, so the hardware was the limit. The categories are
exclusive, so the stalled cycle count grows by at most one per cycle. The
result is registered and arrives one cycle later.

## Interface and timing of `perfsat_top`

* **Launch.** Pulse `kernel_start` for one cycle with `req` (threads, register
  bytes, shared memory bytes per block) and `grid_blocks` valid. After the
  occupancy search finishes, every Perf-Sat unit starts at `ceil(N_max/2)` and
  the scheduler starts issuing. `kernel_running` is high from then on.
* **Issue.** `issue_valid` is a one-cycle pulse that sends block
  `issue_block_id` to SM `issue_sm`. Block ids are in order. The SM must
  accept the block; the scheduler only targets SMs with room.
* **Feedback.** Per SM, every cycle:
  * `issued`: the warp scheduler issued an instruction;
  * `warps`: one `warp_status_t` per warp slot (`NUM_WARPS`, 64 by default);
  * `tb_done`: one block finished.

  An assertion in the scheduler checks that an SM never reports a completion
  while it holds no block.
* **Status.** Per SM: `activity` (the cycle class), `limit`, `active`, `state`, `converged`, `dir_bit`,
  `hist_bit`, `sample_period`, and one-cycle event pulses (`ev_swap`,
  `ev_strong`, `ev_discard`, `ev_toggle_stop`). `held` is high while some SM
  that has room under N_max is kept back by its limit.
* **End.** `kernel_end` pulses once every block has been issued and has
  completed. It returns the Perf-Sat units to idle.
* **Latency.** A limit changes two cycles after the last cycle of a window:
  one cycle for the sample register and one for the state machine.

Reset is asynchronous and active low (`rst_n`).

## Configuration

The defaults are the NVIDIA Tesla K20X (Kepler) configuration:

| parameter | default | meaning |
|---|---|---|
| `NUM_SM` | 14 | SMs (2688 SP units / 192 per SM) |
| `MAX_TB` | 16 | block slots per SM |
| `MAX_THREADS` | 2048 | thread slots per SM |
| `REGFILE_BYTES` | 262144 | register file per SM |
| `SHMEM_BYTES` | 49152 | shared memory per SM (assumed, see below) |
| `NUM_WARPS` | 64 | warp slots per SM (2048 threads / 32) |
| `GRID_W` | 20 | grid size up to 2^20−1 blocks |
| `CNT_W` | 32 | cycle and stall counter width |
| `NB_W` | 5 | block count width |

The Fermi M2090 values (16 SMs, 8 blocks, 1536 threads, 128 KB) are in
`perfsat_pkg` as `M2090_*`. To build that GPU, override the four parameters.

For the sixteen Rodinia kernels these capacities were evaluated with, the
calculator gives N_max from 3 to 16 blocks per SM. All of them fit the
defaults. Plain division of capacity by need matches the published per-SM
maxima except in one case, Hotspot on the K20X. There this design finds 7
blocks where the real GPU fits 6, because the real register allocator rounds
each block's registers up, and that rounding is not modelled.

## Choices this design makes

The published algorithm fixes the phases, the four decision states, the use
of the H and D bits, the start at `ceil(N_max/2)`, the sample period formula,
and the "more than three toggles" rule. The rest is this design's own:

* **Ties.** `CS == PS` counts as "not better" in a weak state, so it does not
  confirm a direction. In a strong state it counts as "not worse", so the
  search goes on.
* **Counting toggles.** In the direction search, a toggle is one swap between
  the weak states. In the final phase, a toggle is one return from weak to
  strong. The counter is cleared when the direction is decided.
* **Decrease direction.** It mirrors the increase direction in every detail.
* **Bounds.** The search stops at N_max and at 1.
* **After converging.** The limit is held until the kernel ends; nothing
  re-triggers a search mid-kernel.
* **Windows.** The first window starts right after the first completion.
* **Shared memory capacity.** 48 KB is an assumed typical Fermi/Kepler value.
  The kernels used for evaluation are limited by threads or registers, never
  by shared memory.
* **Scheduler.** It issues one block per cycle with no ready handshake. It
  supports a single kernel at a time; concurrent kernels on the freed
  resources are not implemented. With identical blocks, the four resource
  checks reduce to `active < N_max`, so per-SM resource usage is not tracked
  separately.
* **Warp status.** The four-bit per-warp status and the pipeline-over-
  scoreboard rule for mixed cycles are this design's own. The categories are
  defined only for the case where all warps wait for the same reason.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_stall_classifier`: random warp status, including mixed and empty cases,
  against a warp-by-warp model of the rules.
* `tb_stall_counter`: random stall flags and windows against a counting
  model, including saturation at 8 bits.
* `tb_sample_period_unit`: measured first-block time, period = time × N_max,
  exact window spacing, idle after `kernel_end`.
* `tb_perfsat_fsm`: hand-made sample sequences that cover:
  * the N_max = 15 example above;
  * an optimum below the start point;
  * a flat profile, which stops through the toggle limit;
  * stalls falling all the way to N_max;
  * oscillation between the weak and strong states near the optimum;
  * N_max = 1.
* `tb_perfsat_unit`: one unit driving a behavioural SM (`tb/sm_model.sv`),
  several stall profiles; checks the measured period and the final count.
* `tb_nmax_calc`: all sixteen kernels on Fermi- and Kepler-sized instances
  against division, plus random and no-fit cases and the latency.
* `tb_tb_scheduler`: round-robin order, block ids, per-SM counts, limits
  lowered and raised mid-kernel, `kernel_end`.
* `tb_perfsat_top`: the whole design at its default size (14 SMs). Each SM
  runs a behavioural SM with its own stall curve:
  * V-shaped, with its minimum anywhere from 1 to 16;
  * still falling at N_max;
  * flat.

  Two kernels run back to back (N_max 16, then 8), then a kernel that does
  not fit. The test checks every issue, every SM's final limit against its
  curve, and that each mechanism occurred: swaps, strong states, discards,
  toggle-limit stops, N_max stops, cores draining after a lowered limit, and
  issue held by a limit. It also compares every SM's cycle class with the
  model's own account and checks that all six classes occur.

Two more testbenches run sixteen Rodinia kernels through the full design:
Backprop, B+Tree, CFD, Gaussian, LUD, Hotspot, Pathfinder, nearest neighbour
and six SRAD kernels. The kernels use their real per-block thread and
register needs:

* `tb_perfsat_workloads` runs them on the default K20X configuration.
* `tb_perfsat_workloads_m2090` runs them with the parameters overridden to
  the M2090.

Every SM's curve has its minimum at that kernel's saturation point on that
GPU. The tests check N_max and the detected count for every kernel and SM, and
report how many block slots are left free. With these curves, 28 % of the
K20X slots and 7 % of the M2090 slots are freed; the difference follows from
how far below N_max each kernel saturates on each GPU.

The behavioural SM is a testbench model, not a GPU core. Its stalled cycle
count is a chosen function of the block count, spread evenly over time. Below
its optimum the stalls are scoreboard stalls, above it pipeline stalls. The
tests therefore show that the controller finds the minimum of a given curve.
They say nothing about how well the stall counts of a real core track its
performance; that is the premise of the method.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/perfsat_pkg.sv rtl/*.sv tb/sm_model.sv tb/tb_perfsat_top.sv \
  --top-module tb_perfsat_top -o sim && ./obj_dir/sim
```

Use the same command for any other testbench: change `--top-module` and the
testbench file.
