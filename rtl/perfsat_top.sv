// perfsat_top -- GPU work distributor with Perf-Sat throttling.
//
// A GPU normally fills every core (SM) with as many thread blocks as its
// resources allow (N_max). For many kernels performance stops improving, or
// even drops, well before that: more warps only trade scoreboard stalls for
// pipeline stalls and cache contention. This block finds, per SM and at run
// time, the block count beyond which the stalled cycle count no longer falls,
// and lets the scheduler fill the SM only up to that count. The freed
// registers and thread slots could be power-gated or given to another kernel.
//
// Structure: nmax_calc computes N_max from the kernel's per-block needs;
// tb_scheduler issues blocks round-robin under min(N_max, limit[i]); per SM,
// a stall_classifier sorts each cycle (active, scoreboard stall, pipeline
// stall, idle) from the warp scheduler's per-warp status, and a perfsat_unit
// turns the stalls and block completions into limit[i]. The SMs, their warp
// schedulers and the memory system are outside this block: they take issued
// blocks and return, every cycle, whether an instruction issued, each warp
// slot's status, and block completions.
//
// Timing: kernel_start (one cycle, with req and grid_blocks valid) starts the
// occupancy search; when it ends (up to MAX_TB + 1 cycles later) the kernel is
// launched, every Perf-Sat unit starts at ceil(N_max/2) and the scheduler
// begins issuing one block per cycle. kernel_end pulses once every block has
// completed. A kernel whose block does not fit at all raises no_fit and is not
// launched. Defaults are the K20X configuration (14 SMs, 16 blocks, 2048
// threads, 256 KB registers per SM); the 48 KB shared memory is assumed.
module perfsat_top
  import perfsat_pkg::*;
#(
  parameter int unsigned NUM_SM        = K20X_NUM_SM,
  parameter int unsigned MAX_TB        = K20X_MAX_TB,
  parameter int unsigned MAX_THREADS   = K20X_MAX_THREADS,
  parameter int unsigned REGFILE_BYTES = K20X_REGFILE_BYTES,
  parameter int unsigned SHMEM_BYTES   = DEF_SHMEM_BYTES,
  parameter int unsigned NUM_WARPS     = K20X_NUM_WARPS,
  parameter int unsigned GRID_W        = 20,
  parameter int unsigned CNT_W         = CYC_W,
  parameter int unsigned NB_W          = TB_W,
  localparam int unsigned SM_W         = (NUM_SM > 1) ? $clog2(NUM_SM) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // kernel launch
  input  logic                         kernel_start,
  input  block_req_t                   req,
  input  logic [GRID_W-1:0]            grid_blocks,
  output logic [NB_W-1:0]              nmax,
  output logic                         no_fit,
  output logic                         kernel_running,
  output logic                         kernel_end,
  // block issue to the SMs
  output logic                         issue_valid,
  output logic [SM_W-1:0]              issue_sm,
  output logic [GRID_W-1:0]            issue_block_id,
  // per-SM feedback
  input  logic [NUM_SM-1:0]            issued,
  input  warp_status_t [NUM_SM-1:0][NUM_WARPS-1:0] warps,
  input  logic [NUM_SM-1:0]            tb_done,
  // per-SM status
  output activity_e [NUM_SM-1:0]       activity,
  output logic [NUM_SM-1:0][NB_W-1:0]  limit,
  output logic [NUM_SM-1:0][NB_W-1:0]  active,
  output ps_state_e [NUM_SM-1:0]       state,
  output logic [NUM_SM-1:0]            converged,
  output logic [NUM_SM-1:0]            dir_bit,
  output logic [NUM_SM-1:0]            hist_bit,
  output logic [NUM_SM-1:0][CNT_W-1:0] sample_period,
  output logic [NUM_SM-1:0]            ev_swap,
  output logic [NUM_SM-1:0]            ev_strong,
  output logic [NUM_SM-1:0]            ev_discard,
  output logic [NUM_SM-1:0]            ev_toggle_stop,
  output logic                         held
);

  logic nmax_valid, nmax_busy, launch;

  nmax_calc #(
    .NB_W(NB_W), .MAX_TB(MAX_TB), .MAX_THREADS(MAX_THREADS),
    .REGFILE_BYTES(REGFILE_BYTES), .SHMEM_BYTES(SHMEM_BYTES)
  ) u_nmax (
    .clk, .rst_n, .start(kernel_start), .req, .busy(nmax_busy),
    .valid(nmax_valid), .nmax, .no_fit
  );

  assign launch = nmax_valid && (nmax != '0);

  tb_scheduler #(.NUM_SM(NUM_SM), .NB_W(NB_W), .GRID_W(GRID_W)) u_sched (
    .clk, .rst_n, .launch, .grid_blocks, .nmax, .limit, .tb_done,
    .issue_valid, .issue_sm, .issue_block_id, .active,
    .running(kernel_running), .kernel_end, .held
  );

  for (genvar g = 0; g < NUM_SM; g++) begin : g_sm
    logic [CNT_W-1:0] one_tb_cycles, sample;
    logic             sample_valid, sb_stall, pipe_stall;
    stall_classifier #(.NUM_WARPS(NUM_WARPS)) u_cls (
      .clk, .rst_n,
      .issued     (issued[g]),
      .warps      (warps[g]),
      .activity   (activity[g]),
      .sb_stall,
      .pipe_stall
    );
    perfsat_unit #(.CNT_W(CNT_W), .NB_W(NB_W)) u_ps (
      .clk, .rst_n,
      .kernel_start (launch),
      .kernel_end   (kernel_end),
      .nmax,
      .sb_stall,
      .pipe_stall,
      .tb_done      (tb_done[g]),
      .limit        (limit[g]),
      .state        (state[g]),
      .converged    (converged[g]),
      .dir_bit      (dir_bit[g]),
      .hist_bit     (hist_bit[g]),
      .one_tb_cycles,
      .period       (sample_period[g]),
      .sample_valid, .sample,
      .ev_swap        (ev_swap[g]),
      .ev_strong      (ev_strong[g]),
      .ev_discard     (ev_discard[g]),
      .ev_toggle_stop (ev_toggle_stop[g])
    );
  end

endmodule
