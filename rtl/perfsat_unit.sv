// perfsat_unit -- Perf-Sat for one SM: stall counter, sample-period unit and
// decision state machine wired together.
//
// Perf-Sat runs separately on every core. After kernel_start the unit holds
// the core at ceil(N_max/2) blocks, times the core's first thread block to
// size the sample period (One_TB_cycles * N_max), then accumulates the stalled
// cycle count (scoreboard + pipeline stalls) over each period and lets the
// state machine move the block limit until the count stops improving.
//
// Interface: kernel_start/kernel_end pulses and nmax come from the work
// distributor; sb_stall, pipe_stall and tb_done come from the SM every cycle.
// `limit` goes back to the thread block scheduler. The first window starts
// the cycle after the first tb_done; the limit changes two cycles after the
// last cycle of a window (one for the sample register, one for the FSM).
module perfsat_unit
  import perfsat_pkg::*;
#(
  parameter int unsigned CNT_W   = CYC_W,
  parameter int unsigned NB_W    = TB_W,
  parameter int unsigned TOGGLES = TOGGLE_LIMIT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             kernel_start,
  input  logic             kernel_end,
  input  logic [NB_W-1:0]  nmax,
  input  logic             sb_stall,
  input  logic             pipe_stall,
  input  logic             tb_done,
  output logic [NB_W-1:0]  limit,
  output ps_state_e        state,
  output logic             converged,
  output logic             dir_bit,
  output logic             hist_bit,
  output logic [CNT_W-1:0] one_tb_cycles,
  output logic [CNT_W-1:0] period,
  output logic             sample_valid,
  output logic [CNT_W-1:0] sample,
  output logic             ev_swap,
  output logic             ev_strong,
  output logic             ev_discard,
  output logic             ev_toggle_stop
);

  logic             window_start, sample_end, measuring;
  logic [CNT_W-1:0] running, prev_sample;

  sample_period_unit #(.CNT_W(CNT_W), .NB_W(NB_W)) u_period (
    .clk, .rst_n, .kernel_start, .kernel_end, .nmax, .tb_done,
    .measuring, .window_start, .sample_end, .one_tb_cycles, .period
  );

  stall_counter #(.CNT_W(CNT_W)) u_stall (
    .clk, .rst_n,
    .clear (window_start),
    .sb_stall, .pipe_stall, .sample_end, .sample, .sample_valid, .running
  );

  perfsat_fsm #(.CNT_W(CNT_W), .NB_W(NB_W), .TOGGLES(TOGGLES)) u_fsm (
    .clk, .rst_n, .kernel_start, .kernel_end, .nmax, .window_start,
    .sample_valid, .sample, .limit, .state, .dir_bit, .hist_bit, .converged,
    .prev_sample, .ev_swap, .ev_strong, .ev_discard, .ev_toggle_stop
  );

endmodule
