// perfsat_fsm -- Perf-Sat decision state machine for one SM.
//
// The machine sets how many thread blocks may be active on its core. It starts
// a kernel at N0 = ceil(N_max/2) and, at the end of every sample period,
// compares the stalled cycle count of that period (CS, current sample) with a
// stored one (PS, previous sample). Fewer stalled cycles means the count is
// better. The algorithm follows the published Perf-Sat description:
//
//   * First sample (at N0): PS <= CS, N <= N0+1, go to weak-increase.
//   * Direction search (direction bit D = 0), weak-increase / weak-decrease:
//     the tried count is compared with PS, the sample of the other count.
//     If CS < PS the move was right: the first time the history bit H is set
//     and the count is kept; the second time D is set, PS <= CS and the machine
//     enters strong-increase / strong-decrease, moving one more block.
//     Otherwise the machine swaps to the opposite weak state (PS <= CS, N goes
//     back to the other count, H <= 0). After more than TOGGLE_LIMIT such
//     swaps the count is fixed at N0+1, the higher of the two.
//   * Strong states: while CS <= PS, PS <= CS and N moves one more block.
//     When CS > PS the sample is discarded, N is kept and the machine drops to
//     the weak state of the same direction (H <= 0).
//   * Convergence (D = 1, weak state): if CS > PS again the optimum is the
//     previous count (N-1 going up, N+1 going down) and the machine stops.
//     Otherwise it returns to the strong state (PS <= CS, N moves on); after
//     more than TOGGLE_LIMIT such returns it stops at the previous count.
//   * Reaching N_max while increasing (or 1 while decreasing) stops at that
//     bound.
//
// Choices of this design where the algorithm is silent: a tie (CS == PS)
// counts as "not better" in weak states and as "not worse" in strong states;
// the toggle counter is cleared when the direction is decided; a count that
// has to drop takes effect by issuing no new blocks (no preemption, that is
// the scheduler's side).
//
// Interface: kernel_start (N_max must be valid then) resets the machine;
// window_start marks the start of the first sample period; sample/sample_valid
// deliver each finished sample. `limit` is the allowed active block count,
// registered; it changes in the cycle after sample_valid.
module perfsat_fsm
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
  input  logic             window_start,
  input  logic             sample_valid,
  input  logic [CNT_W-1:0] sample,
  output logic [NB_W-1:0]  limit,
  output ps_state_e        state,
  output logic             dir_bit,
  output logic             hist_bit,
  output logic             converged,
  output logic [CNT_W-1:0] prev_sample,
  // one-cycle event pulses, for monitoring
  output logic             ev_swap,     // weak-increase <-> weak-decrease
  output logic             ev_strong,   // entered a strong state
  output logic             ev_discard,  // strong state left on a worse sample
  output logic             ev_toggle_stop // stopped by the toggle limit
);

  localparam int unsigned TG_W = $clog2(TOGGLES + 2);

  logic [NB_W-1:0] n_cur, n_init, n_max_q;
  logic [TG_W-1:0] toggles;
  logic            better, worse, going_up, at_bound, toggles_over;
  logic [NB_W-1:0] n_step, n_back, nm, n0;

  assign limit     = n_cur;
  assign converged = (state == PS_DONE);

  always_comb begin
    better       = sample < prev_sample;
    worse        = sample > prev_sample;
    going_up     = (state == PS_WEAK_INC) || (state == PS_STRONG_INC);
    at_bound     = going_up ? (n_cur >= n_max_q) : (n_cur <= NB_W'(1));
    n_step       = going_up ? n_cur + 1'b1 : n_cur - 1'b1;
    n_back       = going_up ? n_cur - 1'b1 : n_cur + 1'b1;
    toggles_over = (32'(toggles) + 1) > TOGGLES;
    nm           = (nmax == '0) ? NB_W'(1) : nmax;
    n0           = NB_W'((32'(nm) + 1) >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= PS_IDLE;
      n_cur       <= '0;
      n_init      <= '0;
      n_max_q     <= '0;
      dir_bit     <= 1'b0;
      hist_bit    <= 1'b0;
      toggles     <= '0;
      prev_sample <= '0;
      ev_swap     <= 1'b0;
      ev_strong   <= 1'b0;
      ev_discard  <= 1'b0;
      ev_toggle_stop <= 1'b0;
    end else begin
      ev_swap        <= 1'b0;
      ev_strong      <= 1'b0;
      ev_discard     <= 1'b0;
      ev_toggle_stop <= 1'b0;
      if (kernel_start) begin
        state       <= PS_MEASURE;
        n_max_q     <= nm;
        n_init      <= n0;
        n_cur       <= n0;
        dir_bit     <= 1'b0;
        hist_bit    <= 1'b0;
        toggles     <= '0;
        prev_sample <= '0;
      end else if (kernel_end) begin
        state <= PS_IDLE;
      end else begin
        unique case (state)
          PS_IDLE, PS_DONE: ;
          PS_MEASURE: if (window_start) state <= PS_FIRST;
          PS_FIRST: if (sample_valid) begin
            prev_sample <= sample;
            if (n_cur < n_max_q) begin
              n_cur    <= n_cur + 1'b1;
              state    <= PS_WEAK_INC;
              hist_bit <= 1'b0;
            end else begin
              state <= PS_DONE;
            end
          end
          PS_WEAK_INC, PS_WEAK_DEC: if (sample_valid) begin
            if (!dir_bit) begin
              // phase 2: deciding the direction of throttle
              if (better) begin
                if (!hist_bit) begin
                  hist_bit <= 1'b1;
                end else begin
                  dir_bit     <= 1'b1;
                  hist_bit    <= 1'b0;
                  toggles     <= '0;
                  prev_sample <= sample;
                  if (at_bound) begin
                    state <= PS_DONE;
                  end else begin
                    n_cur     <= n_step;
                    state     <= going_up ? PS_STRONG_INC : PS_STRONG_DEC;
                    ev_strong <= 1'b1;
                  end
                end
              end else if (toggles_over) begin
                n_cur          <= (n_init < n_max_q) ? n_init + 1'b1 : n_init;
                state          <= PS_DONE;
                ev_toggle_stop <= 1'b1;
              end else begin
                toggles     <= toggles + 1'b1;
                prev_sample <= sample;
                n_cur       <= n_back;
                hist_bit    <= 1'b0;
                state       <= going_up ? PS_WEAK_DEC : PS_WEAK_INC;
                ev_swap     <= 1'b1;
              end
            end else begin
              // phase 3: converging on the optimal count
              if (worse) begin
                n_cur <= n_back;
                state <= PS_DONE;
              end else if (toggles_over) begin
                n_cur          <= n_back;
                state          <= PS_DONE;
                ev_toggle_stop <= 1'b1;
              end else begin
                toggles     <= toggles + 1'b1;
                prev_sample <= sample;
                if (at_bound) begin
                  state <= PS_DONE;
                end else begin
                  n_cur     <= n_step;
                  state     <= going_up ? PS_STRONG_INC : PS_STRONG_DEC;
                  ev_strong <= 1'b1;
                end
              end
            end
          end
          PS_STRONG_INC, PS_STRONG_DEC: if (sample_valid) begin
            if (!worse) begin
              prev_sample <= sample;
              if (at_bound) state <= PS_DONE;
              else          n_cur <= n_step;
            end else begin
              hist_bit   <= 1'b0;
              state      <= going_up ? PS_WEAK_INC : PS_WEAK_DEC;
              ev_discard <= 1'b1;
            end
          end
          default: state <= PS_IDLE;
        endcase
      end
    end
  end

endmodule
