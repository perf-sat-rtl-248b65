// sm_model -- behavioural stand-in for one GPU core (SM), for testbenches
// only; not synthesizable and not part of the design.
//
// It accepts thread blocks (issue pulse), runs each for LIFETIME cycles and
// reports at most one completion per cycle (tb_done). Each cycle is either an
// issue cycle or a stalled cycle; the share of stalled cycles depends on the
// number of blocks held, n: f(n) = BASE + SLOPE * |n - opt| per 256 cycles
// (capped at 256), or 256 (stalled every cycle) when `flat` is set. A
// fractional accumulator spreads the stalls evenly, so a window of P cycles
// holds P * f / 256 of them to within one. Below the optimum a stall is a
// scoreboard stall, above it a pipeline stall on a memory resource - the
// trade-off the detection relies on. With no block resident the core is idle.
//
// Outputs come in two forms: stall flags (sb_stall, pipe_stall) for driving a
// Perf-Sat unit directly, and the warp scheduler's view (issued, per-warp
// status, WARPS_PER_BLOCK warps per block) for the stall classifier. In a
// pipeline stall only warp 0 is blocked on a resource and the other warps wait
// on dependencies. Stalls are of the memory kind when n is odd, of the ALU
// kind when n is even, so that every category shows up.
module sm_model
  import perfsat_pkg::*;
#(
  parameter int LIFETIME        = 400,
  parameter int BASE            = 16,
  parameter int SLOPE           = 14,
  parameter int NW              = K20X_NUM_WARPS,
  parameter int WARPS_PER_BLOCK = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   issue,
  input  int                     opt,
  input  bit                     flat,
  output logic                   sb_stall,
  output logic                   pipe_stall,
  output logic                   issued,
  output warp_status_t [NW-1:0]  warps,
  output logic                   tb_done,
  output int                     n_blocks
);
  int remain[$];
  int finished;      // blocks whose time is up but not yet reported
  int acc;

  function automatic int rate(int n);
    int d, f;
    if (flat) return 256;
    d = (n > opt) ? n - opt : opt - n;
    f = BASE + SLOPE * d;
    return (f > 256) ? 256 : f;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remain.delete();
      finished   = 0;
      acc        = 0;
      sb_stall   <= 1'b0;
      pipe_stall <= 1'b0;
      issued     <= 1'b0;
      warps      <= '0;
      tb_done    <= 1'b0;
      n_blocks   <= 0;
    end else begin
      int n, nw;
      bit stall, pipe;
      // age running blocks
      for (int i = remain.size() - 1; i >= 0; i--) begin
        remain[i]--;
        if (remain[i] <= 0) begin
          remain.delete(i);
          finished++;
        end
      end
      if (issue) remain.push_back(LIFETIME);
      tb_done <= (finished > 0);
      if (finished > 0) finished--;
      n = remain.size() + finished;
      n_blocks <= n;
      acc += rate(n);
      stall = (acc >= 256) && (n > 0);
      if (acc >= 256) acc -= 256;
      pipe = stall && !flat && (n > opt);
      sb_stall   <= stall && !pipe;
      pipe_stall <= pipe;
      issued     <= (n > 0) && !stall;
      nw = n * WARPS_PER_BLOCK;
      for (int w = 0; w < NW; w++) begin
        warp_status_t ws;
        ws.valid    = (w < nw);
        ws.res_wait = ws.valid && pipe && (w == 0);
        ws.sb_wait  = ws.valid && stall && !(pipe && w == 0);
        ws.mem      = ws.valid && (n % 2 == 1) && (pipe ? (w == 0) : (w % 2 == 1));
        warps[w] <= ws;
      end
    end
  end
endmodule
