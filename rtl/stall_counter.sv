// stall_counter -- stalled cycle count of one SM over one sample period.
//
// Every cycle the SM reports two stall flags: sb_stall (all warps wait on a
// scoreboard dependency) and pipe_stall (all warps wait for a busy hardware
// resource such as an execution unit or an MSHR). Perf-Sat judges a thread
// block count by the sum of these two stall counts, the "stalled cycle count".
// This module adds 0, 1 or 2 per cycle to a saturating accumulator (fed by
// the stall classifier the two flags never rise together).
//
// Timing: `clear` starts a new sample window (the accumulator is zeroed and the
// flags of that cycle are counted). On `sample_end` the running total,
// including that cycle's flags, is copied to `sample` and `sample_valid`
// pulses for one cycle on the next edge; the accumulator restarts from zero in
// the same edge, so back-to-back windows lose no cycle. Counting the two stall
// kinds as a sum follows the source algorithm; saturation and the exact
// window edges are this design's choices.
module stall_counter #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             sb_stall,
  input  logic             pipe_stall,
  input  logic             sample_end,
  output logic [CNT_W-1:0] sample,
  output logic             sample_valid,
  output logic [CNT_W-1:0] running
);

  logic [1:0]       inc;
  logic [CNT_W:0]   sum;
  logic [CNT_W-1:0] next_total;

  always_comb begin
    inc        = 2'(sb_stall) + 2'(pipe_stall);
    sum        = {1'b0, running} + (CNT_W+1)'(inc);
    next_total = sum[CNT_W] ? '1 : sum[CNT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running      <= '0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      if (clear) begin
        running <= CNT_W'(inc);
      end else if (sample_end) begin
        sample       <= next_total;
        sample_valid <= 1'b1;
        running      <= '0;
      end else begin
        running <= next_total;
      end
    end
  end

endmodule
