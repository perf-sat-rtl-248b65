// sample_period_unit -- Perf-Sat phase 1, sample rate detection, plus the
// sample period timer used by the later phases.
//
// Perf-Sat compares stalled cycle counts taken over windows long enough to
// average out the phase behaviour of individual warps: roughly the time N_max
// thread blocks take to run. When a kernel starts on the core the unit counts
// cycles until the core's first thread block completes (One_TB_cycles) and
// sets the sample period to One_TB_cycles * N_max, as in the source
// algorithm. It then raises `sample_end` on the last cycle of every period.
//
// Interface and timing:
//   kernel_start  one-cycle pulse; starts measuring (cycle counter cleared).
//                 One_TB_cycles counts the cycles after kernel_start up to and
//                 including the cycle in which tb_done is first seen.
//   tb_done       a thread block completed on this core (only the first one
//                 after kernel_start matters).
//   kernel_end    returns the unit to idle.
//   window_start  one-cycle pulse, the cycle after the first completion:
//                 first cycle of the first sample window.
//   sample_end    high on the last cycle of each window; windows are exactly
//                 `period` cycles and follow each other without a gap.
// The period saturates at all-ones; a zero N_max is treated as one. The exact
// window edges and saturation are this design's choices.
module sample_period_unit
  import perfsat_pkg::*;
#(
  parameter int unsigned CNT_W = CYC_W,
  parameter int unsigned NB_W  = TB_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             kernel_start,
  input  logic             kernel_end,
  input  logic [NB_W-1:0]  nmax,
  input  logic             tb_done,
  output logic             measuring,
  output logic             window_start,
  output logic             sample_end,
  output logic [CNT_W-1:0] one_tb_cycles,
  output logic [CNT_W-1:0] period
);

  typedef enum logic [1:0] {SP_IDLE, SP_MEASURE, SP_RUN} sp_state_e;

  sp_state_e                 state;
  logic [CNT_W-1:0]          cnt;
  logic [CNT_W-1:0]          one_tb_next;
  logic [CNT_W+NB_W-1:0]     product;
  logic [NB_W-1:0]           nmax_eff;

  assign measuring  = (state == SP_MEASURE);
  assign sample_end = (state == SP_RUN) && (cnt == period - 1'b1);

  always_comb begin
    one_tb_next = (cnt == '1) ? cnt : cnt + 1'b1;
    nmax_eff    = (nmax == '0) ? NB_W'(1) : nmax;
    product     = (CNT_W+NB_W)'(one_tb_next) * (CNT_W+NB_W)'(nmax_eff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= SP_IDLE;
      cnt           <= '0;
      one_tb_cycles <= '0;
      period        <= '0;
      window_start  <= 1'b0;
    end else begin
      window_start <= 1'b0;
      if (kernel_start) begin
        state <= SP_MEASURE;
        cnt   <= '0;
      end else if (kernel_end) begin
        state <= SP_IDLE;
        cnt   <= '0;
      end else begin
        unique case (state)
          SP_IDLE: cnt <= '0;
          SP_MEASURE: begin
            if (tb_done) begin
              one_tb_cycles <= one_tb_next;
              period        <= (product[CNT_W+NB_W-1:CNT_W] != '0) ? '1
                                                                   : product[CNT_W-1:0];
              state         <= SP_RUN;
              window_start  <= 1'b1;
              cnt           <= '0;
            end else begin
              cnt <= one_tb_next;
            end
          end
          SP_RUN: cnt <= sample_end ? '0 : cnt + 1'b1;
          default: state <= SP_IDLE;
        endcase
      end
    end
  end

endmodule
