// stall_classifier -- sorts every cycle of one SM into the core activity
// categories Perf-Sat is built on.
//
// The categories follow the source definitions: an active cycle issues an
// instruction; a scoreboarding stall is a cycle in which the warps are held
// by dependencies on earlier instructions; a pipeline stall is a cycle in
// which they are held by busy hardware (execution unit, MSHR, memory access
// queue); an idle cycle has nothing to issue because the warps wait at a
// barrier or none is resident. Stalls are further split into ALU and memory
// kinds by the instruction involved.
//
// The definitions name the "all warps" cases only. When, with nothing issued,
// some warps wait on dependencies and others on busy units, this design calls
// the cycle a pipeline stall (a warp had a ready instruction), and a stall is
// of the memory kind if any warp in that category involves a memory
// instruction. Both are this design's choices.
//
// Interface and timing: per-warp status from the SM's warp scheduler and the
// `issued` flag of the same cycle go in; `activity`, `sb_stall` and
// `pipe_stall` come out registered, one cycle later.
module stall_classifier
  import perfsat_pkg::*;
#(
  parameter int unsigned NUM_WARPS = K20X_NUM_WARPS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          issued,
  input  warp_status_t [NUM_WARPS-1:0]  warps,
  output activity_e                     activity,
  output logic                          sb_stall,
  output logic                          pipe_stall
);

  logic      any_res, any_res_mem, any_sb, any_sb_mem;
  activity_e act_d;

  always_comb begin
    any_res = 1'b0; any_res_mem = 1'b0; any_sb = 1'b0; any_sb_mem = 1'b0;
    for (int w = 0; w < NUM_WARPS; w++) begin
      if (warps[w].valid && warps[w].res_wait) begin
        any_res     = 1'b1;
        any_res_mem = any_res_mem | warps[w].mem;
      end
      if (warps[w].valid && warps[w].sb_wait) begin
        any_sb     = 1'b1;
        any_sb_mem = any_sb_mem | warps[w].mem;
      end
    end
    if (issued)       act_d = ACT_ACTIVE;
    else if (any_res) act_d = any_res_mem ? ACT_PIPE_MEM : ACT_PIPE_ALU;
    else if (any_sb)  act_d = any_sb_mem ? ACT_SB_MEM : ACT_SB_ALU;
    else              act_d = ACT_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      activity   <= ACT_IDLE;
      sb_stall   <= 1'b0;
      pipe_stall <= 1'b0;
    end else begin
      activity   <= act_d;
      sb_stall   <= (act_d == ACT_SB_ALU) || (act_d == ACT_SB_MEM);
      pipe_stall <= (act_d == ACT_PIPE_ALU) || (act_d == ACT_PIPE_MEM);
    end
  end

endmodule
