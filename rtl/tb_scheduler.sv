// tb_scheduler -- thread block scheduler: hands the blocks of a grid to the
// SMs in round-robin order, at most one block per cycle.
//
// An SM may take another block when its active block count is below N_max
// (the four-resource occupancy limit; with one kernel of identical blocks the
// resource checks reduce to this count) and below the limit its Perf-Sat unit
// currently allows. The search starts at the SM after the one served last.
// When Perf-Sat lowers an SM's limit the scheduler simply stops issuing to it
// until enough of its blocks have completed; running blocks are never
// preempted. Round-robin issue and the per-SM limit follow the source
// material; one issue per cycle, no preemption and the handshake below are
// this design's choices.
//
// Interface and timing:
//   launch       one-cycle pulse; grid_blocks and nmax are sampled.
//   issue_valid  one-cycle pulse: block issue_block_id goes to SM issue_sm.
//                The SM must accept it (the count of free slots is kept here).
//   tb_done[i]   SM i finished one block this cycle.
//   kernel_end   one-cycle pulse once every block was issued and completed.
//   held         at least one SM has room under N_max but is kept from taking
//                a block by its Perf-Sat limit while blocks are still waiting.
module tb_scheduler
  import perfsat_pkg::*;
#(
  parameter int unsigned NUM_SM = K20X_NUM_SM,
  parameter int unsigned NB_W   = TB_W,
  parameter int unsigned GRID_W = 20,
  localparam int unsigned SM_W  = (NUM_SM > 1) ? $clog2(NUM_SM) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         launch,
  input  logic [GRID_W-1:0]            grid_blocks,
  input  logic [NB_W-1:0]              nmax,
  input  logic [NUM_SM-1:0][NB_W-1:0]  limit,
  input  logic [NUM_SM-1:0]            tb_done,
  output logic                         issue_valid,
  output logic [SM_W-1:0]              issue_sm,
  output logic [GRID_W-1:0]            issue_block_id,
  output logic [NUM_SM-1:0][NB_W-1:0]  active,
  output logic                         running,
  output logic                         kernel_end,
  output logic                         held
);

  logic [GRID_W-1:0]  next_id, total;
  logic [NB_W-1:0]    nmax_q;
  logic [SM_W-1:0]    rr_ptr;
  logic [NUM_SM-1:0]  eligible, room;
  logic               found, blocks_left, all_idle;
  logic [SM_W-1:0]    pick;

  always_comb begin
    blocks_left = running && (next_id < total);
    all_idle    = 1'b1;
    for (int i = 0; i < NUM_SM; i++) begin
      room[i]     = active[i] < nmax_q;
      eligible[i] = blocks_left && room[i] && (active[i] < limit[i]);
      if (active[i] != '0) all_idle = 1'b0;
    end
    held  = blocks_left && ((room & ~eligible) != '0);
    found = 1'b0;
    pick  = '0;
    for (int k = 0; k < NUM_SM; k++) begin
      int unsigned idx;
      idx = 32'(rr_ptr) + k;
      if (idx >= NUM_SM) idx = idx - NUM_SM;
      if (!found && eligible[idx]) begin
        found = 1'b1;
        pick  = SM_W'(idx);
      end
    end
  end

  assign issue_valid    = found;
  assign issue_sm       = pick;
  assign issue_block_id = next_id;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_id    <= '0;
      total      <= '0;
      nmax_q     <= '0;
      rr_ptr     <= '0;
      running    <= 1'b0;
      kernel_end <= 1'b0;
      active     <= '0;
    end else begin
      kernel_end <= 1'b0;
      for (int i = 0; i < NUM_SM; i++) begin
        active[i] <= active[i] + NB_W'(found && (pick == SM_W'(i)))
                               - NB_W'(tb_done[i]);
      end
      if (launch) begin
        next_id <= '0;
        total   <= grid_blocks;
        nmax_q  <= nmax;
        rr_ptr  <= '0;
        running <= (grid_blocks != '0);
      end else if (found) begin
        next_id <= next_id + 1'b1;
        rr_ptr  <= (32'(pick) + 1 >= NUM_SM) ? '0 : pick + 1'b1;
      end else if (running && !blocks_left && all_idle) begin
        running    <= 1'b0;
        kernel_end <= 1'b1;
      end
    end
  end

  // A core can only finish a block it holds.
  for (genvar g = 0; g < NUM_SM; g++) begin : g_chk
    a_done_has_block: assert property (@(posedge clk) disable iff (!rst_n)
      tb_done[g] |-> active[g] != '0);
  end

endmodule
