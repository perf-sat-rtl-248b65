// tb_perfsat_workloads_m2090 -- the same sixteen Rodinia kernels as
// tb_perfsat_workloads, on the design configured as a Tesla M2090 (Fermi):
// 16 SMs, 8 blocks, 1536 threads and 128 KB of registers per SM.
// For each kernel every behavioural SM gets a stalled-cycle curve whose
// minimum is the block count at which that kernel's performance saturates on
// the M2090 (for kernels that keep improving, a curve still falling at
// N_max). The test checks the N_max found, that every SM settles on the
// saturation count, and how many blocks' worth of slots Perf-Sat frees
// against filling every SM to N_max.
module tb_perfsat_workloads_m2090;
  import perfsat_pkg::*;
  localparam int NSM  = M2090_NUM_SM;
  localparam int NW   = M2090_NUM_WARPS;
  localparam int LIFE = 300;
  localparam int NK   = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic kstart;
  block_req_t req;
  logic [19:0] grid;
  logic [TB_W-1:0] nmax;
  logic no_fit, krun, kend, issue_valid, held;
  logic [3:0] issue_sm;
  logic [19:0] issue_id;
  logic [NSM-1:0] sb, pipe, iss, tdone, conv, ev_swap, ev_strong, ev_discard, ev_tstop, dbit, hbit;
  logic [NSM-1:0][CYC_W-1:0] speriod;
  logic [NSM-1:0][TB_W-1:0] limit, active;
  ps_state_e [NSM-1:0] state;
  activity_e [NSM-1:0] act;
  warp_status_t [NSM-1:0][NW-1:0] warps;
  int opt_now;
  int nb[NSM];
  int checks = 0, failures = 0;
  int slots_base, slots_ps;

  always #5 clk = ~clk;

  perfsat_top #(.NUM_SM(M2090_NUM_SM), .MAX_TB(M2090_MAX_TB), .MAX_THREADS(M2090_MAX_THREADS),
                .REGFILE_BYTES(M2090_REGFILE_BYTES), .NUM_WARPS(M2090_NUM_WARPS)) dut (.clk, .rst_n, .kernel_start(kstart), .req, .grid_blocks(grid), .nmax,
    .no_fit, .kernel_running(krun), .kernel_end(kend), .issue_valid, .issue_sm,
    .issue_block_id(issue_id), .issued(iss), .warps, .tb_done(tdone),
    .activity(act), .limit, .active, .state, .converged(conv), .dir_bit(dbit), .hist_bit(hbit),
    .sample_period(speriod), .ev_swap, .ev_strong, .ev_discard, .ev_toggle_stop(ev_tstop), .held);

  for (genvar g = 0; g < NSM; g++) begin : g_sm
    sm_model #(.LIFETIME(LIFE), .NW(NW)) u_sm (.clk, .rst_n,
      .issue(issue_valid && issue_sm == 4'(g)), .opt(opt_now), .flat(1'b0),
      .sb_stall(sb[g]), .pipe_stall(pipe[g]), .issued(iss[g]), .warps(warps[g]),
      .tb_done(tdone[g]), .n_blocks(nb[g]));
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names[NK];
    int regs[NK], thr[NK], kmax[NK], kopt[NK];
    names = '{"BP-1", "BP-2", "B+-1", "B+-2", "CFD", "Gaus", "LUD", "Hot",
              "Path", "NN", "SRAD-1", "SRAD-2", "SRAD-3", "SRAD-4", "SRAD-5", "SRAD-6"};
    regs  = '{12288, 24576, 24576, 20480, 39936, 1536, 16384, 36864,
              16384, 16384, 12288, 12288, 16384, 20480, 20480, 12288};
    thr   = '{256, 256, 256, 256, 192, 16, 256, 256, 256, 256, 256, 256, 256, 256, 256, 256};
    // per-SM block counts on the M2090: hardware maximum and saturation point
    kmax  = '{6, 5, 5, 6, 3, 8, 6, 3, 6, 6, 6, 6, 6, 6, 6, 6};
    kopt  = '{6, 5, 5, 6, 3, 6, 5, 3, 5, 5, 6, 5, 6, 6, 5, 6};
    kstart = 0; req = '0; grid = '0; opt_now = 0;
    slots_base = 0; slots_ps = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NK; k++) begin
      int exp_nmax, cyc;
      exp_nmax = M2090_MAX_TB;
      if (M2090_MAX_THREADS / thr[k] < exp_nmax) exp_nmax = M2090_MAX_THREADS / thr[k];
      if (M2090_REGFILE_BYTES / regs[k] < exp_nmax) exp_nmax = M2090_REGFILE_BYTES / regs[k];
      check(exp_nmax == kmax[k], $sformatf("%s: computed max %0d vs %0d", names[k], exp_nmax, kmax[k]));
      opt_now = kopt[k];
      @(negedge clk);
      req.threads = 12'(thr[k]); req.reg_bytes = 20'(regs[k]); req.shmem_bytes = '0;
      grid = 20'(2000 * exp_nmax); kstart = 1;
      @(negedge clk); kstart = 0;
      cyc = 0;
      while (!krun && cyc < 100) begin @(negedge clk); cyc++; end
      check(int'(nmax) == exp_nmax, $sformatf("%s: N_max %0d expected %0d", names[k], nmax, exp_nmax));
      while (!(&conv) && krun) @(negedge clk);
      check(&conv, $sformatf("%s: all SMs converged while running", names[k]));
      for (int i = 0; i < NSM; i++) begin
        check(int'(limit[i]) == kopt[k], $sformatf("%s SM%0d: %0d blocks, expected %0d", names[k], i, limit[i], kopt[k]));
        slots_base += exp_nmax;
        slots_ps   += int'(limit[i]);
      end
      $display("%-7s N_max=%0d detected=%0d", names[k], nmax, limit[0]);
      while (krun) @(negedge clk);
    end
    $display("block slots held after detection: %0d of %0d (%0d%% freed)",
             slots_ps, slots_base, 100 * (slots_base - slots_ps) / slots_base);
    check(slots_ps < slots_base, "Perf-Sat frees block slots");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
