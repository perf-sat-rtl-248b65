// tb_perfsat_top -- end-to-end test of the Perf-Sat work distributor at its
// default size (14 SMs, K20X capacities), with one behavioural SM per core.
//
// Each SM gets its own stall profile: a V-shaped stalled-cycle curve with its
// minimum at a chosen block count (C-weak / MEM-like kernels), a curve still
// falling at N_max (C-strong), or a flat curve (optimum next to the start
// point). Two kernels run back to back: one whose blocks fit 16 to an SM and
// one limited to 8 by its threads; a third does not fit at all and must not
// launch. The testbench checks every issued block (ids in order, sent to an
// SM below its limit), the N_max found, each SM's final block count against
// the profile's optimum, and kernel_end. It counts each mechanism - weak
// increase/decrease swaps, strong states, discarded samples, stops by the
// toggle limit, stops at the N_max bound, cores draining after a lowered
// limit, issue held by a limit, each class of core cycle (active, scoreboard
// and pipeline stalls of both kinds, idle) - and fails if any never happened.
// Every SM's cycle classification is compared with the model's own account.
module tb_perfsat_top;
  import perfsat_pkg::*;
  localparam int NSM  = K20X_NUM_SM;
  localparam int NW   = K20X_NUM_WARPS;
  localparam int LIFE = 300;
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
  int opt[NSM];
  bit flat[NSM];
  int nb[NSM];
  int checks = 0, failures = 0;
  int n_issued, n_kend;
  int c_swap, c_strong, c_discard, c_tstop, c_bound, c_drain, c_held;
  int c_act[6];
  logic [NSM-1:0] sb_q, pipe_q, iss_q;
  int nb_q[NSM];

  always #5 clk = ~clk;

  perfsat_top dut (.clk, .rst_n, .kernel_start(kstart), .req, .grid_blocks(grid), .nmax,
    .no_fit, .kernel_running(krun), .kernel_end(kend), .issue_valid, .issue_sm,
    .issue_block_id(issue_id), .issued(iss), .warps, .tb_done(tdone),
    .activity(act), .limit, .active, .state, .converged(conv), .dir_bit(dbit), .hist_bit(hbit),
    .sample_period(speriod), .ev_swap, .ev_strong, .ev_discard,
    .ev_toggle_stop(ev_tstop), .held);

  for (genvar g = 0; g < NSM; g++) begin : g_sm
    sm_model #(.LIFETIME(LIFE), .NW(NW)) u_sm (.clk, .rst_n,
      .issue(issue_valid && issue_sm == 4'(g)), .opt(opt[g]), .flat(flat[g]),
      .sb_stall(sb[g]), .pipe_stall(pipe[g]), .issued(iss[g]), .warps(warps[g]),
      .tb_done(tdone[g]), .n_blocks(nb[g]));
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // issue monitor and mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (issue_valid) begin
      check(int'(issue_id) == n_issued, $sformatf("block id %0d expected %0d", issue_id, n_issued));
      check(active[issue_sm] < limit[issue_sm] && active[issue_sm] < nmax,
            $sformatf("SM%0d got a block at %0d active, limit %0d", issue_sm, active[issue_sm], limit[issue_sm]));
      n_issued++;
    end
    for (int i = 0; i < NSM; i++) begin
      c_swap    += int'(ev_swap[i]);
      c_strong  += int'(ev_strong[i]);
      c_discard += int'(ev_discard[i]);
      c_tstop   += int'(ev_tstop[i]);
      if (krun && active[i] > limit[i]) c_drain++;
    end
    if (held) c_held++;
    // cycle classification: the classifier answers one cycle after the SM
    for (int i = 0; i < NSM; i++) begin
      activity_e e;
      if (iss_q[i])       e = ACT_ACTIVE;
      else if (pipe_q[i]) e = (nb_q[i] % 2 == 1) ? ACT_PIPE_MEM : ACT_PIPE_ALU;
      else if (sb_q[i])   e = (nb_q[i] % 2 == 1) ? ACT_SB_MEM : ACT_SB_ALU;
      else                e = ACT_IDLE;
      check(act[i] == e, $sformatf("SM%0d activity %s expected %s", i, act[i].name(), e.name()));
      c_act[int'(act[i])]++;
    end
    sb_q <= sb; pipe_q <= pipe; iss_q <= iss;
    for (int i = 0; i < NSM; i++) nb_q[i] <= nb[i];
    if (kend) n_kend++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int i, int nm);
    if (flat[i]) return (nm + 1) / 2 + 1;
    if (opt[i] >= nm) return nm;
    if (opt[i] <= 1) return 1;
    return opt[i];
  endfunction

  task automatic run_kernel(input int thr, input int regs, input int nblocks, input int exp_nmax);
    int cyc;
    @(negedge clk);
    req.threads = 12'(thr); req.reg_bytes = 20'(regs); req.shmem_bytes = '0;
    grid = 20'(nblocks); kstart = 1;
    n_issued = 0;
    @(negedge clk); kstart = 0;
    cyc = 0;
    while (!krun && cyc < 100) begin @(negedge clk); cyc++; end
    check(krun, "kernel launched");
    check(int'(nmax) == exp_nmax, $sformatf("N_max %0d expected %0d", nmax, exp_nmax));
    for (int i = 0; i < NSM; i++)
      check(int'(limit[i]) == (exp_nmax + 1) / 2, $sformatf("SM%0d starts at %0d", i, limit[i]));
    while (!(&conv) && krun) @(negedge clk);
    check(&conv, "all SMs converged while the kernel ran");
    for (int i = 0; i < NSM; i++) begin
      check(int'(limit[i]) == expected(i, exp_nmax),
            $sformatf("SM%0d (opt %0d flat %0b): N=%0d expected %0d", i, opt[i], flat[i], limit[i], expected(i, exp_nmax)));
      if (!flat[i] && limit[i] == TB_W'(exp_nmax) && opt[i] >= exp_nmax) c_bound++;
      check(int'(speriod[i]) >= LIFE * exp_nmax && int'(speriod[i]) <= (LIFE + 2 * NSM * 16) * exp_nmax,
            $sformatf("SM%0d sample period %0d", i, speriod[i]));
      check(dbit[i] == !flat[i], $sformatf("SM%0d direction bit %0b", i, dbit[i]));
    end
    while (krun) @(negedge clk);
    check(n_issued == nblocks, $sformatf("%0d blocks issued of %0d", n_issued, nblocks));
    for (int i = 0; i < NSM; i++) check(nb[i] == 0 && active[i] == 0, "SMs empty at kernel_end");
  endtask

  initial begin
    int opts[NSM];
    opts = '{12, 2, 16, 0, 6, 9, 8, 5, 1, 14, 3, 10, 7, 0};
    sb_q = '0; pipe_q = '0; iss_q = '0;
    for (int i = 0; i < NSM; i++) nb_q[i] = 0;
    for (int i = 0; i < NSM; i++) begin opt[i] = opts[i]; flat[i] = (i == 3 || i == 13); end
    kstart = 0; req = '0; grid = '0;
    n_issued = 0; n_kend = 0;
    for (int k = 0; k < 6; k++) c_act[k] = 0;
    c_swap = 0; c_strong = 0; c_discard = 0; c_tstop = 0; c_bound = 0; c_drain = 0; c_held = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // kernel 1: 16-thread blocks, 1536 register bytes -> 16 blocks per SM
    run_kernel(16, 1536, 60000, 16);
    // kernel 2: 256-thread blocks, 16384 register bytes -> 8 blocks (threads)
    run_kernel(256, 16384, 20000, 8);
    // kernel 3: one block needs more than the register file
    @(negedge clk);
    req.threads = 12'(1024); req.reg_bytes = 20'(300000); grid = 20'(10); kstart = 1;
    @(negedge clk); kstart = 0;
    repeat (40) @(negedge clk);
    check(no_fit && !krun && n_issued == 20000, "oversized kernel not launched");
    check(n_kend == 2, $sformatf("%0d kernel_end pulses", n_kend));
    $display("mechanisms: swaps=%0d strong=%0d discards=%0d toggle_stops=%0d bound_stops=%0d drain_cycles=%0d held_cycles=%0d",
             c_swap, c_strong, c_discard, c_tstop, c_bound, c_drain, c_held);
    check(c_swap > 0, "weak-increase/weak-decrease swap happened");
    check(c_strong > 0, "strong state entered");
    check(c_discard > 0, "sample discarded");
    check(c_tstop > 0, "toggle-limit stop happened");
    check(c_bound > 0, "stop at N_max happened");
    check(c_drain > 0, "an SM drained after its limit was lowered");
    check(c_held > 0, "issue held by a Perf-Sat limit");
    $display("cycle classes: active=%0d sb_alu=%0d sb_mem=%0d pipe_alu=%0d pipe_mem=%0d idle=%0d",
             c_act[0], c_act[1], c_act[2], c_act[3], c_act[4], c_act[5]);
    for (int k = 0; k < 6; k++) check(c_act[k] > 0, $sformatf("cycle class %0d seen", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
