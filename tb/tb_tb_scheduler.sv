// tb_tb_scheduler -- self-checking test of the round-robin thread block
// scheduler with 5 SMs. A model in the testbench keeps its own per-SM block
// counts, predicts which SM must get each block (first eligible SM after the
// last one served) and checks: block ids in order, no SM above
// min(N_max, limit), blocks completing at random, a lowered limit holding
// issue until blocks drain, and kernel_end after the last completion.
module tb_tb_scheduler;
  import perfsat_pkg::*;
  localparam int NSM = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic launch;
  logic [19:0] grid;
  logic [TB_W-1:0] nmax;
  logic [NSM-1:0][TB_W-1:0] limit, active;
  logic [NSM-1:0] done;
  logic issue_valid, running, kend, held;
  logic [2:0] issue_sm;
  logic [19:0] issue_id;
  int checks = 0, failures = 0;
  int cnt[NSM];
  int rr, issued, completed, n_held, n_kend;
  int lim[NSM];

  always #5 clk = ~clk;

  tb_scheduler #(.NUM_SM(NSM)) dut (.clk, .rst_n, .launch, .grid_blocks(grid), .nmax, .limit,
    .tb_done(done), .issue_valid, .issue_sm, .issue_block_id(issue_id), .active,
    .running, .kernel_end(kend), .held);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_kernel(input int nblocks, input int nm, input int cycles_lower);
    bit ended;
    @(negedge clk);
    for (int i = 0; i < NSM; i++) begin cnt[i] = 0; lim[i] = nm; limit[i] = TB_W'(nm); end
    grid = 20'(nblocks); nmax = TB_W'(nm); launch = 1;
    @(negedge clk); launch = 0;
    rr = 0; issued = 0; completed = 0; ended = 0;
    for (int cyc = 0; cyc < 100000 && !ended; cyc++) begin
      int exp_sm;
      // Perf-Sat style limit changes: lower SM 1 and 3 for a while
      if (cyc == cycles_lower) begin lim[1] = 1; lim[3] = 2; end
      if (cyc == 3 * cycles_lower) begin lim[1] = nm; lim[3] = nm; end
      for (int i = 0; i < NSM; i++) limit[i] = TB_W'(lim[i]);
      // random completions
      for (int i = 0; i < NSM; i++) begin
        done[i] = (cnt[i] > 0) && ($urandom_range(0, 7) == 0);
      end
      #1;
      // expected pick
      exp_sm = -1;
      if (issued < nblocks)
        for (int k = 0; k < NSM; k++) begin
          int idx = (rr + k) % NSM;
          if (exp_sm < 0 && cnt[idx] < nm && cnt[idx] < lim[idx]) exp_sm = idx;
        end
      check(issue_valid == (exp_sm >= 0), $sformatf("issue_valid=%0b expected %0b", issue_valid, exp_sm >= 0));
      if (issue_valid && exp_sm >= 0) begin
        check(int'(issue_sm) == exp_sm, $sformatf("issue to SM %0d expected %0d", issue_sm, exp_sm));
        check(int'(issue_id) == issued, $sformatf("block id %0d expected %0d", issue_id, issued));
      end
      if (held) n_held++;
      for (int i = 0; i < NSM; i++)
        check(int'(active[i]) == cnt[i], $sformatf("SM%0d active %0d expected %0d", i, active[i], cnt[i]));
      if (kend) begin
        ended = 1; n_kend++;
        check(completed == nblocks && issued == nblocks, "kernel_end after all blocks done");
      end
      @(negedge clk);
      if (exp_sm >= 0) begin cnt[exp_sm]++; issued++; rr = (exp_sm + 1) % NSM; end
      for (int i = 0; i < NSM; i++) if (done[i]) begin cnt[i]--; completed++; end
      for (int i = 0; i < NSM; i++) done[i] = 0;
    end
    check(ended, "kernel ended");
    check(!running, "not running after kernel_end");
  endtask

  initial begin
    launch = 0; grid = '0; nmax = '0; limit = '0; done = '0;
    n_held = 0; n_kend = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_kernel(300, 4, 50);
    run_kernel(37, 8, 10);
    run_kernel(500, 3, 100);
    check(n_held > 0, $sformatf("issue held by a Perf-Sat limit %0d times", n_held));
    check(n_kend == 3, "three kernel_end pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
