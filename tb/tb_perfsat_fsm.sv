// tb_perfsat_fsm -- self-checking test of the Perf-Sat decision machine.
// Feeds hand-built stalled cycle samples and checks the block limit after
// every sample against the sequence the algorithm prescribes:
//   A  N_max=15, optimum 12 (the worked example: start 8, two samples at 9,
//      then 10, 11, 12, 13 twice, stop at 12)
//   B  N_max=8, optimum 2 (direction search turns to decrease)
//   C  flat profile: weak-increase/weak-decrease oscillation, stop at N0+1
//   D  N_max=8, stalls fall all the way (stop at the N_max bound)
//   E  oscillation between weak- and strong-increase, stop at the previous
//      count after the toggle limit
//   F  N_max=1, nothing to search
module tb_perfsat_fsm;
  import perfsat_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic kstart, kend, wstart, svalid;
  logic [TB_W-1:0] nmax, limit;
  logic [CYC_W-1:0] sample, prev;
  ps_state_e state;
  logic dbit, hbit, conv, ev_swap, ev_strong, ev_discard, ev_tstop;
  int checks = 0, failures = 0;
  int n_swap, n_strong, n_discard, n_tstop;

  always #5 clk = ~clk;

  perfsat_fsm dut (.clk, .rst_n, .kernel_start(kstart), .kernel_end(kend), .nmax,
    .window_start(wstart), .sample_valid(svalid), .sample, .limit, .state,
    .dir_bit(dbit), .hist_bit(hbit), .converged(conv), .prev_sample(prev),
    .ev_swap, .ev_strong, .ev_discard, .ev_toggle_stop(ev_tstop));

  always @(posedge clk) if (rst_n) begin
    n_swap    += int'(ev_swap);
    n_strong  += int'(ev_strong);
    n_discard += int'(ev_discard);
    n_tstop   += int'(ev_tstop);
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic start_kernel(input int nm);
    @(negedge clk);
    nmax = TB_W'(nm); kstart = 1;
    @(negedge clk); kstart = 0;
    check(limit == TB_W'((nm + 1) / 2), $sformatf("initial limit %0d for nmax %0d", limit, nm));
    check(state == PS_MEASURE, "measuring first block");
    repeat (3) @(negedge clk);
    wstart = 1; @(negedge clk); wstart = 0;
    check(state == PS_FIRST, "first sample state");
  endtask

  // stall profile: V shape around opt, or a table
  function automatic int vshape(int n, int opt);
    return 1000 + 50 * ((n > opt) ? n - opt : opt - n);
  endfunction

  // run samples produced by a profile until converged; return limit sequence
  task automatic run_profile(input int opt, input bit flat, input int max_samples,
                             output int seq[$]);
    seq = {};
    for (int s = 0; s < max_samples && !conv; s++) begin
      int v;
      seq.push_back(int'(limit));
      v = flat ? 500 : vshape(int'(limit), opt);
      sample = CYC_W'(v); svalid = 1;
      @(negedge clk); svalid = 0;
      repeat (2) @(negedge clk);
    end
  endtask

  task automatic expect_seq(input string name, input int got[$], input int exp[$], input int final_n);
    check(got.size() == exp.size(), $sformatf("%s: %0d samples, expected %0d", name, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("%s: sample %0d taken at N=%0d, expected %0d", name, i, got[i], exp[i]));
    check(conv, $sformatf("%s: converged", name));
    check(limit == TB_W'(final_n), $sformatf("%s: final limit %0d expected %0d", name, limit, final_n));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seq[$];
    kstart = 0; kend = 0; wstart = 0; svalid = 0; sample = '0; nmax = '0;
    n_swap = 0; n_strong = 0; n_discard = 0; n_tstop = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // A: the worked example
    start_kernel(15);
    run_profile(12, 0, 30, seq);
    expect_seq("A", seq, '{8, 9, 9, 10, 11, 12, 13, 13}, 12);
    check(n_strong == 1 && n_discard == 1 && n_swap == 0, "A: events");

    // B: optimum below N0
    n_swap = 0; n_strong = 0; n_discard = 0;
    start_kernel(8);
    run_profile(2, 0, 30, seq);
    expect_seq("B", seq, '{4, 5, 4, 4, 3, 2, 1, 1}, 2);
    check(n_swap == 1 && n_strong == 1 && n_discard == 1, "B: events");

    // C: flat profile, toggles between the two weak states
    n_swap = 0; n_tstop = 0;
    start_kernel(8);
    run_profile(0, 1, 30, seq);
    expect_seq("C", seq, '{4, 5, 4, 5, 4}, 5);
    check(n_swap == 3 && n_tstop == 1, $sformatf("C: %0d swaps, %0d toggle stops", n_swap, n_tstop));

    // D: C-strong kernel, stops at N_max
    start_kernel(8);
    run_profile(20, 0, 30, seq);
    expect_seq("D", seq, '{4, 5, 5, 6, 7, 8}, 8);

    // E: oscillation between weak- and strong-increase
    n_tstop = 0;
    begin
      int vals[11], exp_n[11];
      vals  = '{100, 90, 80, 110, 80, 90, 80, 90, 80, 90, 80};
      exp_n = '{8, 9, 9, 10, 10, 11, 11, 12, 12, 13, 13};
      start_kernel(16);
      for (int s = 0; s < 11; s++) begin
        check(limit == TB_W'(exp_n[s]), $sformatf("E: sample %0d at N=%0d expected %0d", s, limit, exp_n[s]));
        check(!conv, "E: not converged early");
        sample = CYC_W'(vals[s]); svalid = 1;
        @(negedge clk); svalid = 0;
        @(negedge clk);
      end
      check(conv && limit == TB_W'(12), $sformatf("E: final %0d expected 12", limit));
      check(n_tstop == 1, "E: stopped by toggle limit");
    end

    // F: N_max = 1
    start_kernel(1);
    sample = 5; svalid = 1; @(negedge clk); svalid = 0; @(negedge clk);
    check(conv && limit == 1, "F: N_max=1 done at 1");

    // kernel_end returns to idle
    kend = 1; @(negedge clk); kend = 0;
    check(state == PS_IDLE, "idle after kernel_end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
