// tb_perfsat_unit -- self-checking test of one Perf-Sat unit driving a
// behavioural SM. The testbench plays the scheduler: it keeps the SM filled
// up to the unit's limit. For each stall profile (optimum inside the range,
// optimum below the start point, a flat profile, stalls that keep falling up to N_max)
// it checks the measured first-block time, the sample period
// (One_TB_cycles * N_max), the spacing of samples and the final block count.
module tb_perfsat_unit;
  import perfsat_pkg::*;
  localparam int LIFE = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  logic kstart, kend, issue;
  logic [TB_W-1:0] nmax, limit;
  logic sb, pipe, tdone, conv, dbit, hbit, svalid;
  logic ev_swap, ev_strong, ev_discard, ev_tstop;
  logic [CYC_W-1:0] one_tb, period, sample;
  ps_state_e state;
  int opt, held_blocks, n_blocks, last_sample, n_samples;
  bit flat;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  perfsat_unit dut (.clk, .rst_n, .kernel_start(kstart), .kernel_end(kend), .nmax,
    .sb_stall(sb), .pipe_stall(pipe), .tb_done(tdone), .limit, .state, .converged(conv),
    .dir_bit(dbit), .hist_bit(hbit), .one_tb_cycles(one_tb), .period, .sample_valid(svalid),
    .sample, .ev_swap, .ev_strong, .ev_discard, .ev_toggle_stop(ev_tstop));

  sm_model #(.LIFETIME(LIFE)) u_sm (.clk, .rst_n, .issue, .opt, .flat,
    .sb_stall(sb), .pipe_stall(pipe), .tb_done(tdone), .n_blocks);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // scheduler stand-in: one block per cycle while below the limit
  always_ff @(posedge clk) begin
    if (!rst_n) held_blocks <= 0;
    else held_blocks <= held_blocks + int'(issue) - int'(tdone);
  end
  assign issue = (state != PS_IDLE) && (held_blocks < int'(limit)) && !kstart;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nm, input int o, input bit fl, input int exp_final);
    int cyc;
    @(negedge clk);
    opt = o; flat = fl; nmax = TB_W'(nm); kstart = 1;
    @(negedge clk); kstart = 0;
    cyc = 0; last_sample = -1; n_samples = 0;
    while (!conv && cyc < 150000) begin
      if (svalid) begin
        if (last_sample >= 0)
          check(cyc - last_sample == int'(period), $sformatf("sample spacing %0d, period %0d", cyc - last_sample, period));
        last_sample = cyc; n_samples++;
      end
      @(negedge clk); cyc++;
    end
    check(conv, $sformatf("opt=%0d flat=%0b converged", o, fl));
    check(int'(one_tb) >= LIFE && int'(one_tb) <= LIFE + 3, $sformatf("one_tb %0d", one_tb));
    check(period == one_tb * nm, $sformatf("period %0d = %0d * %0d", period, one_tb, nm));
    check(int'(limit) == exp_final, $sformatf("nmax=%0d opt=%0d flat=%0b: final %0d expected %0d", nm, o, fl, limit, exp_final));
    // let the SM drain and end the kernel
    kend = 1; @(negedge clk); kend = 0;
    while (held_blocks != 0) @(negedge clk);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    kstart = 0; kend = 0; nmax = '0; opt = 0; flat = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(8, 6, 0, 6);
    run(8, 2, 0, 2);
    run(8, 0, 1, 5);
    run(8, 12, 0, 8);
    run(16, 12, 0, 12);
    run(6, 3, 0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
