// tb_sample_period_unit -- self-checking test of Perf-Sat phase 1.
// For several first-block latencies and N_max values it checks that
// One_TB_cycles equals the latency, that the period is One_TB_cycles * N_max,
// that the first window opens one cycle after the first completion, and that
// sample_end then recurs exactly every period cycles; later completions must
// not disturb the timer.
module tb_sample_period_unit;
  import perfsat_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic kstart, kend, tb_done, measuring, wstart, send;
  logic [TB_W-1:0] nmax;
  logic [CYC_W-1:0] one_tb, period;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sample_period_unit dut (.clk, .rst_n, .kernel_start(kstart), .kernel_end(kend), .nmax,
    .tb_done, .measuring, .window_start(wstart), .sample_end(send),
    .one_tb_cycles(one_tb), .period);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat_list[4], nmax_list[4];
    lat_list  = '{37, 1, 120, 64};
    nmax_list = '{16, 8, 3, 1};
    kstart = 0; kend = 0; tb_done = 0; nmax = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4; t++) begin
      int lat, per, last, n_ends;
      lat = lat_list[t];
      per = lat * nmax_list[t];
      @(negedge clk);
      nmax = TB_W'(nmax_list[t]); kstart = 1;
      @(negedge clk); kstart = 0;
      check(measuring, "measuring after kernel_start");
      // first completion arrives lat cycles after kernel_start
      repeat (lat - 1) @(negedge clk);
      tb_done = 1;
      @(negedge clk); tb_done = 0;
      check(wstart, "window_start one cycle after first completion");
      check(one_tb == CYC_W'(lat), $sformatf("one_tb=%0d expected %0d", one_tb, lat));
      check(period == CYC_W'(per), $sformatf("period=%0d expected %0d", period, per));
      // window_start cycle is window cycle 0; count cycles to each sample_end
      last = -1; n_ends = 0;
      for (int c = 0; c < 4 * per; c++) begin
        if (c % 5 == 2) tb_done = 1; // later completions are ignored
        if (send) begin
          check(c - last == per, $sformatf("sample_end spacing %0d expected %0d", c - last, per));
          last = c; n_ends++;
        end
        @(negedge clk); tb_done = 0;
      end
      check(n_ends == 4, $sformatf("%0d sample ends in 4 periods", n_ends));
      kend = 1; @(negedge clk); kend = 0;
      check(!measuring && !send, "idle after kernel_end");
      repeat (per + 2) begin
        @(negedge clk);
        check(!send, "no sample_end while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
