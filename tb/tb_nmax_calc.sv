// tb_nmax_calc -- self-checking test of the occupancy (N_max) calculator.
// Runs the per-block needs of sixteen Rodinia kernels through a Fermi-sized
// (8 blocks, 1536 threads, 128 KB registers) and a Kepler-sized (16 blocks,
// 2048 threads, 256 KB registers) instance and compares with N_max computed
// here by division; then random requests. It checks the answer arrives
// within MAX_TB + 1 cycles of start.
module tb_nmax_calc;
  import perfsat_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  block_req_t req;
  logic busy_f, valid_f, nofit_f, busy_k, valid_k, nofit_k;
  logic [TB_W-1:0] nmax_f, nmax_k;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nmax_calc #(.MAX_TB(M2090_MAX_TB), .MAX_THREADS(M2090_MAX_THREADS),
              .REGFILE_BYTES(M2090_REGFILE_BYTES)) u_fermi (
    .clk, .rst_n, .start, .req, .busy(busy_f), .valid(valid_f), .nmax(nmax_f), .no_fit(nofit_f));
  nmax_calc u_kepler (
    .clk, .rst_n, .start, .req, .busy(busy_k), .valid(valid_k), .nmax(nmax_k), .no_fit(nofit_k));

  function automatic int ref_nmax(int max_tb, int max_thr, int rf, int shm,
                                  int t, int r, int s);
    int n = max_tb;
    if (t != 0 && max_thr / t < n) n = max_thr / t;
    if (r != 0 && rf / r < n) n = rf / r;
    if (s != 0 && shm / s < n) n = shm / s;
    return n;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input int t, input int r, input int s, input string name);
    int ef, ek, cyc;
    bit got_f, got_k;
    ef = ref_nmax(M2090_MAX_TB, M2090_MAX_THREADS, M2090_REGFILE_BYTES, DEF_SHMEM_BYTES, t, r, s);
    ek = ref_nmax(K20X_MAX_TB, K20X_MAX_THREADS, K20X_REGFILE_BYTES, DEF_SHMEM_BYTES, t, r, s);
    @(negedge clk);
    req.threads = 12'(t); req.reg_bytes = 20'(r); req.shmem_bytes = 18'(s);
    start = 1;
    @(negedge clk); start = 0;
    got_f = 0; got_k = 0; cyc = 0;
    while (!(got_f && got_k) && cyc < 40) begin
      cyc++;
      if (valid_f) begin
        got_f = 1;
        check(int'(nmax_f) == ef && nofit_f == (ef == 0), $sformatf("%s Fermi nmax=%0d expected %0d", name, nmax_f, ef));
        check(cyc <= M2090_MAX_TB + 2, $sformatf("%s Fermi latency %0d", name, cyc));
      end
      if (valid_k) begin
        got_k = 1;
        check(int'(nmax_k) == ek && nofit_k == (ek == 0), $sformatf("%s Kepler nmax=%0d expected %0d", name, nmax_k, ek));
        check(cyc <= K20X_MAX_TB + 2, $sformatf("%s Kepler latency %0d", name, cyc));
      end
      @(negedge clk);
    end
    check(got_f && got_k, $sformatf("%s: both answered", name));
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // register bytes and threads per block of the evaluated kernels
    int regs[16], thr[16];
    regs = '{12288, 24576, 24576, 20480, 39936, 1536, 16384, 36864,
                     16384, 16384, 12288, 12288, 16384, 20480, 20480, 12288};
    thr  = '{256, 256, 256, 256, 192, 16, 256, 256,
                     256, 256, 256, 256, 256, 256, 256, 256};
    start = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 16; k++) run(thr[k], regs[k], 0, $sformatf("kernel%0d", k));
    // spot values: BP-2 (24576 B, 256 thr) -> 5 on Fermi, 8 on Kepler
    run(256, 24576, 0, "BP-2");
    check(nmax_f == 5 && nmax_k == 8, "BP-2 known N_max");
    // Gaussian (16 threads) is limited by block slots
    run(16, 1536, 0, "Gaussian");
    check(nmax_f == 8 && nmax_k == 16, "Gaussian known N_max");
    // shared memory limited, and a block that does not fit
    run(64, 1024, 20000, "shmem");
    check(nmax_k == 2, "shared memory limits to 2");
    run(1024, 300000, 0, "too big");
    check(nofit_k && nmax_k == 0, "no_fit");
    for (int i = 0; i < 60; i++)
      run($urandom_range(1, 1024), $urandom_range(0, 140000), $urandom_range(0, 30000), "random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
