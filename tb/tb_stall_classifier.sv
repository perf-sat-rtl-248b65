// tb_stall_classifier -- self-checking test of the per-SM cycle classifier.
// Drives random per-warp status (with weighted odds so that every case,
// including mixed dependency/resource waits and empty cores, occurs often),
// works out the expected category one warp at a time and compares it, one
// cycle later, with the registered activity and the two stall flags.
module tb_stall_classifier;
  import perfsat_pkg::*;
  localparam int NW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic issued;
  warp_status_t [NW-1:0] warps;
  activity_e act;
  logic sb, pipe;
  int checks = 0, failures = 0;
  int seen[6];

  always #5 clk = ~clk;

  stall_classifier #(.NUM_WARPS(NW)) dut (.clk, .rst_n, .issued, .warps, .activity(act),
    .sb_stall(sb), .pipe_stall(pipe));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    activity_e exp_act;
    issued = 0; warps = '0;
    for (int k = 0; k < 6; k++) seen[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 5000; t++) begin
      int nres, nsb;
      bit res_mem, sb_mem;
      issued = ($urandom_range(0, 3) == 0);
      nres = 0; nsb = 0; res_mem = 0; sb_mem = 0;
      for (int w = 0; w < NW; w++) begin
        warps[w].valid    = ($urandom_range(0, 3) != 0) && (t % 7 != 0);
        warps[w].res_wait = ($urandom_range(0, 9) == 0);
        warps[w].sb_wait  = ($urandom_range(0, 2) == 0);
        warps[w].mem      = ($urandom_range(0, 4) == 0);
        if (warps[w].valid && warps[w].res_wait) begin nres++; res_mem |= warps[w].mem; end
        if (warps[w].valid && warps[w].sb_wait)  begin nsb++;  sb_mem  |= warps[w].mem; end
      end
      if (issued)        exp_act = ACT_ACTIVE;
      else if (nres > 0) exp_act = res_mem ? ACT_PIPE_MEM : ACT_PIPE_ALU;
      else if (nsb > 0)  exp_act = sb_mem ? ACT_SB_MEM : ACT_SB_ALU;
      else               exp_act = ACT_IDLE;
      @(negedge clk);
      checks++;
      if (act != exp_act || sb != (exp_act inside {ACT_SB_ALU, ACT_SB_MEM})
          || pipe != (exp_act inside {ACT_PIPE_ALU, ACT_PIPE_MEM})) begin
        failures++;
        $display("FAIL cycle %0d: %s sb=%0b pipe=%0b, expected %s", t, act.name(), sb, pipe, exp_act.name());
      end
      seen[int'(exp_act)]++;
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL category %0d never exercised", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
