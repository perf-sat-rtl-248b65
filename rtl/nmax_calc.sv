// nmax_calc -- occupancy calculator: the most thread blocks of one kernel
// that fit on an SM (N_max).
//
// A block can be placed on an SM only if four resources suffice: thread
// slots, block slots, register file bytes and shared memory bytes. For a kernel
// whose blocks are all alike, N_max is the largest n with n <= MAX_TB and
// n * need <= capacity for each of the other three. The unit finds it by
// stepping n up one block per cycle and keeping running totals of the three
// needs (adders only, no divider), so it answers at most MAX_TB + 1 cycles
// after `start`. A need of zero never limits. If not even one block fits,
// nmax is 0 and `no_fit` is set.
//
// The four-resource rule follows the source material; the serial search and
// the cycle timing are this design's choices. The shared memory capacity is an
// assumed value (48 KB), the others are the K20X figures.
//
// Interface: `start` (one cycle) samples `req`; `busy` is high while
// searching; `valid` pulses for one cycle with the result held in `nmax`.
module nmax_calc
  import perfsat_pkg::*;
#(
  parameter int unsigned NB_W          = TB_W,
  parameter int unsigned MAX_TB        = K20X_MAX_TB,
  parameter int unsigned MAX_THREADS   = K20X_MAX_THREADS,
  parameter int unsigned REGFILE_BYTES = K20X_REGFILE_BYTES,
  parameter int unsigned SHMEM_BYTES   = DEF_SHMEM_BYTES
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  block_req_t      req,
  output logic            busy,
  output logic            valid,
  output logic [NB_W-1:0] nmax,
  output logic            no_fit
);

  block_req_t  req_q;
  logic [NB_W-1:0] n;
  logic [31:0] thr_sum, reg_sum, shm_sum;
  logic [31:0] thr_nxt, reg_nxt, shm_nxt;
  logic        fits_one_more;

  always_comb begin
    thr_nxt = thr_sum + 32'(req_q.threads);
    reg_nxt = reg_sum + 32'(req_q.reg_bytes);
    shm_nxt = shm_sum + 32'(req_q.shmem_bytes);
    fits_one_more = (32'(n) < MAX_TB)
                 && (thr_nxt <= MAX_THREADS)
                 && (reg_nxt <= REGFILE_BYTES)
                 && (shm_nxt <= SHMEM_BYTES);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_q   <= '0;
      n       <= '0;
      thr_sum <= '0;
      reg_sum <= '0;
      shm_sum <= '0;
      busy    <= 1'b0;
      valid   <= 1'b0;
      nmax    <= '0;
      no_fit  <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (start) begin
        req_q   <= req;
        n       <= '0;
        thr_sum <= '0;
        reg_sum <= '0;
        shm_sum <= '0;
        busy    <= 1'b1;
      end else if (busy) begin
        if (fits_one_more) begin
          n       <= n + 1'b1;
          thr_sum <= thr_nxt;
          reg_sum <= reg_nxt;
          shm_sum <= shm_nxt;
        end else begin
          busy   <= 1'b0;
          valid  <= 1'b1;
          nmax   <= n;
          no_fit <= (n == '0);
        end
      end
    end
  end

endmodule
