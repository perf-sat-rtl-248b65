// perfsat_pkg -- types and constants shared by the Perf-Sat thread block
// throttling logic.
//
// Perf-Sat watches how many cycles each GPU core (SM) spends stalled and
// moves the number of thread blocks allowed on that core up or down until the
// stalled cycle count stops improving. The decision logic is a small state
// machine with four decision states (weak/strong increase, weak/strong
// decrease) taken from the published algorithm; the extra bookkeeping states
// (idle, measuring the first block, first sample, done) and every width here
// are this design's own choices.
//
// Default SM capacities follow the NVIDIA Tesla K20X (Kepler) configuration:
// 16 blocks, 2048 threads and a 256 KB register file per SM, 14 SMs
// (2688 SP units / 192 per SM). The shared memory size (48 KB) is not in the
// source material and is an assumed, typical value.
package perfsat_pkg;

  // Width of a thread block count (0..31 covers the 16-block Kepler SM).
  localparam int unsigned TB_W        = 5;
  // Width of cycle and stall counters.
  localparam int unsigned CYC_W       = 32;
  // Perf-Sat gives up oscillating and fixes the count after more than this
  // many toggles.
  localparam int unsigned TOGGLE_LIMIT = 3;

  // GPU configuration defaults (K20X).
  localparam int unsigned K20X_NUM_SM        = 14;
  localparam int unsigned K20X_MAX_TB        = 16;
  localparam int unsigned K20X_MAX_THREADS   = 2048;
  localparam int unsigned K20X_REGFILE_BYTES = 262144;
  localparam int unsigned DEF_SHMEM_BYTES    = 49152;

  // Warps per SM: 2048 threads / 32 threads per warp.
  localparam int unsigned WARP_SIZE          = 32;
  localparam int unsigned K20X_NUM_WARPS     = K20X_MAX_THREADS / WARP_SIZE;

  // Fermi (M2090) values, for reference and for reduced-size tests.
  localparam int unsigned M2090_NUM_SM        = 16;
  localparam int unsigned M2090_MAX_TB        = 8;
  localparam int unsigned M2090_MAX_THREADS   = 1536;
  localparam int unsigned M2090_REGFILE_BYTES = 131072;
  localparam int unsigned M2090_NUM_WARPS     = M2090_MAX_THREADS / WARP_SIZE;

  typedef enum logic [2:0] {
    PS_IDLE       = 3'd0,  // no kernel running on this core
    PS_MEASURE    = 3'd1,  // phase 1: timing the first thread block
    PS_FIRST      = 3'd2,  // first sample period at ceil(Nmax/2)
    PS_WEAK_INC   = 3'd3,
    PS_STRONG_INC = 3'd4,
    PS_WEAK_DEC   = 3'd5,
    PS_STRONG_DEC = 3'd6,
    PS_DONE       = 3'd7   // optimal count found and held
  } ps_state_e;

  // What one warp slot of an SM is doing this cycle, as reported by the
  // SM's warp scheduler to the stall classifier. A resident warp with neither
  // wait flag set has nothing to issue (it waits at a barrier).
  typedef struct packed {
    logic valid;    // slot holds a resident warp
    logic sb_wait;  // next instruction waits on a scoreboard dependency
    logic res_wait; // next instruction is ready but its unit/MSHR/queue is busy
    logic mem;      // the instruction involved is a memory operation
  } warp_status_t;

  // Classification of one SM cycle.
  typedef enum logic [2:0] {
    ACT_ACTIVE   = 3'd0, // an instruction was issued
    ACT_SB_ALU   = 3'd1, // scoreboard stall behind an arithmetic instruction
    ACT_SB_MEM   = 3'd2, // scoreboard stall behind a memory instruction
    ACT_PIPE_ALU = 3'd3, // pipeline stall on a computational unit
    ACT_PIPE_MEM = 3'd4, // pipeline stall on a memory resource
    ACT_IDLE     = 3'd5  // nothing to issue: warps at a barrier or none resident
  } activity_e;

  // Per-kernel resource needs of one thread block.
  typedef struct packed {
    logic [11:0] threads;     // threads per block
    logic [19:0] reg_bytes;   // register file bytes per block
    logic [17:0] shmem_bytes; // shared memory bytes per block
  } block_req_t;

endpackage
