// swarm_pkg: types and constants shared by the task-unit blocks of a tiled
// speculative multicore that maps tasks to tiles by spatial hints.
//
// A task descriptor carries the task's function pointer, 64-bit timestamp and
// three 64-bit arguments (the descriptor contents and widths follow the design
// description), plus the hint state every task keeps for its whole lifetime:
// a 16-bit hash of its hint and its 10-bit load-balancing bucket. An enqueue
// request from a core carries the raw 64-bit hint and its kind (integer hint,
// NOHINT or SAMEHINT). The H3 hash matrices are generated by h3_row() from a
// fixed formula (a splitmix64 sequence); the formula is this design's choice,
// the description only names H3 hashing. Virtual time (timestamp plus a
// dispatch-order tiebreaker) orders tasks with equal timestamps for commit.
package swarm_pkg;

  localparam int TS_W     = 64;  // task timestamp
  localparam int HINT_W   = 64;  // spatial hint given at enqueue
  localparam int FN_W     = 64;  // task function pointer
  localparam int NARGS    = 3;   // arguments passed in registers
  localparam int ARG_W    = 64;
  localparam int HHASH_W  = 16;  // hashed hint kept with each task
  localparam int BUCKET_W = 10;  // hint-to-bucket hash (1024 buckets)
  localparam int CYC_W    = 16;  // per-task execution cycle count
  localparam int CNT_W    = 32;  // per-bucket committed cycle counter

  // H3 seeds of the three hash functions of a tile
  localparam int unsigned SEED_HHASH  = 1;
  localparam int unsigned SEED_BUCKET = 2;
  localparam int unsigned SEED_TILE   = 3;

  localparam int TBRK_W   = 38;  // tiebreaker: {dispatch cycle[31:0], tile[5:0]}

  typedef logic [TS_W-1:0] ts_t;

  // Virtual time: the order in which tasks commit. Tasks with equal
  // timestamps are ordered by their tiebreaker, assigned when they are
  // dispatched; an idle task counts as dispatched now.
  typedef struct packed {
    ts_t               ts;
    logic [TBRK_W-1:0] tb;
  } vt_t;

  typedef enum logic [1:0] {
    HINT_INT  = 2'd0,   // 64-bit integer hint in enq_req_t.hint
    HINT_NONE = 2'd1,   // NOHINT: send to a random tile
    HINT_SAME = 2'd2    // SAMEHINT: inherit the parent's hint, queue locally
  } hint_kind_e;

  typedef struct packed {
    logic [FN_W-1:0]             fn;
    ts_t                         ts;
    logic [NARGS-1:0][ARG_W-1:0] args;
    logic                        hint_valid;  // 0 for NOHINT tasks
    logic [HHASH_W-1:0]          hhash;
    logic [BUCKET_W-1:0]         bucket;
  } task_desc_t;

  typedef struct packed {
    logic [FN_W-1:0]             fn;
    ts_t                         ts;
    hint_kind_e                  kind;
    logic [HINT_W-1:0]           hint;
    logic [NARGS-1:0][ARG_W-1:0] args;
  } enq_req_t;

  // Event counters a task unit exports (32 bits, wrapping).
  typedef struct packed {
    logic [31:0] enq_int;       // enqueues with an integer hint
    logic [31:0] enq_same;      // SAMEHINT enqueues
    logic [31:0] enq_none;      // NOHINT enqueues
    logic [31:0] remote_enq;    // enqueues sent to another tile
    logic [31:0] dispatches;
    logic [31:0] serial_skips;  // candidates skipped by hint serialization
    logic [31:0] aborts;
    logic [31:0] commits;
    logic [31:0] enq_stalls;    // cycles the outgoing task waited
    logic [31:0] cq_stalls;     // cycles a finishing core waited for the commit queue
    logic [31:0] cq_evictions;  // finished tasks aborted to make room in the commit queue
  } tile_stats_t;

  // Row i of the H3 matrix of hash function 'seed': output bit i is the XOR
  // of the hint bits selected by this row.
  function automatic logic [63:0] h3_row(input int unsigned seed, input int unsigned i);
    logic [63:0] x;
    x = 64'h9E37_79B9_7F4A_7C15 * (64'(seed) * 64'd64 + 64'(i) + 64'd1);
    x = (x ^ (x >> 30)) * 64'hBF58_476D_1CE4_E5B9;
    x = (x ^ (x >> 27)) * 64'h94D0_49BB_1331_11EB;
    x = x ^ (x >> 31);
    return x;
  endfunction

endpackage
