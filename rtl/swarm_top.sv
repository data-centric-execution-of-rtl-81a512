// swarm_top: a tiled speculative multicore's task-management fabric with
// spatial-hint task mapping and hint-based load balancing.
//
// NTILES tiles (64, on an 8x8 arrangement) each hold a task unit serving
// NCORES cores (4): 256 cores in all, 64 task queue entries and 16 commit
// queue entries per core. Tasks carry a timestamp and a spatial hint; a new
// task goes to the tile that its hint's bucket maps to, tasks with the same
// hashed hint are not run concurrently on a tile, and a periodic global
// virtual time (every 200 cycles) lets finished tasks commit in timestamp
// order. Committed cycles are profiled per bucket so that load-balancing
// software can rewrite the tile map; 'lb_req' pulses every LB_PERIOD cycles
// (500 K) to start that software. These numbers are the described
// configuration.
//
// This design's own choices: ties between equal timestamps are broken by a
// tiebreaker {dispatch cycle, tile}, taken from the 32-bit cycle counter
// vt_now kept here (it wraps after 2^32 cycles); the lb_req timer; the
// crossbar in place of the mesh. TQ_IDX_W is kept as a derived parameter for
// users sizing task indices and is not used inside.
//
// Lint notes: rst_n is an asynchronous reset everywhere; it is also read by
// the assertions' 'disable iff', which lint reports as a synchronous use.
// task_idx and cnt_dropped are left unconnected on purpose (the cores here
// do not need the queue index; dropped samples are for debug). Loop
// variables declared as int report unused upper bits.
//
// The cores, caches, conflict detection and the load-balancing software are
// outside this module: each core's task interface is brought out as ports
// (index t*NCORES + c for core c of tile t), as are the tile map write port
// (one write broadcast to all tiles' copies per cycle) and each tile's
// counter read port. The mesh network is abstracted by task_xbar (one task
// into each tile per cycle, delivered in the cycle it wins arbitration).
module swarm_top
  import swarm_pkg::*;
#(
  parameter int NTILES       = 64,
  parameter int NCORES       = 4,
  parameter int TQ_PER_CORE  = 64,
  parameter int CQ_PER_CORE  = 16,
  parameter int NBUCKETS     = 16 * NTILES,
  parameter int NCNT         = 32,
  parameter int GVT_PERIOD   = 200,
  parameter int LB_PERIOD    = 500_000,
  parameter bit LOAD_BALANCE = 1'b1,
  parameter int TILE_W       = (NTILES > 1) ? $clog2(NTILES) : 1,
  parameter int TQ_IDX_W     = $clog2(NCORES * TQ_PER_CORE),
  parameter int CNT_IDX_W    = $clog2(NCNT),
  parameter int NC           = NTILES * NCORES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // cores
  input  logic [NC-1:0]        deq_req,
  output logic [NC-1:0]        task_valid,
  output task_desc_t           task_desc [NC],
  input  logic [NC-1:0]        fin_valid,
  input  logic [NC-1:0]        fin_abort,
  output logic [NC-1:0]        fin_ready,
  input  logic [NC-1:0]        enq_valid,
  input  enq_req_t             enq_req   [NC],
  output logic [NC-1:0]        enq_ready,
  // load balancing
  output logic                 lb_req,
  input  logic                 tm_wr_en,
  input  logic [BUCKET_W-1:0]  tm_wr_bucket,
  input  logic [TILE_W-1:0]    tm_wr_tile,
  input  logic                 cnt_clear,
  input  logic [CNT_IDX_W-1:0] cnt_rd_idx   [NTILES],
  output logic [NTILES-1:0]    cnt_rd_valid,
  output logic [BUCKET_W-1:0]  cnt_rd_tag   [NTILES],
  output logic [CNT_W-1:0]     cnt_rd_count [NTILES],
  // status
  output vt_t                  gvt,
  output logic                 gvt_update,
  output logic                 busy,
  output tile_stats_t          stats [NTILES]
);
  logic [NTILES-1:0] out_valid, out_ready, in_valid, in_ready, min_valid, tile_busy;
  logic [TILE_W-1:0] out_dest [NTILES];
  task_desc_t        out_desc [NTILES];
  task_desc_t        in_desc  [NTILES];
  vt_t               min_vt   [NTILES];
  logic [31:0]       vt_now;

  for (genvar t = 0; t < NTILES; t++) begin : g_tile
    task_desc_t tdesc;
    enq_req_t   ereq [NCORES];
    for (genvar c = 0; c < NCORES; c++) begin : g_core
      assign ereq[c]                = enq_req[t*NCORES + c];
      assign task_desc[t*NCORES + c] = tdesc;
    end
    task_unit #(
      .NTILES(NTILES), .TILE_W(TILE_W), .NCORES(NCORES),
      .TQ_ENT(NCORES * TQ_PER_CORE), .CQ_ENT(NCORES * CQ_PER_CORE),
      .NBUCKETS(NBUCKETS), .NCNT(NCNT), .LOAD_BALANCE(LOAD_BALANCE)
    ) u_tu (
      .clk, .rst_n, .my_tile(TILE_W'(t)), .vt_now,
      .deq_req   (deq_req   [t*NCORES +: NCORES]),
      .task_valid(task_valid[t*NCORES +: NCORES]),
      .task_desc (tdesc), .task_idx(),
      .fin_valid (fin_valid [t*NCORES +: NCORES]),
      .fin_abort (fin_abort [t*NCORES +: NCORES]),
      .fin_ready (fin_ready [t*NCORES +: NCORES]),
      .enq_valid (enq_valid [t*NCORES +: NCORES]),
      .enq_req   (ereq),
      .enq_ready (enq_ready [t*NCORES +: NCORES]),
      .out_valid(out_valid[t]), .out_dest(out_dest[t]), .out_desc(out_desc[t]),
      .out_ready(out_ready[t]),
      .in_valid(in_valid[t]), .in_desc(in_desc[t]), .in_ready(in_ready[t]),
      .gvt, .min_valid(min_valid[t]), .min_vt(min_vt[t]),
      .tm_wr_en, .tm_wr_bucket, .tm_wr_tile,
      .cnt_clear, .cnt_rd_idx(cnt_rd_idx[t]), .cnt_rd_valid(cnt_rd_valid[t]),
      .cnt_rd_tag(cnt_rd_tag[t]), .cnt_rd_count(cnt_rd_count[t]), .cnt_dropped(),
      .busy(tile_busy[t]), .stats(stats[t])
    );
  end

  task_xbar #(.NTILES(NTILES), .TILE_W(TILE_W)) u_net (
    .clk, .rst_n,
    .src_valid(out_valid), .src_dest(out_dest), .src_desc(out_desc), .src_ready(out_ready),
    .dst_valid(in_valid), .dst_desc(in_desc), .dst_ready(in_ready)
  );

  gvt_arbiter #(.NTILES(NTILES), .PERIOD(GVT_PERIOD)) u_gvt (
    .clk, .rst_n, .tile_min_valid(min_valid), .tile_min_vt(min_vt),
    .gvt, .update(gvt_update)
  );

  // global cycle count for tiebreakers (wraps after 2^32 cycles)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vt_now <= '0;
    else        vt_now <= vt_now + 1'b1;
  end

  // load-balancer reconfiguration timer
  logic [$clog2(LB_PERIOD + 1)-1:0] lb_timer;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lb_timer <= '0;
      lb_req   <= 1'b0;
    end else begin
      lb_req <= 1'b0;
      if (lb_timer == ($clog2(LB_PERIOD + 1))'(LB_PERIOD - 1)) begin
        lb_timer <= '0;
        lb_req   <= 1'b1;
      end else begin
        lb_timer <= lb_timer + 1'b1;
      end
    end
  end

  assign busy = |tile_busy;
endmodule
