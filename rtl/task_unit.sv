// task_unit: the hint-aware task unit of one tile.
//
// It queues, dispatches and commits the tasks of the tile and sends the tasks
// its cores create to their destination tiles:
//   * enqueue path: the cores' enqueue requests are served round-robin, one
//     per cycle. hint_mapper turns the hint into a hashed hint, a bucket and a
//     destination (through tile_map), and the descriptor waits in a one-entry
//     outbox until the task network takes it. A core is stalled while its
//     request is not taken (e.g. the destination's task queue is full).
//   * task_queue holds the tile's tasks and dispatches the earliest idle task
//     whose hashed hint does not collide with an earlier running task.
//   * a dispatch reserves a commit queue entry; with none left a core waits,
//     unless its candidate is earlier than the latest finished task held,
//     which is then aborted to make room. A dispatched task gets the
//     tiebreaker {vt_now, tile} that orders equal timestamps for commit.
//   * a cycle counter per core measures how long each task ran (16 bits,
//     saturating; the dispatch cycle counts as the first); a finished task
//     enters commit_queue with that count. An aborted task returns to the
//     idle state in the task queue and will run again.
//   * when the GVT passes a finished task it commits: its task queue entry is
//     freed and, if it has a hint, its cycles are added to bucket_counters.
// The tile reports the earliest unfinished virtual time (task queue and
// outbox) to the GVT arbiter. The structure follows the design description; the
// arbitration orders, the outbox and the counter behaviour are this design's
// own. Tile ID is an input so that all tiles share one module.
//
// Core interface (per core c): deq_req[c] asks for a task; task_valid[c]
// pulses with task_desc/task_idx when one is dispatched. fin_valid[c] (with
// fin_abort[c]) ends the running task and is taken when fin_ready[c]. The
// core's child tasks go in on enq_valid[c]/enq_req[c], taken when enq_ready[c].
module task_unit
  import swarm_pkg::*;
#(
  parameter int NTILES       = 64,
  parameter int TILE_W       = 6,
  parameter int NCORES       = 4,
  parameter int TQ_ENT       = 256,
  parameter int CQ_ENT       = 64,
  parameter int NBUCKETS     = 1024,
  parameter int NCNT         = 32,
  parameter bit LOAD_BALANCE = 1'b1,
  parameter int TQ_IDX_W     = $clog2(TQ_ENT),
  parameter int CNT_IDX_W    = $clog2(NCNT)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [TILE_W-1:0]    my_tile,
  input  logic [31:0]          vt_now,     // global cycle count, for tiebreakers
  // cores
  input  logic [NCORES-1:0]    deq_req,
  output logic [NCORES-1:0]    task_valid,
  output task_desc_t           task_desc,
  output logic [TQ_IDX_W-1:0]  task_idx,
  input  logic [NCORES-1:0]    fin_valid,
  input  logic [NCORES-1:0]    fin_abort,
  output logic [NCORES-1:0]    fin_ready,
  input  logic [NCORES-1:0]    enq_valid,
  input  enq_req_t             enq_req [NCORES],
  output logic [NCORES-1:0]    enq_ready,
  // task network
  output logic                 out_valid,
  output logic [TILE_W-1:0]    out_dest,
  output task_desc_t           out_desc,
  input  logic                 out_ready,
  input  logic                 in_valid,
  input  task_desc_t           in_desc,
  output logic                 in_ready,
  // commit
  input  vt_t                  gvt,
  output logic                 min_valid,
  output vt_t                  min_vt,
  // load balancer
  input  logic                 tm_wr_en,
  input  logic [BUCKET_W-1:0]  tm_wr_bucket,
  input  logic [TILE_W-1:0]    tm_wr_tile,
  input  logic                 cnt_clear,
  input  logic [CNT_IDX_W-1:0] cnt_rd_idx,
  output logic                 cnt_rd_valid,
  output logic [BUCKET_W-1:0]  cnt_rd_tag,
  output logic [CNT_W-1:0]     cnt_rd_count,
  output logic [CNT_W-1:0]     cnt_dropped,
  // status
  output logic                 busy,
  output tile_stats_t          stats
);
  localparam int CW = (NCORES > 1) ? $clog2(NCORES) : 1;

  // ------------------------------------------------------------ task queue
  logic [NCORES-1:0]   run_valid, run_hv;
  logic [TQ_IDX_W-1:0] run_idx    [NCORES];
  ts_t                 run_ts     [NCORES];
  logic [TBRK_W-1:0]   run_tb     [NCORES];
  logic [HHASH_W-1:0]  run_hhash  [NCORES];
  logic [BUCKET_W-1:0] run_bucket [NCORES];
  logic [NCORES-1:0]   tq_fin;
  logic                cm_valid, cm_hv, ev_valid;
  logic [TQ_IDX_W-1:0] ev_tq_idx;
  logic [TQ_IDX_W-1:0] cm_tq_idx;
  logic [BUCKET_W-1:0] cm_bucket;
  logic [CYC_W-1:0]    cm_cycles;
  logic                tq_min_valid, serial_skip, cq_evict, cq_stall, cq_max_valid, cq_room;
  vt_t                 tq_min_vt;
  ts_t                 cq_max_ts;
  logic [$clog2(CQ_ENT+1)-1:0] cq_occ;
  logic [TBRK_W-1:0]   disp_tb, idle_tb;

  // tiebreakers: dispatch cycle, then tile; idle tasks count as dispatched now
  assign disp_tb = {vt_now, 6'(my_tile)};
  assign idle_tb = {vt_now, 6'd0};
  assign cq_room = (32'(cq_occ) + 32'($countones(run_valid))) < 32'(CQ_ENT);
  logic [TQ_IDX_W:0]   tq_occ;

  task_queue #(.NENT(TQ_ENT), .NCORES(NCORES)) u_tq (
    .clk, .rst_n,
    .in_valid, .in_desc, .in_ready,
    .deq_req, .disp_valid(task_valid), .disp_idx(task_idx), .disp_desc(task_desc),
    .run_valid, .run_idx, .run_ts, .run_tb, .run_hv, .run_hhash, .run_bucket,
    .fin_valid(tq_fin), .fin_abort,
    .free_valid(cm_valid), .free_idx(cm_tq_idx),
    .requeue_valid(ev_valid), .requeue_idx(ev_tq_idx),
    .disp_tb, .idle_tb, .cq_room, .cq_max_valid, .cq_max_ts, .cq_evict, .cq_stall,
    .local_min_valid(tq_min_valid), .local_min_vt(tq_min_vt),
    .occupancy(tq_occ), .serial_skip
  );

  // ------------------------------------------------- per-core cycle timers
  logic [CYC_W-1:0] cyc [NCORES];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCORES; c++) cyc[c] <= '0;
    end else begin
      for (int c = 0; c < NCORES; c++)
        if (task_valid[c])                     cyc[c] <= CYC_W'(1);
        else if (run_valid[c] && cyc[c] != '1) cyc[c] <= cyc[c] + 1'b1;
    end
  end

  // ---------------------------------------------- finish -> commit queue
  logic          cq_ready, fin_found;
  logic          unused_cq_ready;
  assign unused_cq_ready = cq_ready;
  logic [CW-1:0] fin_sel;
  always_comb begin
    fin_found = 1'b0;
    fin_sel   = '0;
    for (int c = 0; c < NCORES; c++)
      if (!fin_found && fin_valid[c] && !fin_abort[c]) begin
        fin_found = 1'b1;
        fin_sel   = CW'(c);
      end
    for (int c = 0; c < NCORES; c++)
      fin_ready[c] = fin_abort[c] || (fin_found && fin_sel == CW'(c));
  end
  assign tq_fin = fin_valid & fin_ready & run_valid;

  commit_queue #(.NENT(CQ_ENT), .IDX_W(TQ_IDX_W)) u_cq (
    .clk, .rst_n,
    .in_valid(fin_found && run_valid[fin_sel]), .in_ready(cq_ready),
    .in_tq_idx(run_idx[fin_sel]), .in_vt('{ts: run_ts[fin_sel], tb: run_tb[fin_sel]}),
    .in_hv(run_hv[fin_sel]),
    .in_bucket(run_bucket[fin_sel]), .in_cycles(cyc[fin_sel]),
    .gvt, .cm_valid, .cm_tq_idx, .cm_hv, .cm_bucket, .cm_cycles,
    .max_valid(cq_max_valid), .max_ts(cq_max_ts), .evict(cq_evict),
    .ev_valid, .ev_tq_idx, .occupancy(cq_occ)
  );

  bucket_counters #(.NCNT(NCNT)) u_cnt (
    .clk, .rst_n,
    .add_valid(cm_valid && cm_hv), .add_bucket(cm_bucket), .add_cycles(cm_cycles),
    .clear(cnt_clear), .rd_idx(cnt_rd_idx), .rd_valid(cnt_rd_valid),
    .rd_tag(cnt_rd_tag), .rd_count(cnt_rd_count), .dropped(cnt_dropped)
  );

  // ------------------------------------------------------- enqueue path
  logic [CW-1:0] rr, enq_sel;
  logic          enq_found, enq_fire;
  always_comb begin
    enq_found = 1'b0;
    enq_sel   = '0;
    for (int k = 0; k < NCORES; k++) begin
      int c;
      c = (int'(rr) + k) % NCORES;
      if (!enq_found && enq_valid[c]) begin
        enq_found = 1'b1;
        enq_sel   = CW'(c);
      end
    end
  end
  assign enq_fire = enq_found && (!out_valid || out_ready);
  always_comb begin
    enq_ready = '0;
    if (enq_fire) enq_ready[enq_sel] = 1'b1;
  end

  logic [BUCKET_W-1:0] map_bucket;
  logic [TILE_W-1:0]   map_tile, new_dest;
  task_desc_t          new_desc;

  tile_map #(.NBUCKETS(NBUCKETS), .NTILES(NTILES), .TILE_W(TILE_W)) u_map (
    .clk, .rst_n, .rd_bucket(map_bucket), .rd_tile(map_tile),
    .wr_en(tm_wr_en), .wr_bucket(tm_wr_bucket), .wr_tile(tm_wr_tile)
  );

  hint_mapper #(.NTILES(NTILES), .TILE_W(TILE_W), .LOAD_BALANCE(LOAD_BALANCE)) u_mapper (
    .clk, .rst_n, .req(enq_req[enq_sel]), .fire(enq_fire), .my_tile,
    .parent_hint_valid(run_valid[enq_sel] && run_hv[enq_sel]),
    .parent_hhash(run_hhash[enq_sel]), .parent_bucket(run_bucket[enq_sel]),
    .map_bucket, .map_tile, .dest_tile(new_dest), .desc(new_desc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_dest  <= '0;
      out_desc  <= '0;
      rr        <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (enq_fire) begin
        out_valid <= 1'b1;
        out_dest  <= new_dest;
        out_desc  <= new_desc;
        rr        <= CW'((int'(enq_sel) + 1) % NCORES);
      end
    end
  end

  // ----------------------------------------------------- GVT report
  always_comb begin
    min_valid = tq_min_valid;
    min_vt    = tq_min_vt;
    if (out_valid && (!tq_min_valid || {out_desc.ts, idle_tb} < tq_min_vt)) begin
      min_valid = 1'b1;
      min_vt    = '{ts: out_desc.ts, tb: idle_tb};
    end
  end
  assign busy = (tq_occ != '0) || out_valid;

  // ----------------------------------------------------- statistics
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stats <= '0;
    end else begin
      if (enq_fire) begin
        unique case (enq_req[enq_sel].kind)
          HINT_SAME: stats.enq_same <= stats.enq_same + 1;
          HINT_NONE: stats.enq_none <= stats.enq_none + 1;
          default:   stats.enq_int  <= stats.enq_int + 1;
        endcase
        if (new_dest != my_tile) stats.remote_enq <= stats.remote_enq + 1;
      end
      if (task_valid != '0) stats.dispatches   <= stats.dispatches + 1;
      if (serial_skip)      stats.serial_skips <= stats.serial_skips + 1;
      if ((fin_valid & fin_abort & run_valid) != '0)
        stats.aborts <= stats.aborts + 32'($countones(fin_valid & fin_abort & run_valid));
      if (cm_valid)                stats.commits    <= stats.commits + 1;
      if (ev_valid)                stats.cq_evictions <= stats.cq_evictions + 1;
      if (out_valid && !out_ready) stats.enq_stalls <= stats.enq_stalls + 1;
      if (cq_stall)                stats.cq_stalls  <= stats.cq_stalls + 1;
    end
  end
endmodule
