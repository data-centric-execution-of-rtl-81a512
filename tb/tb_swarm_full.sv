// tb_swarm_full: the end-to-end run of tb_swarm_top with the top at its
// default parameters: 64 tiles of 4 cores, 64 task queue and 16 commit queue
// entries per core, 1024 buckets of 32 counters per tile, GVT every 200
// cycles and reconfiguration every 500,000 cycles.
//
// The same workload and checks as tb_swarm_top, scaled to 1000 objects and
// 4000 tasks: every task commits once, hashes and buckets match the H3
// reference, integer-hint tasks run on their mapped tile and SAMEHINT tasks on
// their parent's, dispatch serialization holds, and the GVT never passes an
// unfinished task. Serialization, aborts, remote, SAMEHINT and NOHINT
// enqueues and GVT updates must occur. Full commit queues, evictions and
// enqueue back-pressure are counted but not required here, and a
// reconfiguration (every 500,000 cycles) does not happen in a run this short.
module tb_swarm_full;
  import swarm_pkg::*;
  // ---- configuration of this run
  localparam int  NTILES    = 64;
  localparam int  NCORES    = 4;
  localparam int  NBUCKETS  = 1024;
  localparam int  NCNT      = 32;
  localparam int  NOBJ      = 1000;
  localparam int  BUDGET    = 4000;
  localparam int  BURST     = 64;
  localparam bit  NEED_ALL  = 1'b0;    // every mechanism must occur
  localparam int  MAXCYC    = 200000;
  localparam int  TILE_W    = (NTILES > 1) ? $clog2(NTILES) : 1;
  localparam int  NC        = NTILES * NCORES;
  localparam int  CIW       = $clog2(NCNT);

  logic clk = 0, rst_n = 0;
  logic [NC-1:0] deq_req, task_valid, fin_valid, fin_abort, fin_ready, enq_valid, enq_ready;
  task_desc_t task_desc [NC];
  enq_req_t   enq_req   [NC];
  logic lb_req, tm_wr_en, cnt_clear, gvt_update, busy;
  logic [BUCKET_W-1:0] tm_wr_bucket;
  logic [TILE_W-1:0]   tm_wr_tile;
  logic [CIW-1:0]      cnt_rd_idx   [NTILES];
  logic [NTILES-1:0]   cnt_rd_valid;
  logic [BUCKET_W-1:0] cnt_rd_tag   [NTILES];
  logic [CNT_W-1:0]    cnt_rd_count [NTILES];
  vt_t gvt;
  tile_stats_t stats [NTILES];

  swarm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cyc, what);
    end
  endtask

  function automatic logic [63:0] h3(input int unsigned seed, input int w, input logic [63:0] h);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < w; i++) r[i] = ^(h & h3_row(seed, i));
    return r;
  endfunction

  // ---- shared bookkeeping
  // task args: [0] hint value (object, or parent's for SAMEHINT), [1] kind,
  //            [2] tile-map version at creation; fn = {task id, parent tile}
  int unsigned created = 0, finished = 0, total_aborts = 0, reconfigs = 0, moved = 0;
  int unsigned map_version = 0, gvt_updates = 0;
  bit          lb_busy = 0;
  int unsigned unfinished [ts_t];          // timestamp -> count of unfinished tasks
  logic [TILE_W-1:0] shadow_map [NBUCKETS];
  logic          run_v  [NC];
  logic [15:0]   run_hh [NC];
  logic          run_hv [NC];
  ts_t           run_ts [NC];

  function automatic int run_len(input int obj);
    return (obj < 3) ? 40 : 4 + (obj % 6);
  endfunction

  bit done_id [int unsigned];     // task id -> has finished (and not re-run since)
  int unsigned reruns = 0;

  int unsigned next_id = 0;       // unique task ids, taken when an enqueue starts

  task automatic note_created(input ts_t ts);
    created++;
    if (unfinished.exists(ts)) unfinished[ts]++;
    else unfinished[ts] = 1;
  endtask

  task automatic note_finished(input ts_t ts);
    finished++;
    unfinished[ts]--;
    if (unfinished[ts] == 0) unfinished.delete(ts);
  endtask

  // enqueue one task through core i; blocks until taken
  task automatic enqueue(input int i, input hint_kind_e k, input logic [63:0] hint,
                         input ts_t ts, input int parent_tile);
    int unsigned id;
    id = next_id++;
    done_id[id] = 0;
    @(negedge clk);
    while (lb_busy) @(negedge clk);
    enq_valid[i] = 1;
    enq_req[i] = '0;
    enq_req[i].kind = k;
    enq_req[i].hint = hint;
    enq_req[i].ts   = ts;
    enq_req[i].fn   = {32'(id), 32'(parent_tile)};
    enq_req[i].args[0] = hint;
    enq_req[i].args[1] = 64'(k);
    enq_req[i].args[2] = 64'(map_version);
    #1;
    while (!enq_ready[i]) begin @(negedge clk); #1; end
    note_created(ts);
    @(posedge clk);
    #1 enq_valid[i] = 0;
  endtask

  // ---- behavioural cores
  for (genvar gi = 0; gi < NC; gi++) begin : g_core
    initial begin : core_loop
      task_desc_t d;
      int len, nchild, obj;
      bit abort;
      logic [63:0] parent_hint;
      ts_t cts;
      deq_req[gi] = 0; fin_valid[gi] = 0; fin_abort[gi] = 0;
      wait (rst_n);
      repeat (BURST + 10) @(posedge clk);
      forever begin
        @(negedge clk);
        deq_req[gi] = 1;
        #1;
        while (!task_valid[gi]) begin @(negedge clk); #1; end
        d = task_desc[gi];
        @(posedge clk);
        #1 deq_req[gi] = 0;
        parent_hint = d.args[0];
        obj = int'(d.args[0] % 64'(NOBJ));
        len = run_len(obj);
        abort = ($urandom % 8) == 0;
        repeat (len / 2) @(posedge clk);
        if (!abort) begin
          nchild = ($urandom % 10 < 8) ? 1 : (($urandom % 2) ? 2 : 0);
          for (int c = 0; c < nchild; c++) begin
            if (created < BUDGET) begin
              int r;
              cts = d.ts + ts_t'(1 + $urandom % 12);
              r = $urandom % 10;
              if (r < 7)      enqueue(gi, HINT_INT,  64'($urandom % NOBJ), cts, gi / NCORES);
              else if (r < 9) enqueue(gi, HINT_SAME, parent_hint, cts, gi / NCORES);
              else            enqueue(gi, HINT_NONE, 64'($urandom % NOBJ), cts, gi / NCORES);
            end
          end
        end
        repeat (len - len / 2) @(posedge clk);
        @(negedge clk);
        fin_valid[gi] = 1; fin_abort[gi] = abort;
        #1;
        while (!fin_ready[gi]) begin @(negedge clk); #1; end
        @(posedge clk);
        if (abort) total_aborts++;
        else begin
          note_finished(d.ts);
          done_id[d.fn[63:32]] = 1;
        end
        #1 fin_valid[gi] = 0; fin_abort[gi] = 0;
      end
    end
  end

  // ---- per-dispatch and per-GVT checks
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < NC; i++) begin
      if (fin_valid[i] && fin_ready[i]) run_v[i] = 0;
    end
    for (int i = 0; i < NC; i++) begin
      if (rst_n && task_valid[i]) begin
        task_desc_t d;
        int t;
        d = task_desc[i];
        t = i / NCORES;
        if (hint_kind_e'(d.args[1][1:0]) == HINT_NONE) begin
          chk(!d.hint_valid, "nohint task without hint");
        end else if (hint_kind_e'(d.args[1][1:0]) == HINT_INT || d.hint_valid) begin
          chk(d.hint_valid && d.hhash == h3(SEED_HHASH, HHASH_W, d.args[0]) &&
              d.bucket == h3(SEED_BUCKET, BUCKET_W, d.args[0]), "hashed hint and bucket");
        end
        if (hint_kind_e'(d.args[1][1:0]) == HINT_INT && d.args[2] == 64'(map_version) && !lb_busy)
          chk(shadow_map[int'(d.bucket) % NBUCKETS] == TILE_W'(t), "task on its mapped tile");
        if (hint_kind_e'(d.args[1][1:0]) == HINT_SAME)
          chk(int'(d.fn[31:0]) == t, "samehint task on parent's tile");
        for (int j = t * NCORES; j < (t + 1) * NCORES; j++)
          if (j != i && run_v[j] && run_hv[j] && d.hint_valid)
            chk(!(run_hh[j] == d.hhash && run_ts[j] <= d.ts), "serialization rule");
        if (done_id[d.fn[63:32]]) begin
          // finished earlier, aborted from a full commit queue: runs again
          done_id[d.fn[63:32]] = 0;
          finished--;
          reruns++;
          if (unfinished.exists(d.ts)) unfinished[d.ts]++;
          else unfinished[d.ts] = 1;
        end
        run_v[i] = 1; run_hh[i] = d.hhash; run_hv[i] = d.hint_valid; run_ts[i] = d.ts;
      end
    end
    if (rst_n && gvt_update) begin
      gvt_updates++;
      if (unfinished.num() > 0) begin
        ts_t mn;
        void'(unfinished.first(mn));
        chk(gvt.ts <= mn, $sformatf("gvt %0d above earliest unfinished %0d", gvt.ts, mn));
      end
    end
  end

  // ---- load-balancing software model
  task automatic reconfigure();
    longint unsigned bload [NBUCKETS];
    longint unsigned tload [NTILES];
    longint signed   budget [NTILES];
    longint unsigned total, avg;
    logic [TILE_W-1:0] newmap [NBUCKETS];
    lb_busy = 1;
    // let enqueues that started on this edge show up, then let them finish
    @(negedge clk);
    #2;
    while (enq_valid != '0) begin @(negedge clk); #2; end
    for (int b = 0; b < NBUCKETS; b++) begin bload[b] = 0; newmap[b] = shadow_map[b]; end
    for (int t = 0; t < NTILES; t++) tload[t] = 0;
    for (int k = 0; k < NCNT; k++) begin
      for (int t = 0; t < NTILES; t++) cnt_rd_idx[t] = CIW'(k);
      #1;
      for (int t = 0; t < NTILES; t++)
        if (cnt_rd_valid[t]) begin
          bload[int'(cnt_rd_tag[t]) % NBUCKETS] += cnt_rd_count[t];
          tload[t] += cnt_rd_count[t];
        end
    end
    total = 0;
    for (int t = 0; t < NTILES; t++) total += tload[t];
    avg = total / NTILES;
    // 80% of each tile's surplus (positive) or deficit (negative) may move
    for (int t = 0; t < NTILES; t++) budget[t] = (longint'(tload[t]) - longint'(avg)) * 8 / 10;
    for (int pass = 0; pass < NTILES; pass++) begin
      int o;
      o = -1;
      for (int t = 0; t < NTILES; t++) if (budget[t] > 0 && (o < 0 || budget[t] > budget[o])) o = t;
      if (o < 0) break;
      for (int b = 0; b < NBUCKETS; b++)
        if (newmap[b] == TILE_W'(o) && bload[b] > 0 && longint'(bload[b]) <= budget[o]) begin
          int u;
          u = -1;
          for (int t = 0; t < NTILES; t++)
            if (budget[t] < 0 && -budget[t] >= longint'(bload[b]) && (u < 0 || budget[t] < budget[u])) u = t;
          if (u >= 0) begin
            newmap[b] = TILE_W'(u);
            budget[o] -= longint'(bload[b]);
            budget[u] += longint'(bload[b]);
          end
        end
      budget[o] = 0;
    end
    for (int b = 0; b < NBUCKETS; b++)
      if (newmap[b] != shadow_map[b]) begin
        @(negedge clk);
        tm_wr_en = 1; tm_wr_bucket = BUCKET_W'(b); tm_wr_tile = newmap[b];
        @(posedge clk);
        #1 tm_wr_en = 0;
        shadow_map[b] = newmap[b];
        moved++;
      end
    @(negedge clk);
    cnt_clear = 1;
    @(posedge clk);
    #1 cnt_clear = 0;
    map_version++;
    reconfigs++;
    lb_busy = 0;
  endtask

  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("watchdog: created %0d finished %0d", created, finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned sum_commits, sum_skips, sum_aborts, sum_cqs, sum_enqs, sum_remote, sum_same, sum_none, sum_ev;
    tm_wr_en = 0; tm_wr_bucket = 0; tm_wr_tile = 0; cnt_clear = 0;
    enq_valid = 0;
    for (int i = 0; i < NC; i++) begin enq_req[i] = '0; run_v[i] = 0; end
    for (int t = 0; t < NTILES; t++) cnt_rd_idx[t] = '0;
    for (int b = 0; b < NBUCKETS; b++) shadow_map[b] = TILE_W'(b % NTILES);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initial burst through core 0 (no task running there yet)
    for (int k = 0; k < BURST; k++) enqueue(0, HINT_INT, 64'(k % 4), ts_t'(k / 4), 0);
    fork
      forever begin
        @(posedge clk);
        if (lb_req) reconfigure();
      end
    join_none
    // run until the budget is spent and everything drained
    while (!(created >= BUDGET && finished == created && !busy)) @(posedge clk);
    repeat (2) @(posedge clk);
    sum_commits = 0; sum_skips = 0; sum_aborts = 0; sum_cqs = 0; sum_enqs = 0;
    sum_remote = 0; sum_same = 0; sum_none = 0; sum_ev = 0;
    for (int t = 0; t < NTILES; t++) begin
      sum_commits += stats[t].commits;
      sum_skips   += stats[t].serial_skips;
      sum_aborts  += stats[t].aborts;
      sum_cqs     += stats[t].cq_stalls;
      sum_enqs    += stats[t].enq_stalls;
      sum_remote  += stats[t].remote_enq;
      sum_same    += stats[t].enq_same;
      sum_none    += stats[t].enq_none;
      sum_ev      += stats[t].cq_evictions;
    end
    $display("cycles %0d tasks %0d commits %0d aborts %0d skips %0d cq_stalls %0d enq_stalls %0d",
             cyc, created, sum_commits, sum_aborts, sum_skips, sum_cqs, sum_enqs);
    $display("remote %0d samehint %0d nohint %0d gvt updates %0d reconfigs %0d buckets moved %0d evictions %0d",
             sum_remote, sum_same, sum_none, gvt_updates, reconfigs, moved, sum_ev);
    chk(sum_commits == created, "every task committed once");
    chk(sum_aborts == total_aborts, "aborts counted");
    chk(gvt == '1, "gvt all ones when drained");
    chk(sum_skips > 0, "mechanism: hint serialization");
    chk(sum_aborts > 0, "mechanism: abort and re-run");
    chk(sum_ev == reruns, "every eviction re-ran its task");
    if (NEED_ALL) begin
      chk(sum_cqs > 0, "mechanism: commit queue full stall");
      chk(sum_enqs > 0, "mechanism: enqueue back-pressure");
      chk(sum_ev > 0, "mechanism: commit queue eviction and re-run");
      chk(reconfigs > 0 && moved > 0, "mechanism: load-balancer reconfiguration");
    end
    chk(sum_remote > 0 && sum_same > 0 && sum_none > 0, "mechanism: remote, SAMEHINT, NOHINT enqueues");
    chk(gvt_updates > 0, "mechanism: GVT update");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
