// tb_task_unit: one tile (tile 0 of 4, two cores, 8 task queue and 2 commit
// queue entries, 64 buckets) with the network looped back for tasks that
// stay on the tile. Walks through the tile's mechanisms and checks each:
// integer-hint routing through the tile map (before and after a map write),
// the hashed hint and bucket carried by tasks, SAMEHINT staying local with the
// parent's hint, NOHINT going to the LFSR-chosen tile, dispatch serialization
// of a child behind its running parent, run-cycle measurement, commit after
// the GVT passes and the committed cycles landing in the bucket's counter,
// abort and re-run, a dispatch stall when the commit queue is full, the
// eviction of a later finished task to admit an earlier one, and the
// earliest-unfinished virtual time report. Expected hashes are the H3 reference values.
module tb_task_unit;
  import swarm_pkg::*;
  localparam int NC = 2;
  logic clk = 0, rst_n = 0;
  logic [NC-1:0] deq_req, task_valid, fin_valid, fin_abort, fin_ready, enq_valid, enq_ready;
  task_desc_t task_desc;
  logic [2:0] task_idx;
  enq_req_t enq_req [NC];
  logic out_valid, out_ready, in_valid, in_ready, min_valid;
  logic [1:0] out_dest;
  task_desc_t out_desc, in_desc;
  vt_t gvt, min_vt;
  logic tm_wr_en, cnt_clear, cnt_rd_valid, busy;
  logic [9:0] tm_wr_bucket, cnt_rd_tag;
  logic [1:0] tm_wr_tile, cnt_rd_idx;
  logic [31:0] cnt_rd_count, cnt_dropped;
  tile_stats_t stats;
  int checks = 0, failures = 0;
  task_desc_t remote [$];
  task_desc_t got [NC];
  int disp_cycle [NC];
  int cyc = 0;

  task_unit #(.NTILES(4), .TILE_W(2), .NCORES(NC), .TQ_ENT(8), .CQ_ENT(2),
              .NBUCKETS(64), .NCNT(4)) dut (
    .clk, .rst_n, .my_tile(2'd0), .vt_now(32'(cyc)), .deq_req, .task_valid, .task_desc, .task_idx,
    .fin_valid, .fin_abort, .fin_ready, .enq_valid, .enq_req, .enq_ready,
    .out_valid, .out_dest, .out_desc, .out_ready, .in_valid, .in_desc, .in_ready,
    .gvt, .min_valid, .min_vt, .tm_wr_en, .tm_wr_bucket, .tm_wr_tile,
    .cnt_clear, .cnt_rd_idx, .cnt_rd_valid, .cnt_rd_tag, .cnt_rd_count, .cnt_dropped,
    .busy, .stats);

  // network model: local tasks loop back, remote ones are collected
  assign in_valid  = out_valid && out_dest == 2'd0;
  assign in_desc   = out_desc;
  assign out_ready = (out_dest == 2'd0) ? in_ready : 1'b1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid && out_ready && out_dest != 2'd0) remote.push_back(out_desc);
    for (int c = 0; c < NC; c++)
      if (rst_n && task_valid[c]) begin got[c] <= task_desc; disp_cycle[c] <= cyc; end
  end

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic enq(input int c, input hint_kind_e k, input logic [63:0] h, input int ts);
    @(negedge clk);
    enq_valid[c] = 1;
    enq_req[c] = '0;
    enq_req[c].kind = k; enq_req[c].hint = h; enq_req[c].ts = ts_t'(ts);
    enq_req[c].fn = 64'h1000 + 64'(ts);
    #1;
    while (!enq_ready[c]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 enq_valid[c] = 0;
    repeat (2) @(posedge clk);
  endtask

  task automatic deq(input int c, input int max_wait, output bit ok);
    @(negedge clk);
    deq_req[c] = 1;
    ok = 0;
    for (int i = 0; i < max_wait; i++) begin
      @(posedge clk);
      #1;
      if (disp_cycle[c] == cyc - 1 && got[c].fn != 0) begin ok = 1; break; end
    end
    deq_req[c] = 0;
  endtask

  task automatic fin(input int c, input bit abort);
    @(negedge clk);
    fin_valid[c] = 1; fin_abort[c] = abort;
    #1;
    while (!fin_ready[c]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 fin_valid[c] = 0; fin_abort[c] = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ok;
  int t_run, t0;
  initial begin
    deq_req = 0; fin_valid = 0; fin_abort = 0; enq_valid = 0; gvt = '0;
    tm_wr_en = 0; tm_wr_bucket = 0; tm_wr_tile = 0; cnt_clear = 0; cnt_rd_idx = 0;
    for (int c = 0; c < NC; c++) begin enq_req[c] = '0; got[c] = '0; disp_cycle[c] = -5; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // integer hint 0x1: bucket 0x315 -> entry 21 -> reset map 21 mod 4 = tile 1
    enq(0, HINT_INT, 64'h1, 100);
    chk(remote.size() == 1 && remote[0].hhash == 16'h6C8A && remote[0].bucket == 10'h315 &&
        remote[0].hint_valid && remote[0].ts == 100, "int hint to tile 1");
    // NOHINT: LFSR seed 0xACE1 mod 4 = tile 1
    enq(1, HINT_NONE, 64'h0, 101);
    chk(remote.size() == 2 && !remote[1].hint_valid, "nohint to random tile 1");
    // remap bucket 0x13B (entry 59) to tile 0, then hint 0xF00 stays local
    @(negedge clk);
    tm_wr_en = 1; tm_wr_bucket = 10'h13B; tm_wr_tile = 2'd0;
    @(posedge clk);
    #1 tm_wr_en = 0;
    enq(0, HINT_INT, 64'hF00, 20);
    chk(remote.size() == 2 && busy, "remapped hint stays local");
    #1 chk(min_valid && min_vt.ts == 20, "min ts reported");
    deq(0, 5, ok);
    chk(ok && got[0].ts == 20 && got[0].hhash == 16'h635A && got[0].bucket == 10'h13B, "core0 runs ts 20");
    t0 = cyc;
    // child with SAMEHINT stays local and inherits the hint
    enq(0, HINT_SAME, 64'h0, 25);
    chk(remote.size() == 2, "samehint local");
    // core1 asks: the only idle task shares core0's hint -> serialized
    deq(1, 10, ok);
    chk(!ok && stats.serial_skips > 0, "child serialized behind parent");
    // core0 finishes after a known number of cycles
    while (cyc < t0 + 14) @(posedge clk);
    t_run = 0;
    @(negedge clk);
    fin_valid[0] = 1;
    @(posedge clk);
    t_run = cyc - disp_cycle[0];
    #1 fin_valid[0] = 0;
    deq(1, 5, ok);
    chk(ok && got[1].ts == 25 && got[1].hhash == 16'h635A && got[1].bucket == 10'h13B,
        "child runs once parent finished");
    // abort core1's task: it runs again
    fin(1, 1);
    chk(stats.aborts == 1, "abort counted");
    deq(1, 5, ok);
    chk(ok && got[1].ts == 25, "aborted task re-dispatched");
    // commit ts 20: needs gvt above it
    repeat (3) @(posedge clk);
    chk(stats.commits == 0, "no commit before gvt passes");
    gvt = '{ts: 21, tb: '0};
    repeat (2) @(posedge clk);
    chk(stats.commits == 1, "commit after gvt passes");
    cnt_rd_idx = 0;
    #1 chk(cnt_rd_valid && cnt_rd_tag == 10'h13B && cnt_rd_count == 32'(t_run),
           $sformatf("bucket counter %0d/%0d expected %0d", cnt_rd_tag, cnt_rd_count, t_run));
    // fill the commit queue (2 entries): dispatch waits for a free entry
    gvt = '0;
    fin(1, 0);                       // ts 25 finished -> CQ 1
    enq(0, HINT_SAME, 64'h0, 30);    // no running parent: no hint
    enq(0, HINT_INT, 64'hF00, 31);
    deq(0, 5, ok); chk(ok && got[0].ts == 30 && !got[0].hint_valid, "samehint without parent has no hint");
    deq(1, 5, ok); chk(!ok && stats.cq_stalls > 0, "no commit queue entry left: core waits");
    fin(0, 0);                       // CQ holds 25 and 30
    deq(1, 5, ok); chk(!ok, "31 is later than all held tasks: still waits");
    // an earlier task evicts the latest finished one (ts 30), which runs again
    enq(0, HINT_INT, 64'hF00, 28);
    deq(1, 5, ok); chk(ok && got[1].ts == 28 && stats.cq_evictions == 1, "eviction admits ts 28");
    gvt = '1;
    fin(1, 0);
    deq(0, 5, ok); chk(ok && got[0].ts == 30, "evicted task re-run");
    fin(0, 0);
    deq(0, 5, ok); chk(ok && got[0].ts == 31, "ts 31 runs");
    fin(0, 0);
    repeat (6) @(posedge clk);
    chk(stats.commits == 5 && !busy, $sformatf("all committed (%0d)", stats.commits));
    chk(stats.enq_int == 4 && stats.enq_same == 2 && stats.enq_none == 1 && stats.remote_enq == 2,
        "enqueue counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
