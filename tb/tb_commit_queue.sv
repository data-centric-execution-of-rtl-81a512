// tb_commit_queue: random finishes, evictions and GVT advances against a
// reference list (4 entries). Checks that a task commits only once its
// virtual time (timestamp, tiebreaker) is below the GVT, that every eligible
// task commits (one per cycle), that each commit carries the entry's task
// index, bucket, hint flag and cycle count, that an eviction request removes
// the entry with the latest timestamp and only when nothing commits that
// cycle, that the freed slot takes a new task in the same cycle, and that the
// occupancy count matches the list.
module tb_commit_queue;
  import swarm_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_hv, cm_valid, cm_hv, max_valid, evict;
  logic [7:0] in_tq_idx, cm_tq_idx;
  vt_t in_vt, gvt;
  ts_t max_ts;
  logic [9:0] in_bucket, cm_bucket;
  logic [15:0] in_cycles, cm_cycles;
  logic ev_valid;
  logic [7:0] ev_tq_idx;
  logic [2:0] occupancy;
  int checks = 0, failures = 0, commits = 0, inserted = 0, full_seen = 0, evictions = 0;

  typedef struct { vt_t vt; int idx; int bucket; int cyc; bit hv; } ref_t;
  ref_t q [$];

  commit_queue #(.NENT(N), .IDX_W(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int next_idx = 0;
  initial begin
    in_valid = 0; in_tq_idx = 0; in_vt = '0; in_hv = 0; in_bucket = 0; in_cycles = 0;
    gvt = '0; evict = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int mx;
      bit any_cm, exp_ev;
      @(negedge clk);
      if ($urandom % 10 == 0) gvt.ts = gvt.ts + ($urandom % 20);
      gvt.tb = TBRK_W'({$urandom, $urandom});
      mx = -1;
      any_cm = 0;
      foreach (q[i]) begin
        if (mx < 0 || q[i].vt.ts > q[mx].vt.ts) mx = i;
        if (q[i].vt < gvt) any_cm = 1;
      end
      evict  = q.size() == N && ($urandom % 3 == 0);
      exp_ev = evict && mx >= 0 && !any_cm;
      in_valid  = ($urandom % 3 != 0) && (q.size() < N || exp_ev);
      in_vt     = '{ts: ts_t'(gvt.ts + ($urandom % 40)), tb: TBRK_W'({$urandom, $urandom})};
      in_tq_idx = 8'(next_idx);
      in_hv     = 1'($urandom);
      in_bucket = 10'($urandom);
      in_cycles = 16'($urandom);
      #1;
      chk(occupancy == 3'(q.size()), $sformatf("occupancy %0d vs %0d", occupancy, q.size()));
      chk(max_valid == (mx >= 0 && !any_cm), "max_valid");
      if (mx >= 0 && !any_cm) chk(max_ts == q[mx].vt.ts, "max_ts is the latest held");
      chk(ev_valid == exp_ev, "eviction exactly on request when nothing commits");
      chk(in_ready == (q.size() < N || exp_ev), "ready iff room or eviction");
      if (ev_valid) begin
        int k;
        k = -1;
        foreach (q[i]) if (q[i].idx == int'(ev_tq_idx)) k = i;
        chk(k >= 0 && q[k].vt.ts == q[mx].vt.ts, "evicts the latest task");
        if (k >= 0) q.delete(k);
        evictions++;
      end
      if (q.size() == N) full_seen++;
      if (cm_valid) begin
        int k;
        k = -1;
        foreach (q[i]) if (q[i].idx == int'(cm_tq_idx)) k = i;
        chk(k >= 0, "commit of a held task");
        if (k >= 0) begin
          chk(q[k].vt < gvt, "commit only below gvt");
          chk(cm_bucket == 10'(q[k].bucket) && cm_cycles == 16'(q[k].cyc) && cm_hv == q[k].hv,
              "commit fields");
          q.delete(k);
          commits++;
        end
      end else begin
        foreach (q[i]) chk(!(q[i].vt < gvt), "eligible task not committed");
      end
      if (in_valid && in_ready) begin
        q.push_back('{vt: in_vt, idx: next_idx, bucket: int'(in_bucket),
                      cyc: int'(in_cycles), hv: in_hv});
        next_idx = (next_idx + 1) % 256;
        inserted++;
      end
      @(posedge clk);
    end
    chk(commits > 100 && full_seen > 10 && evictions > 5,
        $sformatf("activity commits=%0d full=%0d evictions=%0d", commits, full_seen, evictions));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
