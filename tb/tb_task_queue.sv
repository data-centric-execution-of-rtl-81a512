// tb_task_queue: directed checks of the task queue and its hint-serialized
// dispatch (8 entries, 4 cores): earliest-timestamp dispatch, skipping of a
// candidate whose hashed hint matches an earlier (or equal-timestamp) running
// task, one candidate tried per cycle, NOHINT tasks never serialized, abort
// returning a task to idle, commit freeing an entry, a finished task sent
// back to idle by the commit queue, the earliest unfinished
// virtual time, back-pressure when full, the tiebreaker given at dispatch,
// and the commit-queue rules: no free entry and nothing later to evict
// stalls dispatch; a later finished task in the commit queue is evicted.
module tb_task_queue;
  import swarm_pkg::*;
  localparam int N = 8, NC = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid; task_desc_t in_desc; logic in_ready;
  logic [NC-1:0] deq_req, disp_valid;
  logic [2:0] disp_idx;
  task_desc_t disp_desc;
  logic [NC-1:0] run_valid, run_hv;
  logic [2:0] run_idx [NC];
  ts_t run_ts [NC];
  logic [15:0] run_hhash [NC];
  logic [9:0] run_bucket [NC];
  logic [NC-1:0] fin_valid, fin_abort;
  logic free_valid; logic [2:0] free_idx;
  logic requeue_valid; logic [2:0] requeue_idx;
  logic local_min_valid; vt_t local_min_vt;
  logic [TBRK_W-1:0] run_tb [NC], disp_tb, idle_tb;
  logic cq_room, cq_max_valid, cq_evict, cq_stall;
  ts_t cq_max_ts;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign disp_tb = TBRK_W'({cyc, 6'd5});
  assign idle_tb = TBRK_W'({cyc, 6'd0});
  logic [3:0] occupancy;
  logic serial_skip;
  int checks = 0, failures = 0, skips = 0;
  logic [2:0] idx_of [NC];

  task_queue #(.NENT(N), .NCORES(NC)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && serial_skip) skips++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic enq(input int ts, input bit hv, input logic [15:0] hh);
    @(negedge clk);
    in_valid = 1;
    in_desc = '0;
    in_desc.ts = ts_t'(ts); in_desc.hint_valid = hv; in_desc.hhash = hh;
    in_desc.bucket = 10'(ts);
    #1 chk(in_ready, "in_ready while not full");
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  // request a task for core c; returns its timestamp and the cycles waited
  task automatic get(input int c, output int ts, output int waited);
    waited = 0;
    @(negedge clk);
    deq_req[c] = 1;
    forever begin
      #1;
      if (disp_valid[c]) break;
      waited++;
      @(negedge clk);
    end
    ts = int'(disp_desc.ts);
    idx_of[c] = disp_idx;
    chk($onehot(disp_valid), "one dispatch per cycle");
    @(posedge clk);
    #1 deq_req[c] = 0;
  endtask

  task automatic finish(input int c, input bit abort);
    @(negedge clk);
    fin_valid[c] = 1; fin_abort[c] = abort;
    @(posedge clk);
    #1 fin_valid[c] = 0; fin_abort[c] = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ts, w, s0;
  logic [2:0] fin30, fin50;
  initial begin
    in_valid = 0; in_desc = '0; deq_req = 0; fin_valid = 0; fin_abort = 0;
    free_valid = 0; free_idx = 0; requeue_valid = 0; requeue_idx = 0;
    cq_room = 1; cq_max_valid = 0; cq_max_ts = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    enq(50, 1, 16'h1); enq(30, 1, 16'h2); enq(40, 1, 16'h3);
    #1 chk(occupancy == 3 && local_min_valid && local_min_vt.ts == 30, "occupancy and min");
    get(0, ts, w); chk(ts == 30 && w == 0, "core0 gets earliest");
    fin30 = idx_of[0];
    get(1, ts, w); chk(ts == 40 && w == 0, "core1 gets next");
    // 35 shares core0's hint (running ts 30 is earlier): skipped
    enq(35, 1, 16'h2); enq(60, 1, 16'h9);
    s0 = skips;
    get(2, ts, w); chk(ts == 50 && w == 1 && skips - s0 == 1, $sformatf("skip one: ts %0d w %0d", ts, w));
    fin50 = idx_of[2];
    // equal timestamp 40 with core1's hint: also skipped, as is 35 again
    enq(40, 1, 16'h3);
    s0 = skips;
    get(3, ts, w); chk(ts == 60 && w == 2 && skips - s0 == 2, $sformatf("skip two: ts %0d w %0d", ts, w));
    // core0 finishes: hint 2 no longer running, 35 can go
    finish(0, 0);
    #1 chk(local_min_vt.ts == 35, "min after finish");
    get(0, ts, w); chk(ts == 35 && w == 0, "35 after blocker finished");
    // core1 aborts its ts 40 task: two idle 40s with hint 3
    finish(1, 1);
    #1 chk(occupancy == 6, "abort keeps entry");
    get(1, ts, w); chk(ts == 40, "aborted task rerun");
    // NOHINT task with a hash equal to a running one is not serialized
    enq(36, 0, 16'h2);
    finish(2, 0);
    get(2, ts, w); chk(ts == 36 && w == 0, "nohint not serialized");
    // all cores busy, idle: one 40 (hint 3, blocked by core1) -> finish core1
    finish(1, 0);
    get(1, ts, w); chk(ts == 40, "second 40 after first finished");
    // commit frees a finished entry
    @(negedge clk);
    free_valid = 1; free_idx = fin30;
    #1;
    @(posedge clk);
    #1 free_valid = 0;
    chk(occupancy == 6, $sformatf("occupancy after free %0d", occupancy));
    chk(in_ready, "entry free again");
    // fill to full
    enq(70, 1, 16'h7); enq(71, 1, 16'h8);
    #1 chk(!in_ready && occupancy == 8, "full");
    chk(local_min_valid && local_min_vt.ts == 35, $sformatf("min %0d", local_min_vt.ts));
    // a finished task sent back by the commit queue runs again
    @(negedge clk);
    requeue_valid = 1; requeue_idx = fin50;
    @(posedge clk);
    #1 requeue_valid = 0;
    chk(occupancy == 8, "requeue keeps entry");
    finish(3, 0);
    get(3, ts, w); chk(ts == 50, $sformatf("requeued task re-dispatched, got %0d", ts));
    chk(run_tb[3][5:0] == 6'd5 && run_tb[3][37:6] != 0, "dispatch tiebreaker recorded");
    // commit queue full, nothing later held: core 3 waits
    finish(3, 0);
    @(negedge clk);
    cq_room = 0; cq_max_valid = 1; cq_max_ts = 20; deq_req[3] = 1;
    repeat (3) begin
      #1 chk(disp_valid == 0 && cq_stall && !cq_evict, "stall on full commit queue");
      @(negedge clk);
    end
    // a later finished task held: evicted to make room
    cq_max_ts = 1000;
    #1 chk(disp_valid[3] && cq_evict && !cq_stall, "dispatch by eviction");
    @(posedge clk);
    #1 deq_req[3] = 0; cq_room = 1; cq_max_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
