// commit_queue: holds the tasks of a tile that have finished but cannot yet
// commit (16 entries per core, 64 at four cores).
//
// Each entry keeps what commit needs: the task queue entry to release, the
// task's virtual time (timestamp and tiebreaker), its load-balancing bucket
// (and whether it has one) and the 16-bit count of cycles the task ran. A task
// commits once its virtual time precedes the global virtual time (GVT), the
// earliest unfinished task in the system. One task commits per cycle, the
// lowest-numbered eligible entry; the commit pulse (cm_valid) carries the
// entry to the task queue (to free it) and to the committed-cycle counters.
//
// An entry is reserved for a task when it is dispatched (the task unit counts
// entries held plus tasks running), so a finishing task always finds room and
// in_ready is only a safety output. When the queue is full, a task whose
// timestamp is earlier than the latest one held may still be dispatched: the
// task unit raises 'evict' and the latest held task (max_ts) is aborted,
// its task queue entry sent back to idle through ev_valid/ev_tq_idx, so that
// it runs again later. The description gives the queue's role and size, that
// commit follows the GVT, and that a full queue is handled by stalling or by
// aborting higher-timestamp tasks; reserving at dispatch, one commit per
// cycle and the eviction rule are this design's choices.
module commit_queue
  import swarm_pkg::*;
#(
  parameter int NENT  = 64,
  parameter int IDX_W = 8     // width of a task queue index
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [IDX_W-1:0]    in_tq_idx,
  input  vt_t                 in_vt,
  input  logic                in_hv,
  input  logic [BUCKET_W-1:0] in_bucket,
  input  logic [CYC_W-1:0]    in_cycles,
  input  vt_t                 gvt,
  output logic                cm_valid,
  output logic [IDX_W-1:0]    cm_tq_idx,
  output logic                cm_hv,
  output logic [BUCKET_W-1:0] cm_bucket,
  output logic [CYC_W-1:0]    cm_cycles,
  output logic                max_valid,   // queue holds a task and none commits now
  output ts_t                 max_ts,
  input  logic                evict,
  output logic                ev_valid,
  output logic [IDX_W-1:0]    ev_tq_idx,
  output logic [$clog2(NENT+1)-1:0] occupancy
);
  localparam int SLOT_W = (NENT > 1) ? $clog2(NENT) : 1;

  typedef struct packed {
    logic [IDX_W-1:0]    tq_idx;
    vt_t                 vt;
    logic                hv;
    logic [BUCKET_W-1:0] bucket;
    logic [CYC_W-1:0]    cycles;
  } cq_ent_t;

  logic [NENT-1:0] valid;
  cq_ent_t         ent [NENT];

  logic              free_found, cm_found, max_found;
  logic [SLOT_W-1:0] free_slot, cm_slot, max_slot;
  always_comb begin
    free_found = 1'b0;
    free_slot  = '0;
    cm_found   = 1'b0;
    cm_slot    = '0;
    max_found  = 1'b0;
    max_slot   = '0;
    max_ts     = '0;
    occupancy  = '0;
    for (int i = NENT - 1; i >= 0; i--) begin
      if (!valid[i]) begin
        free_found = 1'b1;
        free_slot  = SLOT_W'(i);
      end
      if (valid[i] && ent[i].vt < gvt) begin
        cm_found = 1'b1;
        cm_slot  = SLOT_W'(i);
      end
      if (valid[i] && (!max_found || ent[i].vt.ts > max_ts)) begin
        max_found = 1'b1;
        max_slot  = SLOT_W'(i);
        max_ts    = ent[i].vt.ts;
      end
      if (valid[i]) occupancy = occupancy + 1'b1;
    end
  end

  assign in_ready  = free_found || ev_valid;
  assign cm_valid  = cm_found;
  assign cm_tq_idx = ent[cm_slot].tq_idx;
  assign cm_hv     = ent[cm_slot].hv;
  assign cm_bucket = ent[cm_slot].bucket;
  assign cm_cycles = ent[cm_slot].cycles;
  assign max_valid = max_found && !cm_found;
  assign ev_valid  = evict && max_valid;
  assign ev_tq_idx = ent[max_slot].tq_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      if (cm_found) valid[cm_slot]  <= 1'b0;
      if (ev_valid) valid[max_slot] <= 1'b0;
      if (in_valid && in_ready) begin
        valid[free_found ? free_slot : max_slot] <= 1'b1;
        ent[free_found ? free_slot : max_slot]   <= '{tq_idx: in_tq_idx, vt: in_vt, hv: in_hv,
                                                      bucket: in_bucket, cycles: in_cycles};
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> in_ready);
endmodule
