// task_queue: a tile's task queue with hint-serialized dispatch.
//
// Holds the descriptor of every task of the tile (64 entries per core, 256 at
// four cores) in one of three states: IDLE (waiting to run), RUN (running on
// a core) and FIN (finished, waiting to commit). Commit frees an entry.
//
// Dispatch follows the design description: the default choice is the idle
// task with the earliest timestamp, but that candidate's 16-bit hashed hint is
// first compared with the hashed hints of the tasks running on the tile's
// cores (one 16-bit comparator per core). If one matches and that running task
// is earlier, the candidate is skipped and the idle task with the next lowest
// timestamp is tried. Here one candidate is tried per cycle: a skipped entry
// is marked in a skip mask, and the next cycle tries the earliest unmarked one.
// The mask is cleared when a task is dispatched, when a running task finishes
// and when no unmarked idle task is left (so a blocked core retries the whole
// queue). This design's choices: "earlier" counts equal timestamps (the
// running task was dispatched first, so it precedes the candidate in virtual
// time); NOHINT tasks (hint_valid = 0) never match; idle cores are served
// round-robin; ties between equal timestamps go to the lowest entry index.
//
// Interface and timing: in_valid/in_ready accept one descriptor per cycle
// into a free entry (in_ready = 0 when the queue is full, which stalls the
// sender). A core with deq_req high and no running task may get disp_valid[c]
// for one cycle together with disp_idx/disp_desc, combinationally in the cycle
// the dispatch is decided; a core with no task to run simply waits. fin_valid[c]
// ends core c's task: the entry goes to FIN, or back to IDLE if fin_abort[c].
// A dispatch also needs a commit queue entry to reserve (cq_room); if there
// is none, a candidate earlier than the latest finished task may still go by
// evicting that task (cq_evict), and otherwise the core waits (cq_stall).
// A dispatched task gets the tiebreaker disp_tb; local_min_vt is the earliest
// virtual time of the IDLE (counted with idle_tb) and RUN entries.
// free_valid/free_idx releases a FIN entry when its task commits;
// requeue_valid/requeue_idx returns a FIN entry to IDLE when the commit queue
// aborts that finished task to make room.
module task_queue
  import swarm_pkg::*;
#(
  parameter int NENT   = 256,
  parameter int NCORES = 4,
  parameter int IDX_W  = $clog2(NENT)
) (
  input  logic                clk,
  input  logic                rst_n,
  // enqueue
  input  logic                in_valid,
  input  task_desc_t          in_desc,
  output logic                in_ready,
  // dispatch
  input  logic [NCORES-1:0]   deq_req,
  output logic [NCORES-1:0]   disp_valid,
  output logic [IDX_W-1:0]    disp_idx,
  output task_desc_t          disp_desc,
  // task running on each core
  output logic [NCORES-1:0]   run_valid,
  output logic [IDX_W-1:0]    run_idx    [NCORES],
  output ts_t                 run_ts     [NCORES],
  output logic [TBRK_W-1:0]   run_tb     [NCORES],
  output logic [NCORES-1:0]   run_hv,
  output logic [HHASH_W-1:0]  run_hhash  [NCORES],
  output logic [BUCKET_W-1:0] run_bucket [NCORES],
  // finish and commit
  input  logic [NCORES-1:0]   fin_valid,
  input  logic [NCORES-1:0]   fin_abort,
  input  logic                free_valid,
  input  logic [IDX_W-1:0]    free_idx,
  input  logic                requeue_valid,
  input  logic [IDX_W-1:0]    requeue_idx,
  // virtual time and commit queue room
  input  logic [TBRK_W-1:0]   disp_tb,      // tiebreaker given to a task dispatched now
  input  logic [TBRK_W-1:0]   idle_tb,      // tiebreaker an idle task counts with
  input  logic                cq_room,      // a commit queue entry is free to reserve
  input  logic                cq_max_valid, // commit queue holds a task that may be evicted
  input  ts_t                 cq_max_ts,
  output logic                cq_evict,     // dispatch by evicting the latest finished task
  output logic                cq_stall,     // a core waits because the commit queue is full
  // status
  output logic                local_min_valid,
  output vt_t                 local_min_vt,
  output logic [IDX_W:0]      occupancy,
  output logic                serial_skip
);
  localparam int CORE_W = (NCORES > 1) ? $clog2(NCORES) : 1;

  typedef enum logic [1:0] {E_FREE, E_IDLE, E_RUN, E_FIN} ent_state_e;

  ent_state_e state [NENT];
  task_desc_t ent   [NENT];
  logic [TBRK_W-1:0] ent_tb [NENT];
  logic [NENT-1:0] skip;
  logic [CORE_W-1:0] rr;

  // ---- free entry for enqueue
  logic             free_found;
  logic [IDX_W-1:0] free_slot;
  always_comb begin
    free_found = 1'b0;
    free_slot  = '0;
    for (int i = NENT - 1; i >= 0; i--)
      if (state[i] == E_FREE) begin
        free_found = 1'b1;
        free_slot  = IDX_W'(i);
      end
  end
  assign in_ready = free_found;

  // ---- earliest unskipped idle task, and earliest unfinished task
  logic             cand_found;
  logic [IDX_W-1:0] cand;
  ts_t              cand_ts;
  always_comb begin
    cand_found      = 1'b0;
    cand            = '0;
    cand_ts         = '0;
    local_min_valid = 1'b0;
    local_min_vt    = '1;
    occupancy       = '0;
    for (int i = 0; i < NENT; i++) begin
      if (state[i] == E_IDLE && !skip[i] && (!cand_found || ent[i].ts < cand_ts)) begin
        cand_found = 1'b1;
        cand       = IDX_W'(i);
        cand_ts    = ent[i].ts;
      end
      if (state[i] == E_IDLE && (!local_min_valid || {ent[i].ts, idle_tb} < local_min_vt)) begin
        local_min_valid = 1'b1;
        local_min_vt    = '{ts: ent[i].ts, tb: idle_tb};
      end
      if (state[i] == E_RUN && (!local_min_valid || {ent[i].ts, ent_tb[i]} < local_min_vt)) begin
        local_min_valid = 1'b1;
        local_min_vt    = '{ts: ent[i].ts, tb: ent_tb[i]};
      end
      if (state[i] != E_FREE) occupancy = occupancy + 1'b1;
    end
  end

  // ---- idle core to serve, round-robin
  logic              core_found;
  logic [CORE_W-1:0] sel_core;
  always_comb begin
    core_found = 1'b0;
    sel_core   = '0;
    for (int k = 0; k < NCORES; k++) begin
      int c;
      c = (int'(rr) + k) % NCORES;
      if (!core_found && deq_req[c] && !run_valid[c]) begin
        core_found = 1'b1;
        sel_core   = (CORE_W)'(c);
      end
    end
  end

  // ---- the four hashed-hint comparators
  logic blocked;
  always_comb begin
    blocked = 1'b0;
    for (int c = 0; c < NCORES; c++)
      if (run_valid[c] && run_hv[c] && ent[cand].hint_valid &&
          run_hhash[c] == ent[cand].hhash && run_ts[c] <= cand_ts)
        blocked = 1'b1;
  end

  logic do_disp, cq_ok;
  assign cq_ok       = cq_room || (cq_max_valid && cand_ts < cq_max_ts);
  assign do_disp     = core_found && cand_found && !blocked && cq_ok;
  assign cq_evict    = do_disp && !cq_room;
  assign cq_stall    = core_found && cand_found && !blocked && !cq_ok;
  assign serial_skip = core_found && cand_found && blocked;
  assign disp_idx    = cand;
  assign disp_desc   = ent[cand];
  always_comb begin
    disp_valid = '0;
    if (do_disp) disp_valid[sel_core] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NENT; i++) state[i] <= E_FREE;
      skip      <= '0;
      rr        <= '0;
      run_valid <= '0;
      run_hv    <= '0;
      for (int c = 0; c < NCORES; c++) begin
        run_idx[c]    <= '0;
        run_ts[c]     <= '0;
        run_tb[c]     <= '0;
        run_hhash[c]  <= '0;
        run_bucket[c] <= '0;
      end
    end else begin
      if (in_valid && free_found) begin
        state[free_slot] <= E_IDLE;
        ent[free_slot]   <= in_desc;
      end
      if (free_valid)    state[free_idx]    <= E_FREE;
      if (requeue_valid) state[requeue_idx] <= E_IDLE;
      for (int c = 0; c < NCORES; c++)
        if (fin_valid[c] && run_valid[c]) begin
          state[run_idx[c]] <= fin_abort[c] ? E_IDLE : E_FIN;
          run_valid[c]      <= 1'b0;
        end
      if (core_found) begin
        if (!cand_found) begin
          skip <= '0;
        end else if (blocked) begin
          skip[cand] <= 1'b1;
        end else if (cq_ok) begin
          state[cand]          <= E_RUN;
          ent_tb[cand]         <= disp_tb;
          run_tb[sel_core]     <= disp_tb;
          run_valid[sel_core]  <= 1'b1;
          run_idx[sel_core]    <= cand;
          run_ts[sel_core]     <= ent[cand].ts;
          run_hv[sel_core]     <= ent[cand].hint_valid;
          run_hhash[sel_core]  <= ent[cand].hhash;
          run_bucket[sel_core] <= ent[cand].bucket;
          skip                 <= '0;
          rr <= (CORE_W)'((int'(sel_core) + 1) % NCORES);
        end
      end
      if (|(fin_valid & run_valid)) skip <= '0;
    end
  end

  a_free_is_finished: assert property (@(posedge clk) disable iff (!rst_n)
    free_valid |-> state[free_idx] == E_FIN);
  a_requeue_is_finished: assert property (@(posedge clk) disable iff (!rst_n)
    requeue_valid |-> state[requeue_idx] == E_FIN);
  a_fin_has_task: assert property (@(posedge clk) disable iff (!rst_n)
    (fin_valid != '0) |-> ((fin_valid & ~run_valid) == '0));
endmodule
