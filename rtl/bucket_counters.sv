// bucket_counters: per-bucket committed-cycle profile of one tile (32 tagged
// counters of 32 bits).
//
// A tile only runs tasks of the buckets mapped to it (16 on average with 1024
// buckets on 64 tiles), so instead of one counter per bucket it keeps a small
// tagged structure with twice that many counters. When a task commits, its
// run cycles (16 bits) are added to the counter whose tag is the task's
// bucket; on a miss the first unused counter is claimed for the bucket. Sizes
// and the add-on-commit rule follow the design description. This design's
// choices: a sample that finds no free counter is dropped and counted in
// 'dropped'; counters saturate; the load-balancing software reads counter
// rd_idx combinationally and clears the whole structure with a one-cycle
// 'clear' pulse after reading it (a sample arriving in the clear cycle starts
// the new profile).
module bucket_counters
  import swarm_pkg::*;
#(
  parameter int NCNT  = 32,
  parameter int IDX_W = $clog2(NCNT)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                add_valid,
  input  logic [BUCKET_W-1:0] add_bucket,
  input  logic [CYC_W-1:0]    add_cycles,
  input  logic                clear,
  input  logic [IDX_W-1:0]    rd_idx,
  output logic                rd_valid,
  output logic [BUCKET_W-1:0] rd_tag,
  output logic [CNT_W-1:0]    rd_count,
  output logic [CNT_W-1:0]    dropped
);
  logic [NCNT-1:0]     valid;
  logic [BUCKET_W-1:0] tag   [NCNT];
  logic [CNT_W-1:0]    count [NCNT];

  logic             hit, free_found;
  logic [IDX_W-1:0] hit_idx, free_idx;
  always_comb begin
    hit        = 1'b0;
    hit_idx    = '0;
    free_found = 1'b0;
    free_idx   = '0;
    for (int i = NCNT - 1; i >= 0; i--) begin
      if (valid[i] && tag[i] == add_bucket) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
      end
      if (!valid[i]) begin
        free_found = 1'b1;
        free_idx   = IDX_W'(i);
      end
    end
  end

  logic [CNT_W:0] sum;
  assign sum = {1'b0, count[hit_idx]} + (CNT_W+1)'(add_cycles);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid   <= '0;
      dropped <= '0;
      for (int i = 0; i < NCNT; i++) begin
        tag[i]   <= '0;
        count[i] <= '0;
      end
    end else if (clear) begin
      valid   <= '0;
      dropped <= '0;
      if (add_valid) begin
        valid[0] <= 1'b1;
        tag[0]   <= add_bucket;
        count[0] <= CNT_W'(add_cycles);
      end
    end else if (add_valid) begin
      if (hit) begin
        count[hit_idx] <= sum[CNT_W] ? '1 : sum[CNT_W-1:0];
      end else if (free_found) begin
        valid[free_idx] <= 1'b1;
        tag[free_idx]   <= add_bucket;
        count[free_idx] <= CNT_W'(add_cycles);
      end else if (dropped != '1) begin
        dropped <= dropped + 1'b1;
      end
    end
  end

  assign rd_valid = valid[rd_idx];
  assign rd_tag   = tag[rd_idx];
  assign rd_count = count[rd_idx];
endmodule
