// tile_map: the reconfigurable bucket-to-tile table of the hint-based load
// balancer.
//
// One tile ID per bucket (1024 buckets x 6 bits at 64 tiles). A new task's
// bucket indexes the table and the entry is the destination tile. The read
// is combinational. The load-balancing software rewrites entries one per
// cycle through the write port (wr_en, wr_bucket, wr_tile); a write is visible
// to reads from the next cycle on. Bucket numbers are BUCKET_W (10) bits; a
// smaller table (NBUCKETS below 2^BUCKET_W) folds them modulo NBUCKETS. Reset divides buckets uniformly among tiles
// by interleaving (bucket b goes to tile b mod NTILES): the uniform division is
// the description's, the interleaved order is this design's choice.
module tile_map #(
  parameter int NBUCKETS = 1024,
  parameter int NTILES   = 64,
  parameter int TILE_W   = 6,
  parameter int BUCKET_W = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [BUCKET_W-1:0] rd_bucket,
  output logic [TILE_W-1:0]   rd_tile,
  input  logic                wr_en,
  input  logic [BUCKET_W-1:0] wr_bucket,
  input  logic [TILE_W-1:0]   wr_tile
);
  logic [TILE_W-1:0] map [NBUCKETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBUCKETS; b++) map[b] <= TILE_W'(b % NTILES);
    end else if (wr_en) begin
      map[int'(wr_bucket) % NBUCKETS] <= wr_tile;
    end
  end

  assign rd_tile = map[int'(rd_bucket) % NBUCKETS];

  a_wr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (int'(wr_tile) < NTILES));
endmodule
