// hint_mapper: chooses the destination tile of a newly created task and fills
// in the hint state the task keeps for its lifetime.
//
// Following the design description:
//   * integer hint: the hint is hashed to a 16-bit hashed hint and a 10-bit
//     bucket; the bucket indexes the tile map (map_bucket -> map_tile) and the
//     entry is the destination. With LOAD_BALANCE = 0 the tile map is bypassed
//     and a 6-bit hint-to-tile hash picks the tile directly.
//   * SAMEHINT: the child inherits the parent's hashed hint and bucket and is
//     queued to the local tile.
//   * NOHINT: the child goes to a random tile.
// This design's choices: the random tile comes from a 16-bit LFSR that steps
// on every NOHINT enqueue that fires; NOHINT tasks carry hint_valid = 0, are
// never serialized and are not profiled by the load balancer; when NTILES is
// not a power of two the hash or LFSR value is reduced modulo NTILES.
// The mapping is combinational; only the LFSR is clocked (advanced by 'fire').
module hint_mapper
  import swarm_pkg::*;
#(
  parameter int          NTILES       = 64,
  parameter int          TILE_W       = 6,
  parameter bit          LOAD_BALANCE = 1'b1,
  parameter logic [15:0] LFSR_SEED    = 16'hACE1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  enq_req_t            req,
  input  logic                fire,          // the request is accepted this cycle
  input  logic [TILE_W-1:0]   my_tile,
  // parent's hint state, for SAMEHINT
  input  logic                parent_hint_valid,
  input  logic [HHASH_W-1:0]  parent_hhash,
  input  logic [BUCKET_W-1:0] parent_bucket,
  // tile map lookup
  output logic [BUCKET_W-1:0] map_bucket,
  input  logic [TILE_W-1:0]   map_tile,
  // result
  output logic [TILE_W-1:0]   dest_tile,
  output task_desc_t          desc
);
  logic [HHASH_W-1:0]  hh;
  logic [BUCKET_W-1:0] bk;
  logic [TILE_W-1:0]   th;
  logic [15:0]         lfsr;

  hint_hash #(.OUT_W(HHASH_W),  .SEED(SEED_HHASH))  u_hh (.hint(req.hint), .hash(hh));
  hint_hash #(.OUT_W(BUCKET_W), .SEED(SEED_BUCKET)) u_bk (.hint(req.hint), .hash(bk));
  hint_hash #(.OUT_W(TILE_W),   .SEED(SEED_TILE))   u_th (.hint(req.hint), .hash(th));

  assign map_bucket = bk;

  // x^16 + x^14 + x^13 + x^11 + 1, Galois form
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= LFSR_SEED;
    else if (fire && req.kind == HINT_NONE)
      lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
  end

  always_comb begin
    desc.fn   = req.fn;
    desc.ts   = req.ts;
    desc.args = req.args;
    unique case (req.kind)
      HINT_SAME: begin
        desc.hint_valid = parent_hint_valid;
        desc.hhash      = parent_hhash;
        desc.bucket     = parent_bucket;
        dest_tile       = my_tile;
      end
      HINT_NONE: begin
        desc.hint_valid = 1'b0;
        desc.hhash      = '0;
        desc.bucket     = '0;
        dest_tile       = TILE_W'(32'(lfsr) % NTILES);
      end
      default: begin
        desc.hint_valid = 1'b1;
        desc.hhash      = hh;
        desc.bucket     = bk;
        dest_tile       = LOAD_BALANCE ? map_tile : TILE_W'(32'(th) % NTILES);
      end
    endcase
  end
endmodule
