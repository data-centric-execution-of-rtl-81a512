// hint_hash: H3 hash of a 64-bit spatial hint down to OUT_W bits.
//
// Each output bit is the parity of the hint ANDed with one fixed row of an H3
// matrix (swarm_pkg::h3_row). A tile uses three instances: a 16-bit hashed
// hint that tasks carry for dispatch serialization, a 10-bit hint-to-bucket
// hash for the load balancer's tile map, and a 6-bit hint-to-tile hash for
// hint mapping without the load balancer. The widths follow the design
// description; the choice of H3 here and its matrix rows are this design's own.
// Purely combinational, no clock.
module hint_hash
  import swarm_pkg::*;
#(
  parameter int          OUT_W = 16,
  parameter int unsigned SEED  = SEED_HHASH
) (
  input  logic [HINT_W-1:0] hint,
  output logic [OUT_W-1:0]  hash
);
  always_comb begin
    for (int i = 0; i < OUT_W; i++)
      hash[i] = ^(hint & h3_row(SEED, i));
  end
endmodule
