// task_xbar: carries task descriptors between tiles.
//
// Each tile offers at most one outgoing task per cycle (src_valid, src_dest,
// src_desc); each tile accepts at most one incoming task per cycle. For every
// destination a round-robin arbiter picks one of the sources that target it;
// the winner's descriptor is presented to the destination, and src_ready
// tells a source its task was taken at this clock edge (granted and the
// destination's task queue not full). A task for the sender's own tile takes
// the same path. This is an abstraction of the chip's mesh network: the
// description specifies a mesh with X-Y routing, 128-bit links and 1 to 2
// cycles per hop, whose routers and hop timing are not modelled here; tasks
// are delivered in the cycle they win arbitration.
module task_xbar
  import swarm_pkg::*;
#(
  parameter int NTILES = 64,
  parameter int TILE_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NTILES-1:0] src_valid,
  input  logic [TILE_W-1:0] src_dest [NTILES],
  input  task_desc_t        src_desc [NTILES],
  output logic [NTILES-1:0] src_ready,
  output logic [NTILES-1:0] dst_valid,
  output task_desc_t        dst_desc [NTILES],
  input  logic [NTILES-1:0] dst_ready
);
  localparam int SW = (NTILES > 1) ? $clog2(NTILES) : 1;
  logic [SW-1:0] rr    [NTILES];
  logic [SW-1:0] win   [NTILES];
  logic [NTILES-1:0] found;

  always_comb begin
    src_ready = '0;
    for (int d = 0; d < NTILES; d++) begin
      found[d] = 1'b0;
      win[d]   = '0;
      for (int k = 0; k < NTILES; k++) begin
        int s;
        s = (int'(rr[d]) + k) % NTILES;
        if (!found[d] && src_valid[s] && int'(src_dest[s]) == d) begin
          found[d] = 1'b1;
          win[d]   = SW'(s);
        end
      end
      dst_valid[d] = found[d];
      dst_desc[d]  = src_desc[win[d]];
      if (found[d] && dst_ready[d]) src_ready[win[d]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NTILES; d++) rr[d] <= '0;
    end else begin
      for (int d = 0; d < NTILES; d++)
        if (found[d] && dst_ready[d]) rr[d] <= SW'((int'(win[d]) + 1) % NTILES);
    end
  end
endmodule
