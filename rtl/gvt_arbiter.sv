// gvt_arbiter: computes the global virtual time (GVT) that lets tiles commit.
//
// Every PERIOD cycles (200 in the described configuration) all tiles report
// the virtual time (timestamp, tiebreaker) of their earliest unfinished task (a tile with none reports
// nothing, tile_min_valid = 0). The arbiter takes the minimum and broadcasts
// it one cycle later as 'gvt'; every task that precedes it can commit. With no
// unfinished task anywhere GVT is all ones, so everything finished commits.
// Reports are sampled in the same cycle from all tiles, so a task handed from
// one tile to another is never missed. The periodic update is the
// description's; the same-cycle sampling and the all-ones value are this
// design's choices. 'update' pulses in the cycle the new GVT appears.
module gvt_arbiter
  import swarm_pkg::*;
#(
  parameter int NTILES = 64,
  parameter int PERIOD = 200
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NTILES-1:0] tile_min_valid,
  input  vt_t               tile_min_vt [NTILES],
  output vt_t               gvt,
  output logic              update
);
  localparam int CW = $clog2(PERIOD + 1);
  logic [CW-1:0] timer;
  vt_t           mn;

  always_comb begin
    mn = '1;
    for (int t = 0; t < NTILES; t++)
      if (tile_min_valid[t] && tile_min_vt[t] < mn) mn = tile_min_vt[t];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer  <= '0;
      gvt    <= '0;
      update <= 1'b0;
    end else begin
      update <= 1'b0;
      if (timer == CW'(PERIOD - 1)) begin
        timer  <= '0;
        gvt    <= mn;
        update <= 1'b1;
      end else begin
        timer <= timer + 1'b1;
      end
    end
  end
endmodule
