// tb_gvt_arbiter: four tiles report random earliest-unfinished virtual times
// (some reporting nothing). Checks that the GVT changes exactly every PERIOD
// cycles (the described 200-cycle update period), one cycle after sampling,
// that it equals the minimum of the valid reports sampled, and that it is all
// ones when no tile reports.
module tb_gvt_arbiter;
  import swarm_pkg::*;
  localparam int NT = 4, P = 200;
  logic clk = 0, rst_n = 0;
  logic [NT-1:0] tile_min_valid;
  vt_t tile_min_vt [NT];
  vt_t gvt;
  logic update;
  int checks = 0, failures = 0, cyc = 0, last_update = -1, updates = 0;
  vt_t expect_next;

  gvt_arbiter #(.NTILES(NT), .PERIOD(P)) dut (.*);
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

  initial begin
    tile_min_valid = 0;
    for (int t = 0; t < NT; t++) tile_min_vt[t] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 10 * P + 5; cyc++) begin
      @(negedge clk);
      if (update) begin
        chk(gvt == expect_next, $sformatf("gvt %0d expected %0d", gvt.ts, expect_next.ts));
        if (last_update >= 0) chk(cyc - last_update == P, "update period");
        last_update = cyc;
        updates++;
      end
      tile_min_valid = 4'($urandom);
      if (cyc > 8 * P) tile_min_valid = 0;
      for (int t = 0; t < NT; t++) tile_min_vt[t] = '{ts: ts_t'($urandom % 100), tb: TBRK_W'({$urandom, $urandom})};
      expect_next = '1;
      for (int t = 0; t < NT; t++)
        if (tile_min_valid[t] && tile_min_vt[t] < expect_next) expect_next = tile_min_vt[t];
    end
    chk(updates == 10, $sformatf("updates %0d", updates));
    chk(gvt == '1, "gvt all ones with no unfinished task");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
