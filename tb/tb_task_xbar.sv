// tb_task_xbar: random traffic among 4 tiles with random destination
// back-pressure. Checks each destination receives the descriptor of a source
// that targets it, at most one per cycle, that a source is told 'taken' only
// when its destination accepted it, that no request is left unserved while
// its destination is free, and that two persistent senders to one tile
// alternate (round-robin).
module tb_task_xbar;
  import swarm_pkg::*;
  localparam int NT = 4;
  logic clk = 0, rst_n = 0;
  logic [NT-1:0] src_valid, src_ready, dst_valid, dst_ready;
  logic [1:0] src_dest [NT];
  task_desc_t src_desc [NT], dst_desc [NT];
  int checks = 0, failures = 0;

  task_xbar #(.NTILES(NT), .TILE_W(2)) dut (.*);
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

  int last, alternations;
  initial begin
    src_valid = 0; dst_ready = 0;
    for (int s = 0; s < NT; s++) begin src_dest[s] = 0; src_desc[s] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      src_valid = 4'($urandom);
      dst_ready = 4'($urandom) | 4'($urandom);
      for (int s = 0; s < NT; s++) begin
        src_dest[s] = 2'($urandom);
        src_desc[s] = '0;
        src_desc[s].ts = ts_t'(s * 100000 + cyc);
      end
      #1;
      for (int d = 0; d < NT; d++) begin
        int n_req, n_taken;
        n_req = 0; n_taken = 0;
        for (int s = 0; s < NT; s++) begin
          if (src_valid[s] && src_dest[s] == 2'(d)) n_req++;
          if (src_ready[s] && src_dest[s] == 2'(d)) n_taken++;
        end
        chk(dst_valid[d] == (n_req > 0), "dst_valid iff requested");
        chk(n_taken == ((n_req > 0 && dst_ready[d]) ? 1 : 0), "one taken per ready destination");
        if (dst_valid[d]) begin
          int s;
          s = int'(dst_desc[d].ts) / 100000;
          chk(s < NT && src_valid[s] && src_dest[s] == 2'(d) && dst_desc[d] == src_desc[s],
              "delivered descriptor comes from a requester");
          if (dst_ready[d]) chk(src_ready[s], "winner told taken");
        end
      end
      for (int s = 0; s < NT; s++) chk(!src_ready[s] || src_valid[s], "ready only for valid");
    end
    // round-robin: sources 1 and 3 both send to tile 2 continuously
    last = -1; alternations = 0;
    for (int cyc = 0; cyc < 20; cyc++) begin
      @(negedge clk);
      src_valid = 4'b1010; dst_ready = 4'b1111;
      src_dest[1] = 2; src_dest[3] = 2;
      src_desc[1].ts = 1000; src_desc[3].ts = 3000;
      #1;
      if (last >= 0 && int'(dst_desc[2].ts) / 1000 != last) alternations++;
      last = int'(dst_desc[2].ts) / 1000;
    end
    chk(alternations == 19, $sformatf("round robin alternations %0d", alternations));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
