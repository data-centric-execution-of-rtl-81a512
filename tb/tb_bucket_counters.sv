// tb_bucket_counters: random committed-cycle samples into a 4-counter tagged
// profile, against a reference model: a sample adds to its bucket's counter,
// claims a free counter on a miss, and is dropped (and counted) when all
// counters hold other buckets. Reads every counter back and checks a clear.
module tb_bucket_counters;
  import swarm_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic add_valid, clear;
  logic [9:0] add_bucket, rd_tag;
  logic [15:0] add_cycles;
  logic [1:0] rd_idx;
  logic rd_valid;
  logic [31:0] rd_count, dropped;
  int checks = 0, failures = 0;
  int unsigned ref_cnt [int];   // bucket -> cycles
  int ref_dropped;

  bucket_counters #(.NCNT(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic compare();
    int seen;
    seen = 0;
    for (int i = 0; i < N; i++) begin
      rd_idx = 2'(i);
      #1;
      if (rd_valid) begin
        seen++;
        chk(ref_cnt.exists(int'(rd_tag)) && ref_cnt[int'(rd_tag)] == rd_count,
            $sformatf("counter %0d tag %0d count %0d", i, rd_tag, rd_count));
      end
    end
    chk(seen == ref_cnt.num(), "number of counters in use");
    chk(dropped == 32'(ref_dropped), "dropped samples");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    add_valid = 0; clear = 0; add_bucket = 0; add_cycles = 0; rd_idx = 0;
    ref_dropped = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      for (int i = 0; i < 60; i++) begin
        @(negedge clk);
        add_valid  = ($urandom % 4) != 0;
        add_bucket = 10'(($urandom % 6) * 37);
        add_cycles = 16'($urandom);
        if (add_valid) begin
          if (ref_cnt.exists(int'(add_bucket)))
            ref_cnt[int'(add_bucket)] += int'(add_cycles);
          else if (ref_cnt.num() < N)
            ref_cnt[int'(add_bucket)] = int'(add_cycles);
          else
            ref_dropped++;
        end
        @(posedge clk);
      end
      @(negedge clk);
      add_valid = 0;
      compare();
      // clear
      clear = 1;
      @(posedge clk);
      #1 clear = 0;
      ref_cnt.delete();
      ref_dropped = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
