// tb_tile_map: checks the reset mapping (bucket b -> tile b mod NTILES) of a
// full-size 1024 x 6-bit tile map, then random rewrites against a shadow copy,
// including that a write is seen by reads from the next cycle on.
module tb_tile_map;
  localparam int NB = 1024, NT = 64;
  logic clk = 0, rst_n = 0;
  logic [9:0] rd_bucket, wr_bucket;
  logic [5:0] rd_tile, wr_tile;
  logic       wr_en;
  logic [5:0] shadow [NB];
  int checks = 0, failures = 0;

  tile_map #(.NBUCKETS(NB), .NTILES(NT), .TILE_W(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_bucket = 0; wr_tile = 0; rd_bucket = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      shadow[b] = 6'(b % NT);
      rd_bucket = 10'(b);
      #1;
      checks++;
      if (rd_tile !== shadow[b]) begin failures++; $display("FAIL reset b=%0d got %0d", b, rd_tile); end
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr_en     = ($urandom % 2) == 0;
      wr_bucket = 10'($urandom);
      wr_tile   = 6'($urandom);
      rd_bucket = (i % 3 == 0) ? wr_bucket : 10'($urandom);
      #1;
      checks++;
      if (rd_tile !== shadow[rd_bucket]) begin failures++; $display("FAIL rd b=%0d", rd_bucket); end
      @(posedge clk);
      if (wr_en) shadow[wr_bucket] = wr_tile;
      #1;
      checks++;
      if (rd_tile !== shadow[rd_bucket]) begin failures++; $display("FAIL after write b=%0d", rd_bucket); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
