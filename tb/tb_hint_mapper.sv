// tb_hint_mapper: checks destination choice and hint state for the three hint
// kinds. Integer hints must take the tile the tile map gives for their bucket
// (a map model in this bench), or with the load balancer off the 6-bit hash
// of the hint; SAMEHINT must stay local and copy the parent's hint state;
// NOHINT must follow the 16-bit LFSR sequence, reduced modulo the tile count,
// and carry no hint. Hash values are reference values of the H3 functions.
module tb_hint_mapper;
  import swarm_pkg::*;
  logic clk = 0, rst_n = 0;
  enq_req_t req;
  logic fire;
  logic [5:0] my_tile = 6'd9;
  logic parent_hint_valid;
  logic [15:0] parent_hhash;
  logic [9:0]  parent_bucket, map_bucket, map_bucket_nl;
  logic [5:0]  map_tile, dest, dest_nl, dest_odd;
  task_desc_t  desc, desc_nl, desc_odd;
  logic [15:0] lfsr_ref;
  int checks = 0, failures = 0;

  assign map_tile = 6'((int'(map_bucket) * 7 + 3) % 64);

  hint_mapper #(.NTILES(64), .TILE_W(6), .LOAD_BALANCE(1'b1)) dut (
    .clk, .rst_n, .req, .fire, .my_tile, .parent_hint_valid, .parent_hhash, .parent_bucket,
    .map_bucket, .map_tile, .dest_tile(dest), .desc);
  hint_mapper #(.NTILES(64), .TILE_W(6), .LOAD_BALANCE(1'b0)) dut_nolb (
    .clk, .rst_n, .req, .fire, .my_tile, .parent_hint_valid, .parent_hhash, .parent_bucket,
    .map_bucket(map_bucket_nl), .map_tile(6'd0), .dest_tile(dest_nl), .desc(desc_nl));
  hint_mapper #(.NTILES(48), .TILE_W(6), .LOAD_BALANCE(1'b0)) dut_odd (
    .clk, .rst_n, .req, .fire, .my_tile, .parent_hint_valid, .parent_hhash, .parent_bucket,
    .map_bucket(), .map_tile(6'd0), .dest_tile(dest_odd), .desc(desc_odd));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic int_hint(input logic [63:0] h, input logic [15:0] e16,
                          input logic [9:0] e10, input logic [5:0] e6);
    @(negedge clk);
    req.kind = HINT_INT; req.hint = h; req.ts = 64'(h) + 5; fire = 1;
    #1;
    chk(desc.hint_valid && desc.hhash == e16 && desc.bucket == e10, "int hint state");
    chk(desc.ts == req.ts && desc.fn == req.fn && desc.args == req.args, "payload");
    chk(dest == 6'((int'(e10) * 7 + 3) % 64), "int dest via tile map");
    chk(dest_nl == e6, "int dest via 6-bit hash");
    chk(dest_odd == 6'(int'(e6) % 48), "int dest modulo 48");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; req.fn = 64'h4000_1234; req.args = {64'd3, 64'd2, 64'd1};
    fire = 0; parent_hint_valid = 1; parent_hhash = 16'hBEEF; parent_bucket = 10'h2A5;
    repeat (2) @(posedge clk);
    rst_n = 1;
    lfsr_ref = 16'hACE1;
    int_hint(64'h0000000000000F00, 16'h635A, 10'h13B, 6'h36);
    int_hint(64'hDEADBEEFCAFEF00D, 16'h690F, 10'h249, 6'h3E);
    int_hint(64'h123456789ABCDEF0, 16'hEE17, 10'h123, 6'h06);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      case ($urandom % 3)
        0: begin
          req.kind = HINT_SAME;
          parent_hint_valid = 1'($urandom);
          parent_hhash = 16'($urandom); parent_bucket = 10'($urandom);
          fire = 1'($urandom);
          #1;
          chk(dest == my_tile && dest_nl == my_tile, "samehint local");
          chk(desc.hint_valid == parent_hint_valid && desc.hhash == parent_hhash &&
              desc.bucket == parent_bucket, "samehint inherits");
        end
        1: begin
          req.kind = HINT_NONE;
          fire = 1'($urandom);
          #1;
          chk(!desc.hint_valid, "nohint has no hint");
          chk(dest == 6'(lfsr_ref % 64) && dest_odd == 6'(lfsr_ref % 48), "nohint random tile");
          if (fire) lfsr_ref = {1'b0, lfsr_ref[15:1]} ^ (lfsr_ref[0] ? 16'hB400 : 16'h0);
        end
        default: begin
          req.kind = HINT_INT; req.hint = {$urandom, $urandom}; fire = 1'($urandom);
          #1;
          chk(desc.hint_valid && dest == map_tile && map_bucket == desc.bucket, "int via map");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
