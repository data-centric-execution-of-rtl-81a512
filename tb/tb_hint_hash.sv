// tb_hint_hash: checks the three H3 hint hashes (16-bit hashed hint, 10-bit
// bucket, 6-bit tile) against reference values computed separately from the
// H3 row formula, and checks the linearity every H3 hash has:
// h(a ^ b) == h(a) ^ h(b), h(0) == 0.
module tb_hint_hash;
  import swarm_pkg::*;
  logic [63:0] hint_a, hint_b;
  logic [15:0] hh_a, hh_b, hh_x;
  logic [9:0]  bk_a;
  logic [5:0]  th_a;
  int checks = 0, failures = 0;

  hint_hash #(.OUT_W(16), .SEED(SEED_HHASH))  u_hh  (.hint(hint_a), .hash(hh_a));
  hint_hash #(.OUT_W(10), .SEED(SEED_BUCKET)) u_bk  (.hint(hint_a), .hash(bk_a));
  hint_hash #(.OUT_W(6),  .SEED(SEED_TILE))   u_th  (.hint(hint_a), .hash(th_a));
  hint_hash #(.OUT_W(16), .SEED(SEED_HHASH))  u_hhb (.hint(hint_b), .hash(hh_b));
  hint_hash #(.OUT_W(16), .SEED(SEED_HHASH))  u_hhx (.hint(hint_a ^ hint_b), .hash(hh_x));

  task automatic check(input logic [63:0] h, input logic [15:0] e16,
                       input logic [9:0] e10, input logic [5:0] e6);
    hint_a = h;
    #1;
    checks++;
    if (hh_a !== e16 || bk_a !== e10 || th_a !== e6) begin
      failures++;
      $display("FAIL hint %h: got %h %h %h expected %h %h %h", h, hh_a, bk_a, th_a, e16, e10, e6);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hint_b = '0;
    check(64'h0, 16'h0, 10'h0, 6'h0);
    check(64'h0000000000000001, 16'h6C8A, 10'h315, 6'h04);
    check(64'h0000000000000F00, 16'h635A, 10'h13B, 6'h36);
    check(64'hDEADBEEFCAFEF00D, 16'h690F, 10'h249, 6'h3E);
    check(64'h123456789ABCDEF0, 16'hEE17, 10'h123, 6'h06);
    check(64'hFFFFFFFFFFFFFFFF, 16'h6F34, 10'h230, 6'h09);
    for (int i = 0; i < 200; i++) begin
      hint_a = {$urandom, $urandom};
      hint_b = {$urandom, $urandom};
      #1;
      checks++;
      if (hh_x !== (hh_a ^ hh_b)) begin
        failures++;
        $display("FAIL linearity %h %h", hint_a, hint_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
