// Test of key_expand_stage: ten stages (ROUND 1..10) chained, fed a new mapped
// cipher key every clock; each stage's output is compared one clock after its
// input with the mapped FIPS-197 round key. Includes the FIPS-197 key
// 2b7e1516... whose round key 10 is d014f9a8c9ee2589e13f0cc8b6630ca6.
module tb_key_expand_stage;
  import aes_ref_pkg::*;
  import aes_masked_pkg::state_t;
  logic   clk = 0;
  state_t k [0:10];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar r = 1; r <= 10; r++) begin : g_st
    key_expand_stage #(.ROUND(r)) dut (.clk(clk), .key_in(k[r-1]), .key_out(k[r]));
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] ck;
    // full chain: apply one key, hold it, check every stage after 10 clocks
    for (int t = 0; t < 20; t++) begin
      logic [127:0] e;
      ck = (t == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : rand128();
      @(negedge clk);
      k[0] = map_s(ck);
      repeat (10) @(negedge clk);
      e = ck;
      for (int r = 1; r <= 10; r++) begin
        e = next_key(e, r);
        checks++;
        if (k[r] !== map_s(e)) begin
          failures++;
          $display("key %h round %0d: %h expected %h", ck, r, imap_s(k[r]), e);
        end
      end
      if (t == 0) begin
        checks++;
        if (imap_s(k[10]) !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
          failures++;
          $display("FIPS-197 round key 10 wrong");
        end
      end
    end
    // one-clock timing: stage 1 must show the new key's round key 1 exactly one clock later
    for (int t = 0; t < 20; t++) begin
      ck = rand128();
      @(negedge clk);
      k[0] = map_s(ck);
      @(negedge clk);
      checks++;
      if (k[1] !== map_s(next_key(ck, 1))) begin
        failures++;
        $display("stage 1 not ready one clock after its input");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
