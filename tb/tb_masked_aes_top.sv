// End-to-end test of masked_aes_top at its default configuration.
//
// Encrypts the FIPS-197 example vectors and a stream of random blocks with
// random keys and random masks, and compares every ciphertext with the plain
// GF(2^8) reference model. Also checks: the latency of 66 clocks from the
// first input word to the first output word (63 from the fourth word when a
// block's words are spread out), that the same plaintext and key give the
// same ciphertext under different masks, and that each mechanism happened:
// back-to-back blocks at the full rate, gaps inside and between blocks,
// zero and non-zero masks, at least ten blocks in flight at once, and a
// sustained full rate (ciphertext words on every clock for at least eight
// blocks in a row: 128 bits per four clocks).
module tb_masked_aes_top;
  import aes_ref_pkg::*;
  localparam int LATENCY = 66;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [31:0] pt_word = 0, key_word = 0, ct_word;
  logic [47:0] rnd = 0;
  logic        out_valid;
  int checks = 0, failures = 0;
  int cyc = 0;

  masked_aes_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // expected results, in order
  logic [127:0] exp_q [$];
  int           first_q [$];   // cycle of word 0
  int           last_q [$];    // cycle of word 3
  bit           tight_q [$];   // words in four consecutive cycles
  int n_back2back = 0, n_gap_in_blk = 0, n_gap_between = 0, n_zero_mask = 0, n_rand_mask = 0;
  int max_inflight = 0, inflight = 0, done_blocks = 0;

  task automatic send(input logic [127:0] pt, input logic [127:0] key, input logic [47:0] r,
                      input int gap_in, input int gap_after);
    int first_c;
    bit tight = 1;
    exp_q.push_back(encrypt(pt, key));
    for (int w = 0; w < 4; w++) begin
      @(negedge clk);
      in_valid = 1;
      pt_word  = pt[127-32*w -: 32];
      key_word = key[127-32*w -: 32];
      rnd      = r;
      if (w == 0) first_c = cyc;
      if (w == 3) begin
        first_q.push_back(first_c);
        last_q.push_back(cyc);
        tight_q.push_back(tight);
      end
      if (w < 3 && gap_in > 0 && ($urandom % 2 == 1)) begin
        @(negedge clk);
        in_valid = 0;
        pt_word  = $urandom;
        tight    = 0;
        for (int g = 1; g < gap_in; g++) @(negedge clk);
      end
    end
    if (r == 0) n_zero_mask++; else n_rand_mask++;
    if (!tight) n_gap_in_blk++;
    // with no gap the next block's first word follows in the next clock
    if (gap_after == 0) n_back2back++;
    else begin
      n_gap_between++;
      @(negedge clk);
      in_valid = 0;
      for (int g = 1; g < gap_after; g++) @(negedge clk);
    end
  endtask

  // collect output words
  logic [127:0] got;
  int           wcnt = 0, ocyc0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (wcnt == 0) ocyc0 = cyc;
      got  = {got[95:0], ct_word};
      wcnt = wcnt + 1;
      if (wcnt == 4) begin
        logic [127:0] e;
        int f, l;
        bit t;
        wcnt = 0;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("unexpected ciphertext %h", got);
        end else begin
          e = exp_q.pop_front(); f = first_q.pop_front(); l = last_q.pop_front();
          t = tight_q.pop_front();
          if (got !== e) begin
            failures++;
            $display("block %0d: ct %h expected %h", done_blocks, got, e);
          end
          checks++;
          if (ocyc0 - l != LATENCY - 3 || (t && ocyc0 - f != LATENCY)) begin
            failures++;
            $display("block %0d: latency %0d from first word, %0d from last", done_blocks,
                     ocyc0 - f, ocyc0 - l);
          end
        end
        done_blocks++;
      end
    end
  end

  int run = 0, max_run = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) run <= run + 1;
    else                    run <= 0;
    if (run > max_run) max_run <= run;
  end

  always @(posedge clk) begin
    inflight = first_q.size() + (wcnt != 0 ? 1 : 0);
    if (inflight > max_inflight) max_inflight = inflight;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] p, k;
    int n_sent = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // FIPS-197 Appendix C.1 and Appendix B, first unmasked, then masked
    send(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 48'h0, 0, 0);
    send(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 48'h0, 0, 0);
    send(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
         {$urandom, 16'($urandom)}, 0, 0);
    send(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
         {$urandom, 16'($urandom)}, 0, 3);
    n_sent = 4;
    // random traffic: mostly back to back, some gaps
    for (int i = 0; i < 60; i++) begin
      p = rand128(); k = rand128();
      send(p, k, {$urandom, 16'($urandom)}, (i % 7 == 3) ? 2 : 0, (i % 11 == 5) ? 1 + $urandom % 5 : 0);
      // same block again under new masks
      if (i % 13 == 0) send(p, k, {$urandom, 16'($urandom)}, 0, 0);
      n_sent += (i % 13 == 0) ? 2 : 1;
    end
    @(negedge clk);
    in_valid = 0;
    wait (done_blocks == n_sent);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || out_valid) begin
      failures++;
      $display("results missing or extra output");
    end
    $display("blocks=%0d back_to_back=%0d gap_in_block=%0d gap_between=%0d zero_mask=%0d random_mask=%0d max_in_flight=%0d longest_full_rate_run=%0d words",
             done_blocks, n_back2back, n_gap_in_blk, n_gap_between, n_zero_mask, n_rand_mask, max_inflight,
             max_run);
    checks++; if (n_back2back == 0)   begin failures++; $display("no back-to-back blocks"); end
    checks++; if (n_gap_in_blk == 0)  begin failures++; $display("no gap inside a block"); end
    checks++; if (n_gap_between == 0) begin failures++; $display("no gap between blocks"); end
    checks++; if (n_zero_mask == 0)   begin failures++; $display("no zero-mask block"); end
    checks++; if (n_rand_mask == 0)   begin failures++; $display("no masked block"); end
    checks++; if (max_run < 32)       begin failures++; $display("never eight blocks at full rate"); end
    checks++; if (max_inflight < 10)  begin failures++; $display("pipeline never held ten blocks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
