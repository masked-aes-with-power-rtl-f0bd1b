// Test of io_word_unloader: ciphertext blocks loaded every four clocks (the
// fastest allowed) and with gaps; checks that each shows as four words,
// column 0 first, starting the clock after loading, and that out_valid is
// low when no block is being sent.
module tb_io_word_unloader;
  import aes_ref_pkg::*;
  logic         clk = 0, rst_n = 0, blk_valid = 0, out_valid;
  logic [127:0] ct = 0;
  logic [31:0]  ct_word;
  int checks = 0, failures = 0, cyc = 0, words_expected = 0;
  logic [31:0]  exp_w [$];
  int           exp_c [$];

  io_word_unloader #(.WORD_W(32)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (exp_c.size() > 0 && exp_c[0] == cyc) begin
        logic [31:0] w;
        void'(exp_c.pop_front());
        w = exp_w.pop_front();
        checks++;
        if (!out_valid || ct_word !== w) begin
          failures++;
          $display("cycle %0d: word %h valid %b expected %h", cyc, ct_word, out_valid, w);
        end
      end else begin
        checks++;
        if (out_valid) begin failures++; $display("cycle %0d: out_valid with no word due", cyc); end
      end
    end
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 60; b++) begin
      logic [127:0] blk;
      blk = rand128();
      @(negedge clk);
      blk_valid = 1; ct = blk;
      for (int w = 0; w < 4; w++) begin  // loaded at the next edge, shown from the clock after
        exp_w.push_back(blk[127-32*w -: 32]);
        exp_c.push_back(cyc + 1 + w);
      end
      @(negedge clk);
      blk_valid = 0; ct = rand128();
      repeat ((b % 5 == 2) ? 4 : 2) @(negedge clk);
    end
    repeat (8) @(negedge clk);
    checks++;
    if (exp_c.size() != 0) begin failures++; $display("words never shown"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
