// Test of io_word_loader: blocks sent as four 32-bit words, back to back and
// with idle clocks between words; checks the assembled plaintext, key and
// mask bytes, and that blk_valid pulses exactly once, one clock after the
// fourth word.
module tb_io_word_loader;
  import aes_ref_pkg::*;
  logic         clk = 0, rst_n = 0, in_valid = 0, blk_valid;
  logic [31:0]  pt_word = 0, key_word = 0;
  logic [47:0]  rnd = 0, rnd_q;
  logic [127:0] pt, key;
  int checks = 0, failures = 0, pulses = 0;

  io_word_loader #(.WORD_W(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && blk_valid) pulses++;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 50; b++) begin
      logic [127:0] p, k;
      logic [47:0]  r;
      p = rand128(); k = rand128(); r = {$urandom, 16'($urandom)};
      for (int w = 0; w < 4; w++) begin
        @(negedge clk);
        in_valid = 1;
        pt_word  = p[127-32*w -: 32];
        key_word = k[127-32*w -: 32];
        rnd      = (w == 3) ? r : 48'($urandom);
        if (b % 3 == 1 && w < 3) begin
          @(negedge clk);
          in_valid = 0;
          pt_word  = $urandom;
        end
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!blk_valid || pt !== p || key !== k || rnd_q !== r) begin
        failures++;
        $display("block %0d: valid %b pt %h key %h rnd %h", b, blk_valid, pt, key, rnd_q);
      end
      if (b % 4 == 2) begin
        @(negedge clk);
        checks++;
        if (blk_valid) begin failures++; $display("blk_valid longer than one clock"); end
      end
    end
    @(negedge clk);
    checks++;
    if (pulses != 50) begin failures++; $display("%0d pulses for 50 blocks", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
