// Test of aes_input_stage: random plaintext, key and masks; one clock later
// the record must hold the mapped key, the mapped masks, mc = mapped
// MixColumns(m1..m4), and a state that with mask m removed maps back to
// plaintext ^ key. Also checks the valid flag follows blk_valid.
module tb_aes_input_stage;
  import aes_ref_pkg::*;
  import aes_masked_pkg::pipe_t;
  logic         clk = 0, rst_n = 0, blk_valid = 0;
  logic [127:0] pt = 0, key = 0;
  logic [47:0]  rnd = 0;
  pipe_t        out;
  int checks = 0, failures = 0;

  aes_input_stage dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      logic [127:0] s, col;
      logic [7:0]   mm;
      bit           ok;
      pt = rand128(); key = rand128(); rnd = {$urandom, 16'($urandom)};
      blk_valid = (t % 4 != 1);
      @(negedge clk);
      mm = map_b(rnd[47:40]);
      ok = (out.valid == blk_valid) && (out.key == map_s(key)) && (out.mk.m == mm) &&
           (out.mk.mp == map_b(rnd[39:32]));
      col = '0;
      for (int r = 0; r < 4; r++) begin
        ok &= (out.mk.mr[r] == map_b(rnd[31-8*r -: 8]));
        col = setb(col, r, rnd[31-8*r -: 8]);
      end
      col = mix_columns(col);
      for (int r = 0; r < 4; r++) ok &= (out.mk.mc[r] == map_b(getb(col, r)));
      s = '0;
      for (int k = 0; k < 16; k++) s = setb(s, k, getb(out.st, k) ^ mm);
      ok &= (imap_s(s) == (pt ^ key));
      checks++;
      if (!ok) begin
        failures++;
        $display("test %0d: record wrong (state %h expected %h)", t, imap_s(s), pt ^ key);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
