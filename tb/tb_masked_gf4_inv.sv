// Test of masked_gf4_inv: all 256 (masked nibble, mask) pairs against the
// GF(2^4) inverse found by search, re-masked with the same mask.
module tb_masked_gf4_inv;
  import aes_ref_pkg::*;
  logic [3:0] dm, mk, q;
  int checks = 0, failures = 0;

  masked_gf4_inv dut (.d_masked(dm), .mask(mk), .inv_masked(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      dm = 4'(a >> 4); mk = 4'(a);
      #1;
      checks++;
      if (q !== (inv4(dm ^ mk) ^ mk)) begin
        failures++;
        $display("T4(%h,%h) = %h, expected %h", dm, mk, q, inv4(dm ^ mk) ^ mk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
