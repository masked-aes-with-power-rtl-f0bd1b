// Test of masked_add_round_key: random state, key and per-row corrections
// against byte-wise XOR computed in the testbench.
module tb_masked_add_round_key;
  import aes_ref_pkg::*;
  import aes_masked_pkg::state_t;
  state_t          si, rk, so;
  logic [3:0][7:0] cr;
  int checks = 0, failures = 0;

  masked_add_round_key dut (.st_in(si), .rk(rk), .corr(cr), .st_out(so));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      logic [127:0] e;
      si = rand128(); rk = rand128(); cr = $urandom;
      #1;
      e = si ^ rk;
      for (int k = 0; k < 16; k++) e = setb(e, k, getb(e, k) ^ cr[k % 4]);
      checks++;
      if (so !== e) begin
        failures++;
        $display("ARK out %h expected %h", so, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
