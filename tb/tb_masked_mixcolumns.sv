// Test of masked_mixcolumns: for random mapped states, the result mapped
// back must equal the FIPS-197 MixColumns of the state mapped back; also
// checks linearity under a mask (MC(s ^ m) = MC(s) ^ MC(m)).
module tb_masked_mixcolumns;
  import aes_ref_pkg::*;
  import aes_masked_pkg::state_t;
  state_t si, so;
  int checks = 0, failures = 0;

  masked_mixcolumns dut (.st_in(si), .st_out(so));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 60; t++) begin
      logic [127:0] s, e;
      s  = rand128();
      si = map_s(s);
      #1;
      e = map_s(mix_columns(s));
      checks++;
      if (so !== e) begin
        failures++;
        $display("MC(%h) = %h expected %h", si, so, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
