// Test of masked_shiftrows: random states and per-row remask bytes against
// the reference ShiftRows followed by XOR of each row's remask byte.
module tb_masked_shiftrows;
  import aes_ref_pkg::*;
  import aes_masked_pkg::state_t;
  state_t          si, so;
  logic [3:0][7:0] rm;
  int checks = 0, failures = 0;

  masked_shiftrows dut (.st_in(si), .remask(rm), .st_out(so));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      logic [127:0] e;
      si = rand128(); rm = (t < 10) ? '0 : $urandom;
      #1;
      e = shift_rows(si);
      for (int k = 0; k < 16; k++) e = setb(e, k, getb(e, k) ^ rm[k % 4]);
      checks++;
      if (so !== e) begin
        failures++;
        $display("in %h remask %h: out %h expected %h", si, rm, so, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
