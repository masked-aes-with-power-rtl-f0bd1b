// Test of iso_inv_map: every byte value is mapped back and compared with the
// reference inverse (found by search over the reference forward map).
module tb_iso_inv_map;
  import aes_ref_pkg::*;
  logic [15:0][7:0] x, y;
  int checks = 0, failures = 0;

  iso_inv_map #(.NBYTES(16)) dut (.y(y), .x(x));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v += 16) begin
      for (int i = 0; i < 16; i++) y[i] = map_b(8'(v + i));
      #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (x[i] !== 8'(v + i)) begin
          failures++;
          $display("imap(%h) = %h, expected %h", y[i], x[i], 8'(v + i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
