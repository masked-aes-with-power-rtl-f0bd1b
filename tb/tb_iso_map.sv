// Test of iso_map: every byte value, and random 16-byte vectors, against a
// reference map built from powers of 0x26 in a separately written
// composite-field model; also checks that the map turns AES products into
// composite-field products.
module tb_iso_map;
  import aes_ref_pkg::*;
  logic [15:0][7:0] x, y;
  int checks = 0, failures = 0;

  iso_map #(.NBYTES(16)) dut (.x(x), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v += 16) begin
      for (int i = 0; i < 16; i++) x[i] = 8'(v + i);
      #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (y[i] !== map_b(x[i])) begin
          failures++;
          $display("map(%h) = %h, expected %h", x[i], y[i], map_b(x[i]));
        end
      end
    end
    for (int t = 0; t < 50; t++) begin
      logic [7:0] a, b;
      a = 8'($urandom); b = 8'($urandom);
      x = '0; x[0] = a; x[1] = b; x[2] = gmul(a, b);
      #1;
      checks++;
      if (cmul(y[0], y[1]) !== y[2]) begin
        failures++;
        $display("map is not multiplicative for %h * %h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
