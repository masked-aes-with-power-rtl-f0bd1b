// Test of aes_output_stage: a record whose state is a mapped ciphertext
// masked with m' on every byte must give back the ciphertext.
module tb_aes_output_stage;
  import aes_ref_pkg::*;
  import aes_masked_pkg::pipe_t;
  pipe_t        in;
  logic [127:0] ct;
  int checks = 0, failures = 0;

  aes_output_stage dut (.in(in), .ct(ct));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      logic [127:0] c, s;
      c = rand128();
      in = '0;
      in.mk.mp = 8'($urandom);
      in.mk.m  = 8'($urandom);
      s = map_s(c);
      for (int k = 0; k < 16; k++) s = setb(s, k, getb(s, k) ^ in.mk.mp);
      in.st = s;
      #1;
      checks++;
      if (ct !== c) begin
        failures++;
        $display("ct %h expected %h", ct, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
