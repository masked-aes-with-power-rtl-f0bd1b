// Test of masked_sbox in both depths (3 and 6 stages): a new input every
// clock, every byte value under random input and output masks and then under
// zero masks; each result is compared, exactly STAGES clocks later, with
// map(S(x)) ^ m', where S is the FIPS-197 S-box of the reference model.
module tb_masked_sbox;
  import aes_ref_pkg::*;
  localparam int N = 512;
  logic       clk = 0;
  logic [7:0] xm = 0, mi = 0, mo = 0, y3, m3, y6, m6;
  logic [7:0] exp_y [N], exp_m [N];
  int checks = 0, failures = 0;

  masked_sbox #(.STAGES(3)) dut3 (.clk(clk), .x_masked(xm), .m_in(mi), .m_out(mo),
                                  .y_masked(y3), .m_out_q(m3));
  masked_sbox #(.STAGES(6)) dut6 (.clk(clk), .x_masked(xm), .m_in(mi), .m_out(mo),
                                  .y_masked(y6), .m_out_q(m6));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N + 6; n++) begin
      @(negedge clk);
      if (n >= 3 && n - 3 < N) begin
        checks++;
        if (y3 !== exp_y[n-3] || m3 !== exp_m[n-3]) begin
          failures++;
          $display("3-stage, input %0d: y=%h m'=%h expected %h %h", n - 3, y3, m3, exp_y[n-3], exp_m[n-3]);
        end
      end
      if (n >= 6) begin
        checks++;
        if (y6 !== exp_y[n-6] || m6 !== exp_m[n-6]) begin
          failures++;
          $display("6-stage, input %0d: y=%h m'=%h expected %h %h", n - 6, y6, m6, exp_y[n-6], exp_m[n-6]);
        end
      end
      if (n < N) begin
        logic [7:0] x;
        x  = 8'(n);
        mi = (n < 256) ? 8'($urandom) : 8'h00;
        mo = (n < 256) ? 8'($urandom) : 8'h00;
        xm = map_b(x) ^ mi;
        exp_y[n] = map_b(sbox(x)) ^ mo;
        exp_m[n] = mo;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
