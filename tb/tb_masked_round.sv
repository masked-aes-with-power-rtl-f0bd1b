// Test of masked_round: a middle round (ROUND 1) and the last round
// (ROUND 10) side by side, each with the 3-stage and with the 6-stage S-box,
// fed a new random record every clock (with some idle clocks). Each output
// record, six (or nine) clocks after its input, must hold: the state which,
// with the round's output mask removed and mapped back, equals the FIPS-197
// round of the unmasked input; the mapped round key; the unchanged mask set;
// and the valid flag.
module tb_masked_round;
  import aes_ref_pkg::*;
  import aes_masked_pkg::*;
  localparam int N = 200;
  logic  clk = 0, rst_n = 0;
  pipe_t din = '0, dout_mid, dout_last, dout_mid6, dout_last6;
  pipe_t hist [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  masked_round #(.ROUND(1),  .NR(10)) dut_mid  (.clk(clk), .rst_n(rst_n), .in(din), .out(dout_mid));
  masked_round #(.ROUND(10), .NR(10)) dut_last (.clk(clk), .rst_n(rst_n), .in(din), .out(dout_last));
  masked_round #(.ROUND(1),  .NR(10), .SBOX_STAGES(6)) dut_mid6
    (.clk(clk), .rst_n(rst_n), .in(din), .out(dout_mid6));
  masked_round #(.ROUND(10), .NR(10), .SBOX_STAGES(6)) dut_last6
    (.clk(clk), .rst_n(rst_n), .in(din), .out(dout_last6));

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pipe_t rand_rec(input bit v);
    pipe_t p;
    logic [127:0] s, col;
    p.valid = v;
    p.mk.m  = 8'($urandom);
    p.mk.mp = 8'($urandom);
    p.mk.mr = $urandom;
    col = '0;
    for (int r = 0; r < 4; r++) col = setb(col, r, imap_b(p.mk.mr[r]));
    col = mix_columns(col);
    for (int r = 0; r < 4; r++) p.mk.mc[r] = map_b(getb(col, r));
    s = map_s(rand128());
    for (int k = 0; k < 16; k++) s = setb(s, k, getb(s, k) ^ p.mk.m);
    p.st  = s;
    p.key = map_s(rand128());
    return p;
  endfunction

  task automatic check_out(input pipe_t i, input pipe_t o, input int rnd);
    logic [127:0] plain_in, key_r, e, got;
    logic [7:0]   om;
    plain_in = '0;
    for (int k = 0; k < 16; k++) plain_in = setb(plain_in, k, getb(i.st, k) ^ i.mk.m);
    plain_in = imap_s(plain_in);
    key_r    = next_key(imap_s(i.key), rnd);
    e        = round_fn(plain_in, key_r, rnd == 10);
    om       = (rnd == 10) ? i.mk.mp : i.mk.m;
    got      = '0;
    for (int k = 0; k < 16; k++) got = setb(got, k, getb(o.st, k) ^ om);
    checks++;
    if (!o.valid || imap_s(got) !== e || o.key !== map_s(key_r) || o.mk !== i.mk) begin
      failures++;
      $display("round %0d: state %h expected %h (valid %b)", rnd, imap_s(got), e, o.valid);
    end
  endtask

  task automatic check_slot(input pipe_t i, input pipe_t o_mid, input pipe_t o_last);
    if (i.valid) begin
      check_out(i, o_mid, 1);
      check_out(i, o_last, 10);
    end else begin
      checks++;
      if (o_mid.valid || o_last.valid) begin
        failures++;
        $display("valid flag set for an idle slot");
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N + 9; n++) begin
      @(negedge clk);
      if (n >= 6 && n - 6 < N) check_slot(hist[n-6], dout_mid, dout_last);
      if (n >= 9) check_slot(hist[n-9], dout_mid6, dout_last6);
      din = (n < N) ? rand_rec((n % 9) != 4) : '0;
      if (n < N) hist[n] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
