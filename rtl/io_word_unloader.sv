// Output interface: the register before data output, and a serializer that
// sends the 128-bit ciphertext as four consecutive 32-bit words.
//
// When blk_valid is high the ciphertext is loaded; in the next four clocks
// out_valid is high and ct_word shows the words of columns 0, 1, 2, 3. A new
// block may be loaded in the clock in which the last word of the previous
// one is shown. Blocks enter the cipher through a 32-bit port as well, so
// they arrive at most once every four clocks and no back-pressure is needed;
// an assertion checks that a block never overwrites one still being sent.
// Counter and out_valid reset synchronously with rst_n low.
//
// The 32-bit output units follow the design; the handshake is this
// implementation's choice.
//
// Ports: blk_valid, ct -> out_valid, ct_word
module io_word_unloader #(
  parameter int WORD_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                blk_valid,
  input  logic [4*WORD_W-1:0] ct,
  output logic                out_valid,
  output logic [WORD_W-1:0]   ct_word
);
  logic [4*WORD_W-1:0] sh;
  logic [2:0]          left;  // words still to show, including the current one

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left <= '0;
    end else if (blk_valid) begin
      left <= 3'd4;
    end else if (left != 0) begin
      left <= left - 3'd1;
    end
    if (blk_valid)      sh <= ct;
    else if (left != 0) sh <= {sh[3*WORD_W-1:0], {WORD_W{1'b0}}};
  end

  assign out_valid = (left != 0);
  assign ct_word   = sh[4*WORD_W-1 -: WORD_W];

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 blk_valid |-> left <= 3'd1)
    else $error("ciphertext block overwrote one still being sent");
endmodule
