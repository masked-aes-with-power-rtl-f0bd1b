// Input interface: builds a 128-bit plaintext and a 128-bit cipher key from
// four consecutive 32-bit words, so the cipher needs 32 data pins per operand
// instead of 128.
//
// Each clock with in_valid high shifts one plaintext word and one key word in
// (the word of column 0, the most significant, first). The six random mask
// bytes are sampled with the fourth word. In the clock after the fourth
// word, blk_valid pulses for one clock and pt, key and rnd_q hold the block.
// Words of one block need not be consecutive clocks; the word counter resets
// synchronously (rst_n low), the data registers are not reset.
//
// Splitting operands into four 32-bit units follows the design; word order,
// mask sampling and reset are this implementation's choices.
//
// Ports: in_valid, pt_word, key_word, rnd  -> blk_valid, pt, key, rnd_q
module io_word_loader #(
  parameter int WORD_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [WORD_W-1:0]  pt_word,
  input  logic [WORD_W-1:0]  key_word,
  input  logic [47:0]        rnd,
  output logic               blk_valid,
  output logic [4*WORD_W-1:0] pt,
  output logic [4*WORD_W-1:0] key,
  output logic [47:0]        rnd_q
);
  logic [1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      blk_valid <= 1'b0;
    end else begin
      blk_valid <= in_valid && (cnt == 2'd3);
      if (in_valid) cnt <= cnt + 2'd1;
    end
    if (in_valid) begin
      pt  <= {pt[3*WORD_W-1:0], pt_word};
      key <= {key[3*WORD_W-1:0], key_word};
      if (cnt == 2'd3) rnd_q <= rnd;
    end
  end
endmodule
