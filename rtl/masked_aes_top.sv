// Masked AES-128 encryptor with an unrolled, deeply pipelined round
// structure and a 32-bit word interface.
//
// Plaintext and key enter as four 32-bit words each (io_word_loader) with
// six random mask bytes per block. aes_input_stage maps everything into
// GF((2^4)^2), masks the plaintext and adds round key 0. Ten masked_round
// instances follow, each with its own S-boxes, MixColumns and key expansion
// stage, so ten blocks (and up to 60 pipeline slots) are in flight at once.
// aes_output_stage removes the last mask and maps the ciphertext back to
// GF(2^8); io_word_unloader registers it and sends it out as four words.
//
// Timing: a block whose first word is presented in clock n appears with its
// first ciphertext word in clock n + 66 (4 load + 1 input + 10 x 6 rounds
// + 1 output register); a new block may start every 4 clocks. SBOX_STAGES = 6
// selects the deeper S-box (nine registers per round, latency 96).
//
// Ports: clk, rst_n (synchronous, active low), in_valid, pt_word, key_word,
//        rnd = {m, m', m1, m2, m3, m4} -> out_valid, ct_word
module masked_aes_top
  import aes_masked_pkg::*;
#(
  parameter int SBOX_STAGES = 3  // 3 (default) or 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] pt_word,
  input  logic [31:0] key_word,
  input  logic [47:0] rnd,
  output logic        out_valid,
  output logic [31:0] ct_word
);
  localparam int NR = 10;

  logic         blk_valid;
  logic [127:0] pt, key, ct;
  logic [47:0]  rnd_q;
  pipe_t        stage [0:NR];

  io_word_loader #(.WORD_W(32)) u_load (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pt_word(pt_word),
    .key_word(key_word), .rnd(rnd), .blk_valid(blk_valid), .pt(pt), .key(key),
    .rnd_q(rnd_q));

  aes_input_stage u_in (
    .clk(clk), .rst_n(rst_n), .blk_valid(blk_valid), .pt(pt), .key(key),
    .rnd(rnd_q), .out(stage[0]));

  for (genvar r = 1; r <= NR; r++) begin : g_round
    masked_round #(.ROUND(r), .NR(NR), .SBOX_STAGES(SBOX_STAGES)) u_round (
      .clk(clk), .rst_n(rst_n), .in(stage[r-1]), .out(stage[r]));
  end

  aes_output_stage u_out (.in(stage[NR]), .ct(ct));

  io_word_unloader #(.WORD_W(32)) u_unload (
    .clk(clk), .rst_n(rst_n), .blk_valid(stage[NR].valid), .ct(ct),
    .out_valid(out_valid), .ct_word(ct_word));
endmodule
