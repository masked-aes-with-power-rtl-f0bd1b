// One registered step of the AES-128 key expansion, in GF((2^4)^2).
//
// From round key ROUND-1 (words w0..w3, w0 = column 0) it forms round key
// ROUND: t = SubWord(RotWord(w3)) ^ map(Rcon[ROUND]), w0' = w0 ^ t,
// w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'. SubWord uses the S-box of
// the mapped field (composite inversion plus maff'), so the key never leaves
// the mapped field and round keys need no mapping of their own.
//
// Timing: one register, key_out is valid one clock after key_in. Ten of
// these, one per round, form the pipelined key generation; each round key
// travels with its data block. The key path is not masked.
//
// Ports: clk, key_in (previous round key), key_out (this round key)
module key_expand_stage
  import aes_masked_pkg::*;
#(
  parameter int ROUND = 1
) (
  input  logic   clk,
  input  state_t key_in,
  output state_t key_out
);
  localparam logic [7:0] RC = iso_fwd(rcon(ROUND));

  state_t nxt;
  always_comb begin
    logic [3:0][7:0] t;  // index = row
    for (int r = 0; r < 4; r++) t[r] = sbox_mapped(key_in[12 + (r + 1) % 4]);
    t[0] ^= RC;
    for (int r = 0; r < 4; r++) nxt[r] = key_in[r] ^ t[r];
    for (int k = 4; k < 16; k++) nxt[k] = key_in[k] ^ nxt[k - 4];
  end

  always_ff @(posedge clk) key_out <= nxt;
endmodule
