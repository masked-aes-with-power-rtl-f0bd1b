// Input stage of the masked cipher: field mapping, masking and the initial
// AddRoundKey, with one output register.
//
// The plaintext, the cipher key and the six random mask bytes are mapped from
// GF(2^8) into GF((2^4)^2), once per block. The mapped plaintext is masked
// with m and the mapped key is added (round 0). From the row masks m1..m4 it
// forms mc = MixColumns(m1..m4), the row masks each round holds after its
// MixColumns. The register output is the record that enters round 1: valid,
// masked state (mask m on every byte), round key 0 and the mask set.
//
// rnd = {m, m', m1, m2, m3, m4}, m in bits [47:40]. Only the valid flag is
// reset. Mapping the inputs once, outside the rounds, follows the design; the
// mask roles are this implementation's reading of its six random values.
//
// Ports: clk, rst_n, blk_valid, pt, key, rnd -> out (one clock later)
module aes_input_stage
  import aes_masked_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         blk_valid,
  input  logic [127:0] pt,
  input  logic [127:0] key,
  input  logic [47:0]  rnd,
  output pipe_t        out
);
  logic [15:0][7:0] pt_m, key_m;
  logic [5:0][7:0]  rnd_m;

  iso_map #(.NBYTES(16)) u_map_pt  (.x(pt),  .y(pt_m));
  iso_map #(.NBYTES(16)) u_map_key (.x(key), .y(key_m));
  iso_map #(.NBYTES(6))  u_map_rnd (.x(rnd), .y(rnd_m));

  pipe_t nxt;
  always_comb begin
    nxt.valid = blk_valid;
    nxt.mk.m  = rnd_m[5];
    nxt.mk.mp = rnd_m[4];
    for (int r = 0; r < 4; r++) nxt.mk.mr[r] = rnd_m[3 - r];
    nxt.mk.mc = mix_column(nxt.mk.mr);
    for (int k = 0; k < 16; k++) begin
      nxt.key[k] = key_m[15 - k];
      nxt.st[k]  = (pt_m[15 - k] ^ nxt.mk.m) ^ key_m[15 - k];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out.valid <= 1'b0;
    else        out.valid <= nxt.valid;
    out.st  <= nxt.st;
    out.key <= nxt.key;
    out.mk  <= nxt.mk;
  end
endmodule
