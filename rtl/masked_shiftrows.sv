// ShiftRows on the masked state, followed by remasking of every row.
//
// ShiftRows is linear, so it is applied to the masked state unchanged: row r
// rotates left by r byte positions. After the S-boxes all 16 bytes carry the
// same mask m'; MixColumns would then cancel the mask when it adds bytes of
// one column, so each row r is XORed with remask[r] = m' ^ m_r to move it to
// its own row mask m_r. In the last round remask is zero (no MixColumns).
// Purely combinational; the round registers its output ("after shift-row").
//
// The ShiftRows step follows the design; the remask folded into it is this
// implementation's reading of the six-mask scheme.
//
// Ports: st_in  - masked state, byte k at row k%4, column k/4
//        remask - per-row remask byte, index = row
//        st_out - shifted, remasked state
module masked_shiftrows
  import aes_masked_pkg::*;
(
  input  state_t          st_in,
  input  logic [3:0][7:0] remask,
  output state_t          st_out
);
  always_comb
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        st_out[4*c + r] = st_in[4*((c + r) % 4) + r] ^ remask[r];
endmodule
