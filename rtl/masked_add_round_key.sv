// Masked AddRoundKey.
//
// XORs the round key (mapped, unmasked) into the masked state, together with
// a per-row correction byte formed from masks only. With corr[r] =
// MixColumns(m1..m4)[r] ^ m the state, masked with the post-MixColumns row
// masks on entry, leaves masked with the S-box input mask m for every byte,
// ready for the next round. In the last round corr is zero and the state
// keeps the mask m'. The correction is added before the key so that no
// partial sum is an unmasked value. Combinational.
//
// Ports: st_in  - masked state
//        rk     - round key in GF((2^4)^2)
//        corr   - per-row mask correction, index = row
//        st_out - result
module masked_add_round_key
  import aes_masked_pkg::*;
(
  input  state_t          st_in,
  input  state_t          rk,
  input  logic [3:0][7:0] corr,
  output state_t          st_out
);
  always_comb
    for (int k = 0; k < 16; k++) st_out[k] = (st_in[k] ^ corr[k % 4]) ^ rk[k];
endmodule
