// MixColumns of the masked state in the composite field GF((2^4)^2).
//
// Each column a0..a3 becomes b_r = 2*a_r + 3*a_(r+1) + a_(r+2) + a_(r+3),
// where 2 and 3 are the mapped constants map(0x02) = 0x26 and
// map(0x03) = 0x27. A byte S = Sh*x + Sl is scaled without a general
// multiplier, by nibble products only:
//   S*0x26 = (4Sh + 2Sl) x + (F*Sh + 6Sl),  S*0x27 = (5Sh + 2Sl) x + (F*Sh + 7Sl).
// MixColumns is linear, so it is applied to the masked state as it is; the
// masks change the same way and are tracked by the round. Combinational.
// The scaling formulas are the design's.
//
// Ports: st_in  - masked state, byte k at row k%4, column k/4
//        st_out - mixed state
module masked_mixcolumns
  import aes_masked_pkg::*;
(
  input  state_t st_in,
  output state_t st_out
);
  always_comb
    for (int c = 0; c < 4; c++) begin
      logic [3:0][7:0] col, mixed;
      for (int r = 0; r < 4; r++) col[r] = st_in[4*c + r];
      mixed = mix_column(col);
      for (int r = 0; r < 4; r++) st_out[4*c + r] = mixed[r];
    end
endmodule
