// Isomorphic mapping from the AES field GF(2^8) into the composite field
// GF((2^4)^2), applied to NBYTES bytes in parallel.
//
// Each output byte is an 8x8 bit-matrix product of its input byte: bit i of
// the input selects column map(2^i) = BETA^i, BETA = 0x26, and the selected
// columns are XORed. The mapped byte holds Sh*x + Sl with Sh in bits [7:4].
// Purely combinational. The mapping step, and the idea of doing it only once
// at the cipher input, follow the design; the concrete matrix is the one fixed
// by the design's MixColumns constants (map(0x02) = 0x26).
//
// Ports: x  - NBYTES bytes in GF(2^8), byte 0 in the top bits
//        y  - the same bytes in GF((2^4)^2)
module iso_map
  import aes_masked_pkg::*;
#(
  parameter int NBYTES = 16
) (
  input  logic [NBYTES-1:0][7:0] x,
  output logic [NBYTES-1:0][7:0] y
);
  always_comb
    for (int i = 0; i < NBYTES; i++) y[i] = iso_fwd(x[i]);
endmodule
