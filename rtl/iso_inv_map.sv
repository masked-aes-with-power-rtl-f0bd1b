// Inverse isomorphic mapping from the composite field GF((2^4)^2) back to
// the AES field GF(2^8), applied to NBYTES bytes in parallel.
//
// Each output byte is the product of its input byte with the inverse of the
// forward mapping matrix (columns map^-1(2^i)), an XOR network. Purely
// combinational. The design applies it once, to the ciphertext at the end of
// the pipeline; the matrix is the inverse of the one used by iso_map.
//
// Ports: y  - NBYTES bytes in GF((2^4)^2), byte 0 in the top bits
//        x  - the same bytes in GF(2^8)
module iso_inv_map
  import aes_masked_pkg::*;
#(
  parameter int NBYTES = 16
) (
  input  logic [NBYTES-1:0][7:0] y,
  output logic [NBYTES-1:0][7:0] x
);
  always_comb
    for (int i = 0; i < NBYTES; i++) x[i] = iso_bwd(y[i]);
endmodule
