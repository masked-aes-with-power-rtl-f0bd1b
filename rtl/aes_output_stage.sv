// Output stage of the masked cipher: unmasking and inverse field mapping.
//
// After round 10 every state byte is masked with m'. The stage removes m'
// and maps the 16 bytes back from GF((2^4)^2) to GF(2^8), once per block,
// giving the ciphertext. Combinational; the register that follows it is the
// output serializer. Mapping back once at the end follows the design. Only
// the state and m' are read from the record: the valid flag is used by the
// serializer, and the round key and the other masks end here unused.
//
// Ports: in (record leaving round 10) -> ct (ciphertext, byte 0 in bits
//        [127:120])
module aes_output_stage
  import aes_masked_pkg::*;
(
  input  pipe_t        in,
  output logic [127:0] ct
);
  logic [15:0][7:0] y;
  always_comb
    for (int k = 0; k < 16; k++) y[15 - k] = in.st[k] ^ in.mk.mp;

  iso_inv_map #(.NBYTES(16)) u_imap (.y(y), .x(ct));
endmodule
