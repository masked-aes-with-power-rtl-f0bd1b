// Masked inversion in GF(2^4) (table T4 of the masked S-box).
//
// Input is a masked nibble d ^ md and its mask md (8 address bits); output is
// d^-1 ^ md, the inverse carried under the same mask (0 maps to 0). The table
// has 256 entries of 4 bits and is filled at elaboration from the GF(2^4)
// arithmetic (x^4 + x + 1), so the unmasked value is never a wire of the
// design: the lookup is addressed only by the masked nibble and the mask.
// Purely combinational.
//
// Ports: d_masked   - d ^ md
//        mask       - md
//        inv_masked - d^-1 ^ md
module masked_gf4_inv
  import aes_masked_pkg::*;
(
  input  logic [3:0] d_masked,
  input  logic [3:0] mask,
  output logic [3:0] inv_masked
);
  function automatic logic [255:0][3:0] build_t4();
    logic [255:0][3:0] t;
    for (int a = 0; a < 256; a++) begin
      logic [3:0] dm, mm;
      dm   = 4'(a >> 4);
      mm   = 4'(a);
      t[a] = gf4_inv(dm ^ mm) ^ mm;
    end
    return t;
  endfunction

  localparam logic [255:0][3:0] T4 = build_t4();

  assign inv_masked = T4[{d_masked, mask}];
endmodule
