// Shared types and field arithmetic for the masked AES-128 pipeline.
//
// The whole cipher runs in the composite field GF((2^4)^2): a byte is held
// as Sh*x + Sl with the high nibble Sh in bits [7:4]. GF(2^4) is built modulo
// x^4 + x + 1 and GF((2^4)^2) modulo x^2 + x + LAMBDA with LAMBDA = 0xE. The
// isomorphism from the AES field GF(2^8)/{11B} sends 2^i to BETA^i with
// BETA = 0x26, which makes map(0x02) = 0x26 and map(0x03) = 0x27, the
// MixColumns scaling factors of the design. The map, its inverse and the
// mapped affine transform maff'(y) = map(A(map^-1(y))) are written as XOR
// networks (functions below), so they synthesize to plain logic.
//
// A pipeline record (pipe_t) travels through the rounds: valid flag, masked
// state, current round key and the six masks of the block. All values in it
// are in the mapped field. State byte k (0..15, FIPS-197 order) is
// state_t[k]: row k%4, column k/4; byte 0 is the most significant byte.
//
// Mask scheme (six random bytes per block): m is the S-box input mask, mp
// (m') its output mask, mr[0..3] (m1..m4) mask row r before MixColumns, and
// mc[r] = MixColumns(m1..m4)[r] is the row mask after MixColumns. These
// choices are this design's reading of the six random values it needs.
package aes_masked_pkg;

  typedef logic [0:15][7:0] state_t;

  typedef struct packed {
    logic [7:0]       m;   // S-box input mask
    logic [7:0]       mp;  // S-box output mask m'
    logic [3:0][7:0]  mr;  // row masks m1..m4 before MixColumns (index = row)
    logic [3:0][7:0]  mc;  // row masks after MixColumns
  } mask_set_t;

  typedef struct packed {
    logic      valid;
    state_t    st;   // masked state
    state_t    key;  // round key of the previous round (unmasked, mapped)
    mask_set_t mk;
  } pipe_t;

  localparam logic [3:0] LAMBDA = 4'hE;
  localparam logic [7:0] MAP_B  = 8'hC7;  // map(0x63), the affine constant

  // Column images of the isomorphism: map(2^i) = BETA^i, BETA = 0x26.
  localparam logic [0:7][7:0] MAP_COLS =
    {8'h01, 8'h26, 8'h4A, 8'h40, 8'h39, 8'hD1, 8'h31, 8'hE4};
  // Column images of the inverse map: map^-1 of bit i.
  localparam logic [0:7][7:0] IMAP_COLS =
    {8'h01, 8'h5C, 8'hE0, 8'h50, 8'hFF, 8'hBE, 8'h08, 8'hD6};

  // ---- GF(2^4) modulo x^4 + x + 1 (tables T1..T3 of the design) ----
  function automatic logic [3:0] gf4_mul(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] r, aa;
    r  = '0;
    aa = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) r ^= aa;
      aa = {aa[2:0], 1'b0} ^ (aa[3] ? 4'b0011 : 4'b0000);
    end
    return r;
  endfunction

  function automatic logic [3:0] gf4_sq(input logic [3:0] a);
    return gf4_mul(a, a);
  endfunction

  // a^-1 = a^14 (0 maps to 0)
  function automatic logic [3:0] gf4_inv(input logic [3:0] a);
    logic [3:0] a2, a4, a8;
    a2 = gf4_sq(a);
    a4 = gf4_sq(a2);
    a8 = gf4_sq(a4);
    return gf4_mul(gf4_mul(a8, a4), a2);
  endfunction

  // ---- GF((2^4)^2) modulo x^2 + x + LAMBDA ----
  function automatic logic [7:0] gf8c_mul(input logic [7:0] a, input logic [7:0] b);
    logic [3:0] hh, h, l;
    hh = gf4_mul(a[7:4], b[7:4]);
    h  = hh ^ gf4_mul(a[7:4], b[3:0]) ^ gf4_mul(a[3:0], b[7:4]);
    l  = gf4_mul(hh, LAMBDA) ^ gf4_mul(a[3:0], b[3:0]);
    return {h, l};
  endfunction

  // Unmasked composite-field inverse (used by the key schedule).
  function automatic logic [7:0] gf8c_inv(input logic [7:0] a);
    logic [3:0] d, di;
    d  = gf4_mul(gf4_sq(a[7:4]), LAMBDA) ^ gf4_mul(a[7:4], a[3:0]) ^ gf4_sq(a[3:0]);
    di = gf4_inv(d);
    return {gf4_mul(a[7:4], di), gf4_mul(a[7:4] ^ a[3:0], di)};
  endfunction

  // ---- isomorphism and affine transform ----
  function automatic logic [7:0] iso_fwd(input logic [7:0] x);
    logic [7:0] y;
    y = '0;
    for (int i = 0; i < 8; i++) if (x[i]) y ^= MAP_COLS[i];
    return y;
  endfunction

  function automatic logic [7:0] iso_bwd(input logic [7:0] y);
    logic [7:0] x;
    x = '0;
    for (int i = 0; i < 8; i++) if (y[i]) x ^= IMAP_COLS[i];
    return x;
  endfunction

  // Linear part A of the AES affine transform in GF(2^8).
  function automatic logic [7:0] aes_affine_lin(input logic [7:0] x);
    logic [7:0] y;
    for (int i = 0; i < 8; i++)
      y[i] = x[i] ^ x[(i+4)%8] ^ x[(i+5)%8] ^ x[(i+6)%8] ^ x[(i+7)%8];
    return y;
  endfunction

  // maff' = map * A * map^-1, the linear part of the affine step in the mapped field.
  function automatic logic [7:0] maff_lin(input logic [7:0] y);
    return iso_fwd(aes_affine_lin(iso_bwd(y)));
  endfunction

  // Unmasked S-box in the mapped field (key schedule).
  function automatic logic [7:0] sbox_mapped(input logic [7:0] y);
    return maff_lin(gf8c_inv(y)) ^ MAP_B;
  endfunction

  // ---- MixColumns scaling in the mapped field ----
  // S * map(0x02) = (4Sh + 2Sl) x + (F*Sh + 6Sl)
  function automatic logic [7:0] scale2(input logic [7:0] s);
    return {gf4_mul(4'h4, s[7:4]) ^ gf4_mul(4'h2, s[3:0]),
            gf4_mul(4'hF, s[7:4]) ^ gf4_mul(4'h6, s[3:0])};
  endfunction

  // S * map(0x03) = (5Sh + 2Sl) x + (F*Sh + 7Sl)
  function automatic logic [7:0] scale3(input logic [7:0] s);
    return {gf4_mul(4'h5, s[7:4]) ^ gf4_mul(4'h2, s[3:0]),
            gf4_mul(4'hF, s[7:4]) ^ gf4_mul(4'h7, s[3:0])};
  endfunction

  function automatic logic [3:0][7:0] mix_column(input logic [3:0][7:0] a);
    logic [3:0][7:0] b;
    for (int r = 0; r < 4; r++)
      b[r] = scale2(a[r]) ^ scale3(a[(r+1)%4]) ^ a[(r+2)%4] ^ a[(r+3)%4];
    return b;
  endfunction

  // Round constant of round r (1..10) in GF(2^8), before mapping.
  function automatic logic [7:0] rcon(input int r);
    logic [7:0] c;
    c = 8'h01;
    for (int i = 1; i < r; i++) c = {c[6:0], 1'b0} ^ (c[7] ? 8'h1B : 8'h00);
    return c;
  endfunction

endpackage
