// Reference models for the testbenches, written independently of the RTL
// package: plain AES-128 in GF(2^8) (FIPS-197), plus a composite-field model
// GF((2^4)^2) (x^4 + x + 1, x^2 + x + 0xE) whose isomorphism is built from
// powers of BETA = 0x26 and inverted by search.
package aes_ref_pkg;

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r;
    r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] ginv(input logic [7:0] a);  // a^254
    logic [7:0] r;
    r = 8'h01;
    for (int i = 0; i < 254; i++) r = gmul(r, a);
    return r;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    logic [7:0] v, y;
    v = ginv(x);
    for (int i = 0; i < 8; i++)
      y[i] = v[i] ^ v[(i+4)%8] ^ v[(i+5)%8] ^ v[(i+6)%8] ^ v[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  function automatic logic [7:0] getb(input logic [127:0] s, input int k);
    return s[127-8*k -: 8];
  endfunction

  function automatic logic [127:0] setb(input logic [127:0] s, input int k, input logic [7:0] v);
    s[127-8*k -: 8] = v;
    return s;
  endfunction

  function automatic logic [127:0] sub_bytes(input logic [127:0] s);
    for (int k = 0; k < 16; k++) s = setb(s, k, sbox(getb(s, k)));
    return s;
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) o = setb(o, 4*c + r, getb(s, 4*((c+r)%4) + r));
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = getb(s, 4*c); a1 = getb(s, 4*c+1); a2 = getb(s, 4*c+2); a3 = getb(s, 4*c+3);
      o = setb(o, 4*c,   gmul(2,a0) ^ gmul(3,a1) ^ a2 ^ a3);
      o = setb(o, 4*c+1, a0 ^ gmul(2,a1) ^ gmul(3,a2) ^ a3);
      o = setb(o, 4*c+2, a0 ^ a1 ^ gmul(2,a2) ^ gmul(3,a3));
      o = setb(o, 4*c+3, gmul(3,a0) ^ a1 ^ a2 ^ gmul(2,a3));
    end
    return o;
  endfunction

  // round key r (1..10) from round key r-1
  function automatic logic [127:0] next_key(input logic [127:0] k, input int r);
    logic [31:0] w [4];
    logic [31:0] t;
    logic [7:0]  rc;
    rc = 8'h01;
    for (int i = 1; i < r; i++) rc = gmul(rc, 8'h02);
    for (int i = 0; i < 4; i++) w[i] = k[127-32*i -: 32];
    t = {sbox(w[3][23:16]) ^ rc, sbox(w[3][15:8]), sbox(w[3][7:0]), sbox(w[3][31:24])};
    w[0] ^= t; w[1] ^= w[0]; w[2] ^= w[1]; w[3] ^= w[2];
    return {w[0], w[1], w[2], w[3]};
  endfunction

  function automatic logic [127:0] round_fn(input logic [127:0] s, input logic [127:0] rk,
                                            input bit final_round);
    s = shift_rows(sub_bytes(s));
    if (!final_round) s = mix_columns(s);
    return s ^ rk;
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] s, k;
    k = key;
    s = pt ^ k;
    for (int r = 1; r <= 10; r++) begin
      k = next_key(k, r);
      s = round_fn(s, k, r == 10);
    end
    return s;
  endfunction

  // ---- composite field model ----
  function automatic logic [3:0] m4(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] r;
    r = 0;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) r ^= a;
      a = {a[2:0], 1'b0} ^ (a[3] ? 4'h3 : 4'h0);
    end
    return r;
  endfunction

  function automatic logic [3:0] inv4(input logic [3:0] a);
    for (int c = 1; c < 16; c++) if (m4(a, 4'(c)) == 4'h1) return 4'(c);
    return 4'h0;
  endfunction

  function automatic logic [7:0] cmul(input logic [7:0] a, input logic [7:0] b);
    logic [3:0] hh;
    hh = m4(a[7:4], b[7:4]);
    return {hh ^ m4(a[7:4], b[3:0]) ^ m4(a[3:0], b[7:4]),
            m4(hh, 4'hE) ^ m4(a[3:0], b[3:0])};
  endfunction

  function automatic logic [7:0] map_b(input logic [7:0] x);
    logic [7:0] p, y;
    p = 8'h01; y = 0;
    for (int i = 0; i < 8; i++) begin
      if (x[i]) y ^= p;
      p = cmul(p, 8'h26);
    end
    return y;
  endfunction

  function automatic logic [7:0] imap_b(input logic [7:0] y);
    for (int x = 0; x < 256; x++) if (map_b(8'(x)) == y) return 8'(x);
    return 8'h00;
  endfunction

  function automatic logic [127:0] map_s(input logic [127:0] s);
    for (int k = 0; k < 16; k++) s = setb(s, k, map_b(getb(s, k)));
    return s;
  endfunction

  function automatic logic [127:0] imap_s(input logic [127:0] s);
    for (int k = 0; k < 16; k++) s = setb(s, k, imap_b(getb(s, k)));
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
