// Masked AES S-box in the composite field GF((2^4)^2), three pipeline stages.
//
// Function: given x ^ m (x and mask m already mapped into GF((2^4)^2)), the
// input mask m and an output mask m', it returns S(x) ^ m' (mapped) together
// with m'. The unmasked byte x never appears on a wire.
//
// How: x = xh*X + xl is inverted with the decomposition
//   d = LAMBDA*xh^2 + xh*xl + xl^2,  x^-1 = (xh*d^-1) X + ((xh+xl)*d^-1).
// Squarings are linear, so they act on the masked nibble and the mask
// separately; every product of two masked nibbles A = a ^ am, B = b ^ bm is
// formed as fresh ^ A*B ^ A*bm ^ B*am ^ am*bm = a*b ^ fresh, summed in that
// order so that no partial sum is unmasked. d is produced under the mask ml, its
// inverse comes from the masked table T4 (masked_gf4_inv) under the same mask,
// and the two output products leave x^-1 masked with m = mh*X + ml. The
// affine step maff'(y) + map(0x63) is linear: it is applied to the masked
// inverse, and the mask term maff'(m) is swapped for m' in one correction
// byte that is formed from masks only.
//
// Timing (STAGES = 3, the default): registers after d (stage 1), after the
// GF(2^4) inversion (stage 2) and after the output products (stage 3); the
// affine step is combinational after stage 3, so y_masked is valid 3 clocks
// after its input and should be registered by the user. STAGES = 6 is the
// deeper variant: it adds a register after the first product of d, one in the
// middle of the output products and one after the affine step, so y_masked
// comes straight from a register 6 clocks after its input. No enable, no
// reset: the pipeline advances every clock and valid flags travel beside it.
//
// The three (or six) inner stages, the masked GF(2^4) tables and the mapped
// affine transform follow the design; where the extra registers of the deep
// variant sit, and the exact product-correction formulas, are this
// implementation's choices.
module masked_sbox
  import aes_masked_pkg::*;
#(
  parameter int STAGES = 3  // 3 or 6
) (
  input  logic       clk,
  input  logic [7:0] x_masked,
  input  logic [7:0] m_in,
  input  logic [7:0] m_out,
  output logic [7:0] y_masked,
  output logic [7:0] m_out_q
);
  localparam bit DEEP = (STAGES == 6);

  // Product of two masked nibbles, (av, am) holding a ^ am and (bv, bm) holding
  // b ^ bm: r ^ A*B ^ A*bm ^ B*am ^ am*bm = a*b ^ r. The first half starts from
  // the mask r, the second half adds the two remaining terms; each partial sum
  // stays masked.
  function automatic logic [3:0] mmul_a(input logic [3:0] r,
                                        input logic [3:0] av, input logic [3:0] bv,
                                        input logic [3:0] bm);
    return (r ^ gf4_mul(av, bv)) ^ gf4_mul(av, bm);
  endfunction

  function automatic logic [3:0] mmul_b(input logic [3:0] r,
                                        input logic [3:0] am, input logic [3:0] bv,
                                        input logic [3:0] bm);
    return (r ^ gf4_mul(bv, am)) ^ gf4_mul(am, bm);
  endfunction

  typedef struct packed {
    logic [3:0] ah, al;  // masked nibbles of the input
    logic [3:0] mh, ml;  // their masks
    logic [3:0] d;       // partial d, then d ^ ml, then d^-1 ^ ml
    logic [3:0] ph, pl;  // partial output products (deep variant)
    logic [7:0] mo;      // output mask
  } stg_t;

  // ---- stage 1: masked d ----
  stg_t s0_c, s0, s1;
  always_comb begin
    s0_c    = '0;
    s0_c.ah = x_masked[7:4];
    s0_c.al = x_masked[3:0];
    s0_c.mh = m_in[7:4];
    s0_c.ml = m_in[3:0];
    s0_c.mo = m_out;
    // ah*al ^ ml
    s0_c.d  = mmul_b(mmul_a(m_in[3:0], x_masked[7:4], x_masked[3:0], m_in[3:0]),
                     m_in[7:4], x_masked[3:0], m_in[3:0]);
  end

  if (DEEP) begin : g_reg_a
    always_ff @(posedge clk) s0 <= s0_c;
  end else begin : g_wire_a
    assign s0 = s0_c;
  end

  stg_t s1_c;
  always_comb begin
    s1_c   = s0;
    s1_c.d = s1_c.d ^ gf4_mul(gf4_sq(s0.ah), LAMBDA);
    s1_c.d = s1_c.d ^ gf4_mul(gf4_sq(s0.mh), LAMBDA);
    s1_c.d = s1_c.d ^ gf4_sq(s0.al);
    s1_c.d = s1_c.d ^ gf4_sq(s0.ml);
  end

  always_ff @(posedge clk) s1 <= s1_c;

  // ---- stage 2: masked inversion in GF(2^4) ----
  stg_t       s2;
  logic [3:0] dinv_c;
  masked_gf4_inv u_t4 (.d_masked(s1.d), .mask(s1.ml), .inv_masked(dinv_c));

  always_ff @(posedge clk) begin
    s2   <= s1;
    s2.d <= dinv_c;
  end

  // ---- stage 3: output products, masked with (mh, ml) ----
  stg_t s2h_c, s2h;
  always_comb begin
    s2h_c    = s2;
    s2h_c.ph = mmul_a(s2.mh, s2.ah, s2.d, s2.ml);
    s2h_c.pl = mmul_a(s2.ml, s2.ah ^ s2.al, s2.d, s2.ml);
  end

  if (DEEP) begin : g_reg_b
    always_ff @(posedge clk) s2h <= s2h_c;
  end else begin : g_wire_b
    assign s2h = s2h_c;
  end

  logic [7:0] inv_q, corr_q, mo_q;
  always_ff @(posedge clk) begin
    inv_q  <= {mmul_b(s2h.ph, s2h.mh, s2h.d, s2h.ml),
               mmul_b(s2h.pl, s2h.mh ^ s2h.ml, s2h.d, s2h.ml)};
    corr_q <= maff_lin({s2h.mh, s2h.ml}) ^ s2h.mo ^ MAP_B;
    mo_q   <= s2h.mo;
  end

  // ---- affine step: maff'(x^-1 ^ m) ^ maff'(m) ^ m' ^ map(0x63) ----
  logic [7:0] y_c;
  assign y_c = maff_lin(inv_q) ^ corr_q;

  if (DEEP) begin : g_reg_c
    always_ff @(posedge clk) begin
      y_masked <= y_c;
      m_out_q  <= mo_q;
    end
  end else begin : g_wire_c
    assign y_masked = y_c;
    assign m_out_q  = mo_q;
  end

  initial assert (STAGES == 3 || STAGES == 6)
    else $fatal(1, "masked_sbox: STAGES must be 3 or 6");
endmodule
