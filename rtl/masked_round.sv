// One unrolled round of the masked AES-128 pipeline.
//
// Data path, all in GF((2^4)^2), every byte masked:
//   16 masked S-boxes (SBOX_STAGES registers)  mask m  -> m'
//   register "after sub-byte"                  (stage 4)
//   ShiftRows + remask of row r by m' ^ m_r    mask m' -> m_r
//   register "after shift-row"                 (stage 5)
//   MixColumns (rounds 1..9 only)              mask m_r -> mc_r
//   AddRoundKey with correction mc_r ^ m       mask mc_r -> m
//   register at the round output               (stage 6)
// In the last round (FINAL) MixColumns is left out, remask and correction
// are zero, and the state leaves masked with m'.
//
// Side band: the key expansion stage for this round runs in the first clock
// of the round; the new round key, the block's masks and the valid flag are
// delayed beside the data so that everything leaves together.
//
// Timing: LAT = SBOX_STAGES + 3 clocks from in to out (6 by default, 9 for
// the deep S-box), one new block may enter every clock. Only the valid flags are reset (synchronous, active low).
//
// The unrolled round with registers after SubBytes, after ShiftRows and at
// the output, three (or six) more inside the S-box, and a one-stage key
// generation, follows the design; the mask bookkeeping is this
// implementation's.
//
// Ports: clk, rst_n, in (record entering the round), out (record leaving)
module masked_round
  import aes_masked_pkg::*;
#(
  parameter int ROUND = 1,
  parameter int NR    = 10,
  parameter int SBOX_STAGES = 3  // 3 or 6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  pipe_t in,
  output pipe_t out
);
  localparam int  LAT   = SBOX_STAGES + 3;
  localparam int  SB    = SBOX_STAGES;
  localparam bit  FINAL = (ROUND == NR);

  // ---- side band ----
  logic      [1:LAT] vld;
  mask_set_t         mks  [1:LAT];
  state_t            keys [1:LAT];

  key_expand_stage #(.ROUND(ROUND)) u_key (.clk(clk), .key_in(in.key), .key_out(keys[1]));

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {in.valid, vld[1:LAT-1]};
    mks[1] <= in.mk;
    for (int i = 2; i <= LAT; i++) mks[i] <= mks[i-1];
    for (int i = 2; i <= LAT; i++) keys[i] <= keys[i-1];
  end

  // ---- SubBytes ----
  state_t sb_c, sb_q;
  for (genvar k = 0; k < 16; k++) begin : g_sbox
    logic [7:0] mo_unused;
    masked_sbox #(.STAGES(SBOX_STAGES)) u_sbox (
      .clk      (clk),
      .x_masked (in.st[k]),
      .m_in     (in.mk.m),
      .m_out    (in.mk.mp),
      .y_masked (sb_c[k]),
      .m_out_q  (mo_unused)
    );
  end

  always_ff @(posedge clk) sb_q <= sb_c;  // after sub-byte (stage SB+1)

  // ---- ShiftRows + remask ----
  logic [3:0][7:0] remask;
  state_t          sr_c, sr_q;
  always_comb
    for (int r = 0; r < 4; r++) remask[r] = FINAL ? 8'h00 : (mks[SB+1].mp ^ mks[SB+1].mr[r]);

  masked_shiftrows u_sr (.st_in(sb_q), .remask(remask), .st_out(sr_c));

  always_ff @(posedge clk) sr_q <= sr_c;  // after shift-row

  // ---- MixColumns + AddRoundKey ----
  state_t          mc_c, ark_in, ark_c, st_q;
  logic [3:0][7:0] corr;
  masked_mixcolumns u_mc (.st_in(sr_q), .st_out(mc_c));

  always_comb begin
    ark_in = FINAL ? sr_q : mc_c;
    for (int r = 0; r < 4; r++) corr[r] = FINAL ? 8'h00 : (mks[SB+2].mc[r] ^ mks[SB+2].m);
  end

  masked_add_round_key u_ark (.st_in(ark_in), .rk(keys[SB+2]), .corr(corr), .st_out(ark_c));

  always_ff @(posedge clk) st_q <= ark_c;  // round output

  assign out = '{valid: vld[LAT], st: st_q, key: keys[LAT], mk: mks[LAT]};
endmodule
