# Masked AES-128: unrolled, pipelined and computed in GF((2^4)^2)

This is an AES-128 encryptor for bulk data, such as the disk traffic of a storage
network. It is hardened against differential power analysis (DPA) by Boolean
masking. The plaintext and every intermediate value are XORed with random masks,
so the switching activity of the datapath does not follow the secret state. The
linear AES steps (ShiftRows, MixColumns, AddRoundKey) work directly on masked
data. Only the S-box needs a special masked circuit.

Two decisions keep the masked S-box cheap and the throughput high:

* **Everything runs in the composite field GF((2^4)^2).** The masked inversion
  is built from 4-bit operations, and no 8-bit masked tables are needed. The
  plaintext, key and masks are mapped into the composite field once, at the
  input. The ciphertext is mapped back once, at the output. No round holds a
  mapping step.
* **All ten rounds are unrolled and pipelined.** Each round has six register
  stages: three inside the S-box, then one after SubBytes, one after ShiftRows
  and one at the round output. The key expansion runs beside the data, one
  stage per round. Each block carries its own key and masks. At the full input
  rate about sixteen blocks are in flight at once.

Plaintext, key and ciphertext pass through 32-bit ports, one word per clock.
This cuts the pin count, and it sets the block rate: one block every four
clocks.

## The composite field

A byte is held as `Sh*X + Sl`, with the high nibble `Sh` in bits [7:4]:

* GF(2^4) is reduced modulo `x^4 + x + 1`.
* The extension is reduced modulo `X^2 + X + 0xE`.

The isomorphism from the AES field (modulo `0x11B`) sends `2^i` to `0x26^i`. Its
8x8 bit matrix has the columns `01 26 4A 40 39 D1 31 E4`. The inverse matrix has
the columns `01 5C E0 50 FF BE 08 D6`.

This choice makes `map(0x02) = 0x26` and `map(0x03) = 0x27`. With those two
values, the MixColumns multipliers reduce to nibble operations:

    S * 0x26 = (4*Sh + 2*Sl) X + (F*Sh + 6*Sl)
    S * 0x27 = (5*Sh + 2*Sl) X + (F*Sh + 7*Sl)

The AES affine step becomes `y -> maff'(y) ^ 0xC7` in the composite field:

* `maff' = map * A * map^-1`, where `A` is the linear part of the AES affine
  transform.
* `0xC7 = map(0x63)`.

All of these are XOR networks, written as functions in `aes_masked_pkg`.

## Masks: six random bytes per block

Each block comes with six random bytes `rnd = {m, m', m1, m2, m3, m4}`:

| mask | role |
|------|------|
| `m`  | S-box input mask: every state byte carries it at the start of a round |
| `m'` | S-box output mask |
| `m1..m4` | row masks that the state is moved to before MixColumns |

The input stage also derives `mc = MixColumns(m1..m4)`. These are the row masks
that remain after MixColumns. The masks are mapped with the data and travel with
their block through the pipeline.

The mask of every state byte through one round:

| point in the round | mask on row r | done by |
|---|---|---|
| round input | `m` | previous AddRoundKey (or the input stage) |
| after SubBytes | `m'` | masked S-box |
| after ShiftRows + remask | `m_r` | XOR of `m' ^ m_r` into row r |
| after MixColumns | `mc_r` | linearity |
| after AddRoundKey | `m` | XOR of round key and `mc_r ^ m` |

The remask before MixColumns is needed. MixColumns adds bytes of one column
together. If all of them carried the same mask, the masks would cancel in those
sums. In round 10 there is no MixColumns: the remask and the correction are
zero, so the state leaves masked with `m'`. The output stage removes `m'`.

Each correction byte is formed from masks only and is XORed in before the key.
Every XOR sum written in the data path carries a random mask. The only
exceptions are the public plaintext and ciphertext, and the unmasked key path.

## The masked S-box (`masked_sbox`)

This is the subtle part. The input is `a ^ m`, with mask `m = mh*X + ml`, both
in the composite field. The unmasked inverse would be:

    d   = 0xE*ah^2 + ah*al + al^2
    a^-1 = (ah * d^-1) X + ((ah + al) * d^-1)

Squaring is linear, so it acts on the masked nibble and on its mask separately.
For a product of two masked nibbles `(A = a ^ am)` and `(B = b ^ bm)`, the
design forms:

    A*B ^ A*bm ^ B*am ^ am*bm

This leaves `a*b`. The design starts each such sum from a mask byte and adds
the four terms one at a time, so no partial sum is unmasked. The S-box works in
four steps:

1. **Stage 1** computes `d ^ ml`.
2. **Stage 2** looks up `d^-1 ^ ml` in the table T4 (`masked_gf4_inv`). T4 has
   256 entries of 4 bits and is addressed by the masked nibble and its mask.
   The table is filled at elaboration. In hardware it is a ROM, or a LUT
   network after synthesis.
3. **Stage 3** forms `ah*d^-1 ^ mh` and `(ah^al)*d^-1 ^ ml`, which is
   `a^-1 ^ m`. It also registers one correction byte, `maff'(m) ^ m' ^ 0xC7`,
   built from masks only.
4. **After stage 3**, `y = maff'(a^-1 ^ m) ^ correction` is combinational and
   equals `S(a) ^ m'`. The round registers it (the "after SubBytes" stage).

The output mask `m'` is returned alongside the data.

## Pipeline and timing

```
 pt/key words ─► io_word_loader ─► aes_input_stage ─► round 1 … round 10 ─► aes_output_stage ─► io_word_unloader ─► ct words
                 (4 clocks)         (1 register)       (6 registers each)    (comb.)              (1 register)
```

Inside `masked_round`:

```
 S-box: d | T4 | products ─► affine ─► [after SubBytes] ─► ShiftRows+remask ─► [after ShiftRows]
        ─► MixColumns ─► AddRoundKey+correction ─► [round output]
 key:  key_expand_stage (1 register) ─► 5 delay registers
```

A deeper S-box is available with `SBOX_STAGES = 6`, a parameter of
`masked_aes_top`, `masked_round` and `masked_sbox` (there called `STAGES`). It
adds three registers:

* one after the first masked product of `d`;
* one in the middle of the output products;
* one after the affine step, so `y_masked` leaves a register.

A round then has nine registers. The top-level latency becomes 96 clocks. The
default is three.

Latency and rate (default configuration):

* The first ciphertext word appears **66 clocks** after the first plaintext word
  is presented: 4 (loading) + 1 (input stage) + 60 (rounds) + 1 (output
  register).
* If the words of a block arrive with gaps, the first ciphertext word comes 63
  clocks after the fourth plaintext word.
* The core accepts a block every clock. The 32-bit ports limit the rate to one
  block every four clocks, which is 32 bits of ciphertext per clock.

## Key schedule

`key_expand_stage` computes round key r from round key r-1 in one clocked step.
It works in the composite field, using the unmasked composite S-box and the
mapped round constant. The cipher key enters through the ports with every block,
so each block can use a different key. There is no key set-up phase. Each round
key travels with its block to the AddRoundKey of its round.

## Interface (`masked_aes_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all registers on the rising edge |
| `rst_n` | in | 1 | synchronous, active low; clears valid flags and counters (the datapath is not reset) |
| `in_valid` | in | 1 | `pt_word` and `key_word` hold a word |
| `pt_word`, `key_word` | in | 32 | plaintext and key, four words per block, column 0 (most significant) first |
| `rnd` | in | 48 | `{m, m', m1, m2, m3, m4}`, sampled with the fourth word |
| `out_valid` | out | 1 | `ct_word` holds a ciphertext word |
| `ct_word` | out | 32 | ciphertext, four consecutive words, column 0 first |

Input words may have idle clocks between them. There is no back-pressure, and
none is needed: output blocks cannot come faster than input blocks, and the
serializer frees its register in the clock the next block arrives. An assertion
in `io_word_unloader` checks this.

## Modules

| module | what it is |
|---|---|
| `aes_masked_pkg` | types (`state_t`, `mask_set_t`, `pipe_t`), GF(2^4)/composite arithmetic, isomorphism, `maff'`, MixColumns scaling |
| `masked_aes_top` | the whole encryptor |
| `io_word_loader` / `io_word_unloader` | 32-bit to 128-bit and back |
| `aes_input_stage` | mapping of data, key and masks; masking; round-0 AddRoundKey; `mc` masks |
| `masked_round` | one pipelined round (`ROUND`, `NR` parameters; round `NR` has no MixColumns) |
| `masked_sbox`, `masked_gf4_inv` | masked S-box and its T4 table |
| `masked_shiftrows`, `masked_mixcolumns`, `masked_add_round_key` | the linear steps on masked data |
| `key_expand_stage` | one registered key-expansion step |
| `iso_map`, `iso_inv_map` | byte-wise field mapping, `NBYTES` wide |
| `aes_output_stage` | removal of `m'` and inverse mapping |

After generic synthesis, the top has about 50,000 word-level cells and 17,000
flip-flops. The 160 T4 tables come to 164 kbit of ROM.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Every testbench
prints `TB_RESULT checks=N failures=M`. The testbenches compare against
`tb/aes_ref_pkg.sv`, which is written independently of the RTL. It contains two
models:

* plain FIPS-197 AES in GF(2^8);
* a separate composite-field model, whose isomorphism comes from powers of
  0x26 and is inverted by search.

The end-to-end test is `tb_masked_aes_top`. It runs the top with its default
parameters and covers:

* the FIPS-197 vectors (Appendix B and C.1), unmasked and masked;
* 65 random blocks with random keys and masks;
* the same block under different masks;
* the 66-clock latency on every block;
* back-to-back blocks, gaps inside and between blocks, zero and non-zero masks,
  and at least ten blocks in flight at once;
* a sustained full rate: ciphertext words on every clock for eight blocks in a
  row.

To run a testbench with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/aes_masked_pkg.sv tb/aes_ref_pkg.sv \
    tb/tb_masked_aes_top.sv --top-module tb_masked_aes_top
./obj_dir/Vtb_masked_aes_top
```

`tb_masked_aes_top_deep` runs the same test with `SBOX_STAGES = 6` and checks
a latency of 96. The S-box and round testbenches cover both depths. Each
top-level test builds in about half a minute and runs in under a second.

## Limits and departures

* **Masking is functional, not proven secure.** The masked values are correct,
  and the RTL orders its XORs so that no written partial sum is unmasked.
  The masks are reused, though: `ml` masks both `d` and its inputs. Glitches in the
  combinational S-box logic, and what a synthesis tool makes of the XOR trees,
  can still leak. Do not treat this code as DPA-resistant silicon without
  analysis and measurement on the target.
* **The key schedule is not masked.** Only the data path is protected.
* **The masks are inputs.** The random number generator is outside this design.
  The six bytes per block are the minimum scheme: every byte shares `m`, and
  every row shares `m_r`.
* **Deep variant.** In the six-register S-box, the three extra registers sit
  after the first masked product of `d`, in the middle of the output products,
  and after the affine step. This placement is a choice of this design.
* **Resources and power.** No FPGA figures are reproduced. The fully unrolled
  pipeline needs about 17,000 flip-flops, most of them carrying round keys and
  masks beside the state.
* **Throughput.** At 32 bits per clock through the ports, 40 Gbit/s would need
  a clock of about 1.3 GHz. The 128-bit core alone would reach it at about
  320 MHz.
* **Choices of this design, not inherited:**
  * the polynomial basis and the isomorphism;
  * the word order and when the masks are sampled;
  * the reset scheme;
  * the exact correction formulas in the masked products;
  * where the remask sits (together with ShiftRows).
