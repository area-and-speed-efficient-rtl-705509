# AES-256 with logic-gate S-boxes in a composite Galois field

This is an AES-256 encryption and decryption core in which every S-box is
computed with logic rather than read from a 256-entry table. A byte is mapped
from GF(2^8) into the composite field GF((2^4)^2). There it is inverted using
only 4-bit arithmetic, then mapped back and passed through the AES affine
transformation. Each S-box is cut into three pipeline stages. The whole cipher
is unrolled, 14 rounds for encryption and 14 for decryption, so the core
accepts one 128-bit block per clock in either direction.

The design follows a published FPGA study of this S-box style. That study
compares it with a look-up-table S-box (smaller in LUTs) and with an
unpipelined version (longer path delay). Neither alternative is included here:
this RTL is the pipelined logic-gate version.

## Top level: `aesencryption_decryption`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock, rising edge |
| `rst`       | in  | 1     | synchronous reset, active high; clears every valid flag and `aesout` |
| `enc_dec`   | in  | 1     | 0 = encrypt `aesin`, 1 = decrypt `aesin` |
| `in_valid`  | in  | 1     | a block is presented this clock |
| `aesin`     | in  | 128   | plaintext or ciphertext |
| `keyin`     | in  | 256   | cipher key, sampled with the block |
| `aesout`    | out | 128   | result; holds its last value while `out_valid` is 0 |
| `out_valid` | out | 1     | `aesout` holds a new result this clock |

Byte order is as in FIPS-197: the first byte of the block (and of the key) is
in the most significant bits.

**Timing.** A block presented on clock *t* comes out on clock *t* + 82 in both
directions. A new block may be presented on every clock. Direction and key may
change from one block to the next, because each block carries its own key
through the pipeline. A reset drops every block in flight.

`clk`, `rst`, `enc_dec`, `aesin`, `keyin` and `aesout` are the original
interface. `in_valid` and `out_valid` are additions, so that results can be
told apart in a deep pipeline.

## How a byte is substituted (`sbox_gf`)

The multiplicative inverse in GF(2^8) is the costly part of the S-box. In the
composite field a byte becomes a pair (ah, al) of GF(2^4) elements, and its
inverse is

    d      = lambda * ah^2  xor  (ah xor al) * al
    inv    = ( ah * d^-1 ,  (ah xor al) * d^-1 )

so only a 4-bit inverter is needed. The blocks are:

| module | what it computes |
|--------|------------------|
| `gf8_iso_map` | delta: GF(2^8) -> GF((2^4)^2), an 8x8 XOR matrix |
| `gf4_sq` | x^2 in GF(2^4) (3 XORs) |
| `gf4_mul_lambda` | x * lambda, lambda = {1100} (4 XORs) |
| `gf4_mul` | general GF(2^4) product, split into four GF(2^2) products |
| `gf4_inv` | x^-1 in GF(2^4), AND/XOR equations, 0 -> 0 |
| `gf8_inv_iso_map` | delta^-1 back to GF(2^8) |
| `affine_trans` | AES affine map, constant 63h |
| `inv_affine_trans` | its inverse, constant 05h (inverse S-box only) |

GF(2^4) is built as GF(2^2)[x]/(x^2 + x + phi), with phi = {10}, over
GF(2^2)[x]/(x^2 + x + 1). GF(2^8) is built as GF(2^4)[y]/(y^2 + y + lambda).
These choices fix the delta matrix, and all the equations above hold in them.
The squarer, lambda multiplier, delta and delta^-1 equations are the
published ones. The GF(2^4) multiplier and inverter are only named in the
source, so their equations are this design's. All are checked exhaustively
against independent reference arithmetic.

Worked example (input 04h): delta gives 7C. Then ah^2 = 4, lambda*ah^2 = D,
ah^al = B, (ah^al)*al = E, d = 3, d^-1 = 2, new high nibble 2*7 = 9, new low
nibble 2*B = D. delta^-1(9D) = CB, the inverse of 04 in GF(2^8), and
affine(CB) = F2 = S(04).

### The three pipeline stages

| stage | combinational work before the register |
|-------|----------------------------------------|
| 1 | (inverse affine), delta, ah^2, ah xor al |
| 2 | lambda*ah^2, (ah xor al)*al, d |
| 3 | d^-1, ah*d^-1, (ah xor al)*d^-1 |
| after | delta^-1, affine map (forward S-box only) |

The last stage's output logic is not registered inside the S-box. In a round
it runs straight into ShiftRows, MixColumns and AddRoundKey, which end at the
next round's stage-1 register. So one round is exactly three clocks. The
inverse S-box (`INVERSE = 1`) uses the same datapath, with the inverse affine
map in front and no affine map at the end.

## Rounds and key schedule

`aes_enc_round` is SubBytes (16 S-boxes), then ShiftRows, then MixColumns
(left out in round 14), then AddRoundKey. `aes_dec_round` follows the FIPS-197
inverse cipher: InvShiftRows, then InvSubBytes, then AddRoundKey, then
InvMixColumns (left out in the last round). ShiftRows and InvShiftRows are
wiring (functions in `aes_pkg`), and MixColumns is `mix_columns`.

**Keys travel with their block.** Each round passes on a 256-bit *key window*
holding two consecutive round keys. Next to its S-boxes, each round runs one
`key_expand_step`: four more S-boxes for SubWord, with the same three-clock
latency, plus XORs. That step produces the round key the next round needs.

* Encryption (`aes256_enc`): the pre-round AddRoundKey uses the first half of
  the cipher key, and round *r* then adds round key *r* while computing key
  *r*+1. Latency is 14 x 3 = 42 clocks.
* Decryption (`aes256_dec`) needs round key 14 first. The block therefore
  first waits in a 39-clock delay line, while 13 forward key steps expand the
  key to round keys 13 and 14. Then 14 inverse rounds run the key schedule
  backwards, using w[i-8] = w[i] xor temp(w[i-1]), one round key per round.
  Latency is 39 + 42 = 81 clocks.

The top delays the encryption results by 39 clocks. Both pipelines then reach
the output register in the order the blocks entered, and they can never
collide; an assertion checks this.

## Where this departs from, or adds to, the published description

* **Direction of the printed test vector.** The original results table gives
  the "encryption" of `4B2E4A414E534849204C414B53484D49` ("K.JANSHI LAKSHMI")
  under the key `5352…5054` ("SRI VENKATESWARA UNIVERSITY, TPT") as
  `8afc5ae4b35ddfcae4ba15cf06a673c8`. That value is the FIPS-197 *inverse*
  cipher of the plaintext. The round operations described for encryption
  (SubBytes, ShiftRows, MixColumns, AddRoundKey) are the forward cipher, and
  this core follows them. So here *decrypting* `4B2E…4D49` gives `8afc…73c8`,
  and *encrypting* `8afc…73c8` gives `4B2E…4D49`. Standard FIPS-197 vectors
  pass in the normal direction.
* The decryption round order is the FIPS-197 inverse cipher (AddRoundKey
  before InvMixColumns). The published order (InvMixColumns before
  AddRoundKey) would need transformed round keys, which it does not mention.
* The key schedule, the round pipelining, `in_valid`/`out_valid`, the reset
  behaviour and the 82-clock latency are this design's own choices. The
  source shows only a 256-bit key feeding every round, and a clocked design
  with no stated latency.
* The MixColumns matrices and the affine constants are the FIPS-197 ones.
  The source names these operations but does not print them.
* The published implementation results (about 34,700 LUTs on a Virtex-5, and
  239 ns path delay pipelined against 300 ns unpipelined) were not
  reproduced. This RTL has not been put through FPGA place and route.

## Size

The core holds 28 x 16 data S-boxes and 39 x 4 key-schedule S-boxes, 604 in
all. Generic synthesis gives about 129,000 word-level cells and about 21,700
flip-flop bits. Another 58,600 bits sit in the delay lines (`pipe_delay`,
which a synthesis tool may map to shift-register memory).

## Files

* `rtl/aes_pkg.sv`: types, ShiftRows, xtime, Rcon.
* `rtl/*.sv`: one module per file, as listed above. `pipe_delay` is the
  register delay line used for valid flags, key windows and waiting blocks.
* `tb/aes_ref_pkg.sv`: an independent reference model. It has bit-serial
  GF(2^8) products, an S-box by exhaustive inverse search, composite-field
  arithmetic by polynomial reduction, and the FIPS-197 cipher and inverse
  cipher.
* `tb/tb_<module>.sv`: a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulating

Every testbench is self-contained; give verilator the packages first and let
it find modules in `rtl/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl \
        rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aesencryption_decryption.sv \
        --top-module tb_aesencryption_decryption
    ./obj_dir/Vtb_aesencryption_decryption

The end-to-end test (`tb_aesencryption_decryption`) runs the full-size core.
It runs the original table values in both directions, the FIPS-197 C.3
vector, and about 370 random blocks with random directions, per-block keys
and idle clocks. It also resets with blocks in flight. Every result is
checked at exactly 82 clocks. Building the full core takes a few minutes of
C++ compilation; the simulation itself takes well under a second.
`tb_aes256_enc` and `tb_aes256_dec` test each pipeline alone (latencies 42
and 81).
