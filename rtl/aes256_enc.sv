// aes256_enc: fully unrolled AES-256 encryption pipeline.
//
// The pre-round AddRoundKey (plaintext ^ round key 0, the first half of the
// cipher key) is combinational at the input; then NR = 14 aes_enc_round
// sections follow, each three clocks long, round 14 without MixColumns.
// The cipher key travels with its block as a two-round-key window and is
// expanded one round key per round, so every block may use its own key.
// Timing: ct/valid_out follow pt/key/valid_in by 3*NR = 42 clocks; one block
// per clock. rst (synchronous, active high) clears the valid flags only.
module aes256_enc
  import aes_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    valid_in,
  input  block_t  pt,
  input  keywin_t key,
  output logic    valid_out,
  output block_t  ct
);
  logic    v [NR+1];
  block_t  s [NR+1];
  keywin_t k [NR+1];

  assign v[0] = valid_in;
  assign s[0] = pt ^ key[255:128];
  assign k[0] = key;

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_enc_round #(.ROUND(r)) u_round (
      .clk      (clk),
      .rst      (rst),
      .valid_in (v[r-1]),
      .state_in (s[r-1]),
      .key_in   (k[r-1]),
      .valid_out(v[r]),
      .state_out(s[r]),
      .key_out  (k[r])
    );
  end

  assign valid_out = v[NR];
  assign ct        = s[NR];
endmodule
