// aes256_dec: fully unrolled AES-256 decryption pipeline (FIPS-197 inverse
// cipher).
//
// Decryption starts with the last round key, so the cipher key is first
// expanded forward: NR-1 = 13 key_expand_step sections (3 clocks each) turn
// the window (round keys 0,1) into (13,14) while the ciphertext waits in a
// matching delay line. Then the pre-round AddRoundKey with round key 14 is
// combinational, and 14 aes_dec_round sections use round keys 13..0,
// running the key schedule backwards. Every block carries its own key.
// Timing: pt/valid_out follow ct/key/valid_in by 3*13 + 3*14 = 81 clocks;
// one block per clock. rst (synchronous, active high) clears valid flags.
module aes256_dec
  import aes_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    valid_in,
  input  block_t  ct,
  input  keywin_t key,
  output logic    valid_out,
  output block_t  pt
);
  localparam int unsigned PRE_STEPS = NR - 1;

  keywin_t kx [PRE_STEPS+1];
  logic    v0;
  block_t  ct_d;
  logic    v [NR+1];
  block_t  s [NR+1];
  keywin_t k [NR+1];

  // Forward key expansion up to round keys 13 and 14.
  assign kx[0] = key;
  for (genvar g = 0; g < PRE_STEPS; g++) begin : g_pre
    key_expand_step #(.REVERSE(1'b0), .NEW_GROUP(g + 2)) u_step (
      .clk(clk), .win(kx[g]), .wout(kx[g+1])
    );
  end

  pipe_delay #(.WIDTH(128), .DEPTH(PRE_STEPS*SBOX_LATENCY)) u_ct_d (
    .clk(clk), .rst(1'b0), .din(ct), .dout(ct_d)
  );
  pipe_delay #(.WIDTH(1), .DEPTH(PRE_STEPS*SBOX_LATENCY), .RESET(1'b1)) u_v_d (
    .clk(clk), .rst(rst), .din(valid_in), .dout(v0)
  );

  assign v[0] = v0;
  assign s[0] = ct_d ^ kx[PRE_STEPS][127:0];
  assign k[0] = kx[PRE_STEPS];

  // Section i adds round key NR-1-i.
  for (genvar i = 1; i <= NR; i++) begin : g_round
    aes_dec_round #(.ROUND(NR - i)) u_round (
      .clk      (clk),
      .rst      (rst),
      .valid_in (v[i-1]),
      .state_in (s[i-1]),
      .key_in   (k[i-1]),
      .valid_out(v[i]),
      .state_out(s[i]),
      .key_out  (k[i])
    );
  end

  assign valid_out = v[NR];
  assign pt        = s[NR];
endmodule
