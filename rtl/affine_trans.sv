// affine_trans: the AES affine transformation that turns a GF(2^8) inverse
// into the S-box value.
//
// s_i = x_i ^ x_(i+4) ^ x_(i+5) ^ x_(i+6) ^ x_(i+7) ^ c_i, indices mod 8,
// c = 63h. The source names this step but does not print the matrix; the
// FIPS-197 one is used. Example: affine(CB) = F2. Combinational.
module affine_trans
  import aes_pkg::*;
(
  input  byte_t x,
  output byte_t s
);
  localparam byte_t C = 8'h63;
  always_comb
    for (int i = 0; i < 8; i++)
      s[i] = x[i] ^ x[(i+4)%8] ^ x[(i+5)%8] ^ x[(i+6)%8] ^ x[(i+7)%8] ^ C[i];
endmodule
