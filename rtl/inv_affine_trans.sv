// inv_affine_trans: inverse of the AES affine transformation, used in front
// of the field inversion to build the inverse S-box.
//
// x_i = s_(i+2) ^ s_(i+5) ^ s_(i+7) ^ d_i, indices mod 8, d = 05h
// (FIPS-197). The inverse S-box built this way is this design's choice; the
// source only names InvSubBytes. Combinational.
module inv_affine_trans
  import aes_pkg::*;
(
  input  byte_t s,
  output byte_t x
);
  localparam byte_t D = 8'h05;
  always_comb
    for (int i = 0; i < 8; i++)
      x[i] = s[(i+2)%8] ^ s[(i+5)%8] ^ s[(i+7)%8] ^ D[i];
endmodule
