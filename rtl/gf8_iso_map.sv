// gf8_iso_map: isomorphic mapping delta from GF(2^8) (AES polynomial basis)
// to the composite field GF((2^4)^2).
//
// The published 8x8 binary matrix, reduced to XOR gates. y[7:4] is the high GF(2^4)
// element and y[3:0] the low one. Example: delta(04) = 7C. Combinational.
module gf8_iso_map
  import aes_pkg::*;
(
  input  byte_t j,
  output byte_t y
);
  always_comb begin
    y[7] = j[7] ^ j[5];
    y[6] = j[7] ^ j[6] ^ j[4] ^ j[3] ^ j[2] ^ j[1];
    y[5] = j[7] ^ j[5] ^ j[3] ^ j[2];
    y[4] = j[7] ^ j[5] ^ j[3] ^ j[2] ^ j[1];
    y[3] = j[7] ^ j[6] ^ j[2] ^ j[1];
    y[2] = j[7] ^ j[4] ^ j[3] ^ j[2] ^ j[1];
    y[1] = j[6] ^ j[4] ^ j[1];
    y[0] = j[6] ^ j[1] ^ j[0];
  end
endmodule
