// gf8_inv_iso_map: inverse isomorphic mapping delta^-1 from GF((2^4)^2)
// back to GF(2^8).
//
// The published inverse of the delta matrix, reduced to XOR gates. Example:
// delta^-1(9D) = CB. Combinational.
module gf8_inv_iso_map
  import aes_pkg::*;
(
  input  byte_t j,
  output byte_t y
);
  always_comb begin
    y[7] = j[7] ^ j[6] ^ j[5] ^ j[1];
    y[6] = j[6] ^ j[2];
    y[5] = j[6] ^ j[5] ^ j[1];
    y[4] = j[6] ^ j[5] ^ j[4] ^ j[2] ^ j[1];
    y[3] = j[5] ^ j[4] ^ j[3] ^ j[2] ^ j[1];
    y[2] = j[7] ^ j[4] ^ j[3] ^ j[2] ^ j[1];
    y[1] = j[5] ^ j[4];
    y[0] = j[6] ^ j[5] ^ j[4] ^ j[2] ^ j[0];
  end
endmodule
