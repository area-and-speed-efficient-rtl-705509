// gf4_mul_lambda: multiplication by the constant lambda = {1100} in GF(2^4).
//
// lambda is the constant term of the irreducible polynomial x^2 + x + lambda
// that builds GF(2^8) over GF(2^4). A constant product is linear, here four
// XOR gates: b3 = j2^j0, b2 = j3^j2^j1^j0, b1 = j3, b0 = j2, as published.
// Combinational.
module gf4_mul_lambda
  import aes_pkg::*;
(
  input  gf4_t j,
  output gf4_t b
);
  always_comb begin
    b[3] = j[2] ^ j[0];
    b[2] = j[3] ^ j[2] ^ j[1] ^ j[0];
    b[1] = j[3];
    b[0] = j[2];
  end
endmodule
