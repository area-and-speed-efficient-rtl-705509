// gf4_sq: squarer in GF(2^4) = GF((2^2)^2).
//
// Squaring is linear over GF(2), so it reduces to three XOR gates:
// b3 = j3, b2 = j3^j2, b1 = j2^j1, b0 = j3^j1^j0, the published equations of
// the squaring block of the composite-field S-box. Purely combinational.
module gf4_sq
  import aes_pkg::*;
(
  input  gf4_t j,
  output gf4_t b
);
  always_comb begin
    b[3] = j[3];
    b[2] = j[3] ^ j[2];
    b[1] = j[2] ^ j[1];
    b[0] = j[3] ^ j[1] ^ j[0];
  end
endmodule
