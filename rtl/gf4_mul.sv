// gf4_mul: general multiplier in GF(2^4) = GF((2^2)^2).
//
// An element is {high pair, low pair} of GF(2^2) elements and GF(2^4) is
// built with the polynomial x^2 + x + phi, phi = {10}. With
// q = qH x + qL and w = wH x + wL:
//   k = (qH wH + qH wL + qL wH) x + (qH wH phi + qL wL),
// four GF(2^2) products, one phi product and XORs. The decomposition is this
// design's choice (it is the field in which the squarer and the lambda
// multiplier hold). Combinational.
module gf4_mul
  import aes_pkg::*;
(
  input  gf4_t q,
  input  gf4_t w,
  output gf4_t k
);
  gf2_t hh, hl, lh, ll;
  always_comb begin
    hh = gf2_mul(q[3:2], w[3:2]);
    hl = gf2_mul(q[3:2], w[1:0]);
    lh = gf2_mul(q[1:0], w[3:2]);
    ll = gf2_mul(q[1:0], w[1:0]);
    k  = {hh ^ hl ^ lh, gf2_mul_phi(hh) ^ ll};
  end
endmodule
