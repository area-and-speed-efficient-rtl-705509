// gf4_inv: multiplicative inverse in GF(2^4) = GF((2^2)^2), with 0 -> 0.
//
// Written directly as AND/XOR equations of the four input bits (two gate
// levels after the AND terms), the form commonly used for the inverter of a
// composite-field S-box. The equations are this design's; they are checked
// exhaustively in the testbench. Combinational.
module gf4_inv
  import aes_pkg::*;
(
  input  gf4_t q,
  output gf4_t a
);
  logic t321, t320, t310, t210;
  always_comb begin
    t321 = q[3] & q[2] & q[1];
    t320 = q[3] & q[2] & q[0];
    t310 = q[3] & q[1] & q[0];
    t210 = q[2] & q[1] & q[0];
    a[3] = q[3] ^ t321 ^ (q[3] & q[0]) ^ q[2];
    a[2] = t321 ^ t320 ^ (q[3] & q[0]) ^ q[2] ^ (q[2] & q[1]);
    a[1] = q[3] ^ t321 ^ t310 ^ q[2] ^ (q[2] & q[0]) ^ q[1];
    a[0] = t321 ^ t320 ^ (q[3] & q[1]) ^ t310 ^ (q[3] & q[0]) ^ q[2]
         ^ (q[2] & q[1]) ^ t210 ^ q[1] ^ q[0];
  end
endmodule
