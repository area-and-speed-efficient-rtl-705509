// mix_columns: MixColumns (INVERSE = 0) or InvMixColumns (INVERSE = 1) on
// the whole 128-bit state.
//
// Each column a0..a3 is multiplied by the circulant matrix
// (02 03 01 01) or (0E 0B 0D 09) over GF(2^8) (FIPS-197; the source names
// the operation without giving the matrix). The products are
// built from xtime, the multiply-by-x step of GF(2^8). Combinational.
module mix_columns
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t din,
  output block_t dout
);
  function automatic byte_t mul(byte_t a, byte_t m);
    byte_t r, p;
    r = '0;
    p = a;
    for (int k = 0; k < 4; k++) begin
      if (m[k]) r ^= p;
      p = xtime(p);
    end
    return r;
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a [4];
      for (int r = 0; r < 4; r++) a[r] = din[127-8*(4*c+r) -: 8];
      for (int r = 0; r < 4; r++) begin
        if (INVERSE)
          dout[127-8*(4*c+r) -: 8] = mul(a[r], 8'h0e) ^ mul(a[(r+1)%4], 8'h0b)
                                   ^ mul(a[(r+2)%4], 8'h0d) ^ mul(a[(r+3)%4], 8'h09);
        else
          dout[127-8*(4*c+r) -: 8] = mul(a[r], 8'h02) ^ mul(a[(r+1)%4], 8'h03)
                                   ^ a[(r+2)%4] ^ a[(r+3)%4];
      end
    end
  end
endmodule
