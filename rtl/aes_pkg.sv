// aes_pkg: types and small functions shared by the AES-256 datapath.
//
// A 128-bit block is held as in FIPS-197: byte n of the block sits in bits
// [127-8n -: 8], and byte n is row n%4, column n/4 of the 4x4 state. A key
// window is 256 bits, eight 32-bit words, oldest word in bits [255:224].
// The composite field GF((2^4)^2) used by the S-box is built on GF(2^2) with
// x^2 = x + 1; the GF(2^2) helpers below are used by the GF(2^4) multiplier.
// The functions are combinational.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [3:0]   gf4_t;
  typedef logic [1:0]   gf2_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [255:0] keywin_t;

  localparam int unsigned NR = 14;           // rounds of AES-256
  localparam int unsigned SBOX_LATENCY = 3;  // pipeline stages of one S-box

  // Product in GF(2^2), field polynomial x^2 + x + 1.
  function automatic gf2_t gf2_mul(gf2_t a, gf2_t b);
    gf2_t r;
    r[1] = (a[1] & b[1]) ^ (a[1] & b[0]) ^ (a[0] & b[1]);
    r[0] = (a[1] & b[1]) ^ (a[0] & b[0]);
    return r;
  endfunction

  // Product with the constant phi = {10} in GF(2^2).
  function automatic gf2_t gf2_mul_phi(gf2_t a);
    return {a[1] ^ a[0], a[1]};
  endfunction

  // Multiply by x in GF(2^8), polynomial x^8 + x^4 + x^3 + x + 1.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t get_byte(block_t s, int unsigned n);
    return s[127-8*n -: 8];
  endfunction

  // ShiftRows: row r rotates left by r positions.
  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = s[127-8*(4*((c+r)%4)+r) -: 8];
    return o;
  endfunction

  // InvShiftRows: row r rotates right by r positions.
  function automatic block_t inv_shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*((c+r)%4)+r) -: 8] = s[127-8*(4*c+r) -: 8];
    return o;
  endfunction

  // Round constant of key-schedule iteration i (1..7 for AES-256).
  function automatic byte_t rcon(int unsigned i);
    byte_t r;
    r = 8'h01;
    for (int unsigned k = 1; k < i; k++) r = xtime(r);
    return r;
  endfunction

endpackage
