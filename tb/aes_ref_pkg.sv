// aes_ref_pkg: reference models for the AES-256 testbenches, written
// independently of the RTL. GF(2^8) products are bit-serial shift-and-add,
// the S-box is the inverse found by exhaustive search followed by the affine
// map written with byte rotations, and the composite-field arithmetic
// GF((2^2)^2) is done with polynomial shift-and-reduce loops. The cipher and
// inverse cipher follow FIPS-197 step by step on a 16-byte array.
package aes_ref_pkg;

  typedef logic [7:0] b8_t;

  function automatic b8_t gmul(b8_t a, b8_t b);
    b8_t r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return r;
  endfunction

  function automatic b8_t ginv(b8_t a);
    if (a == 0) return 0;
    for (int c = 1; c < 256; c++) if (gmul(a, b8_t'(c)) == 8'h01) return b8_t'(c);
    return 0;
  endfunction

  function automatic b8_t rotl8(b8_t a, int n);
    return (a << n) | (a >> (8 - n));
  endfunction

  function automatic b8_t aff(b8_t x);
    return x ^ rotl8(x, 1) ^ rotl8(x, 2) ^ rotl8(x, 3) ^ rotl8(x, 4) ^ 8'h63;
  endfunction

  // The tables are filled on first use from aff(ginv(x)).
  b8_t sb_tab  [256];
  b8_t isb_tab [256];
  bit  tab_ready = 1'b0;

  function automatic void build_tables();
    for (int x = 0; x < 256; x++) begin
      b8_t y = aff(ginv(b8_t'(x)));
      sb_tab[x]  = y;
      isb_tab[y] = b8_t'(x);
    end
    tab_ready = 1'b1;
  endfunction

  function automatic b8_t sbox(b8_t x);
    if (!tab_ready) build_tables();
    return sb_tab[x];
  endfunction

  function automatic b8_t inv_sbox(b8_t y);
    if (!tab_ready) build_tables();
    return isb_tab[y];
  endfunction

  // GF(2^2): polynomial basis, reduce by x^2 + x + 1.
  function automatic logic [1:0] m2(logic [1:0] a, logic [1:0] b);
    logic [2:0] p = 0;
    for (int i = 0; i < 2; i++) if (b[i]) p ^= 3'(a) << i;
    if (p[2]) p ^= 3'b111;
    return p[1:0];
  endfunction

  // GF((2^2)^2): reduce y^2 by y^2 = y + phi, phi = {10}.
  function automatic logic [3:0] m4(logic [3:0] q, logic [3:0] w);
    logic [1:0] c2, c1, c0;
    c2 = m2(q[3:2], w[3:2]);
    c1 = m2(q[3:2], w[1:0]) ^ m2(q[1:0], w[3:2]);
    c0 = m2(q[1:0], w[1:0]);
    return {c1 ^ c2, c0 ^ m2(c2, 2'b10)};
  endfunction

  // GF((2^4)^2): reduce z^2 by z^2 = z + lambda, lambda = {1100}.
  function automatic b8_t m8c(b8_t q, b8_t w);
    logic [3:0] c2, c1, c0;
    c2 = m4(q[7:4], w[7:4]);
    c1 = m4(q[7:4], w[3:0]) ^ m4(q[3:0], w[7:4]);
    c0 = m4(q[3:0], w[3:0]);
    return {c1 ^ c2, c0 ^ m4(c2, 4'hc)};
  endfunction

  typedef b8_t st_t [16];

  function automatic st_t to_st(logic [127:0] b);
    st_t s;
    for (int i = 0; i < 16; i++) s[i] = b[127-8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] b;
    for (int i = 0; i < 16; i++) b[127-8*i -: 8] = s[i];
    return b;
  endfunction

  function automatic st_t mixcol(st_t s, bit inv);
    st_t o;
    b8_t m [4];
    if (inv) m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else     m = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[4*c+r] = 0;
        for (int k = 0; k < 4; k++) o[4*c+r] ^= gmul(s[4*c+k], m[(k-r+4)%4]);
      end
    return o;
  endfunction

  function automatic st_t shrows(st_t s, bit inv);
    st_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (inv) o[4*((c+r)%4)+r] = s[4*c+r];
        else     o[4*c+r] = s[4*((c+r)%4)+r];
    return o;
  endfunction

  typedef logic [31:0] w_t;
  typedef w_t wsched_t [60];

  function automatic w_t subword(w_t x);
    return {sbox(x[31:24]), sbox(x[23:16]), sbox(x[15:8]), sbox(x[7:0])};
  endfunction

  function automatic wsched_t expand(logic [255:0] key);
    wsched_t w;
    b8_t rc = 8'h01;
    for (int i = 0; i < 8; i++) w[i] = key[255-32*i -: 32];
    for (int i = 8; i < 60; i++) begin
      w_t t = w[i-1];
      if (i % 8 == 0) begin
        t = subword({t[23:0], t[31:24]}) ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end else if (i % 8 == 4) t = subword(t);
      w[i] = w[i-8] ^ t;
    end
    return w;
  endfunction

  function automatic logic [127:0] round_key(wsched_t w, int r);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [255:0] key);
    wsched_t w = expand(key);
    st_t s = to_st(pt ^ round_key(w, 0));
    for (int r = 1; r <= 14; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sbox(s[i]);
      s = shrows(s, 0);
      if (r < 14) s = mixcol(s, 0);
      s = to_st(from_st(s) ^ round_key(w, r));
    end
    return from_st(s);
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] ct, logic [255:0] key);
    wsched_t w = expand(key);
    st_t s = to_st(ct ^ round_key(w, 14));
    for (int r = 13; r >= 0; r--) begin
      s = shrows(s, 1);
      for (int i = 0; i < 16; i++) s[i] = inv_sbox(s[i]);
      s = to_st(from_st(s) ^ round_key(w, r));
      if (r > 0) s = mixcol(s, 1);
    end
    return from_st(s);
  endfunction

endpackage
