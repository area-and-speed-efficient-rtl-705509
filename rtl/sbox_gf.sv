// sbox_gf: AES S-box computed with logic in the composite field GF((2^4)^2),
// cut into three pipeline stages.
//
// The byte is mapped by delta into a high nibble ah and a low nibble al.
// Its inverse is {ah*d^-1, (ah^al)*d^-1} with d = lambda*ah^2 ^ (ah^al)*al,
// so only a GF(2^4) inverter is needed. delta^-1 brings the result back to
// GF(2^8) and the affine map gives the S-box value.
//   stage 1: delta, ah^2, ah^al                      -> register
//   stage 2: lambda*ah^2, (ah^al)*al, d              -> register
//   stage 3: d^-1, ah*d^-1, (ah^al)*d^-1             -> register
//   output : delta^-1, affine map (combinational after the last register)
// The result for din appears on dout three clocks later; a new byte can
// enter every clock. With INVERSE = 1 the block is the inverse S-box: the
// inverse affine map goes in front of delta and the affine map is left out
// (this variant is the design's own way of building InvSubBytes).
// The data path and the positions of the three registers follow the
// published three-stage S-box. The pipeline registers hold data only and are
// not reset.
module sbox_gf
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic  clk,
  input  byte_t din,
  output byte_t dout
);
  byte_t x_in, x_iso, x_inv;
  gf4_t  ah, al, ah_sq, s_hl;
  gf4_t  lam_sq, m_sl, d;
  gf4_t  d_inv, hi, lo;

  // stage 1 registers
  gf4_t  r1_ah, r1_al, r1_sq, r1_s;
  // stage 2 registers
  gf4_t  r2_ah, r2_s, r2_d;
  // stage 3 registers
  gf4_t  r3_hi, r3_lo;

  if (INVERSE) begin : g_inv_in
    inv_affine_trans u_iaff (.s(din), .x(x_in));
  end else begin : g_fwd_in
    assign x_in = din;
  end

  gf8_iso_map u_iso (.j(x_in), .y(x_iso));
  assign ah   = x_iso[7:4];
  assign al   = x_iso[3:0];
  assign s_hl = ah ^ al;
  gf4_sq u_sq (.j(ah), .b(ah_sq));

  always_ff @(posedge clk) begin
    r1_ah <= ah;
    r1_al <= al;
    r1_sq <= ah_sq;
    r1_s  <= s_hl;
  end

  gf4_mul_lambda u_lam (.j(r1_sq), .b(lam_sq));
  gf4_mul        u_msl (.q(r1_s), .w(r1_al), .k(m_sl));
  assign d = lam_sq ^ m_sl;

  always_ff @(posedge clk) begin
    r2_ah <= r1_ah;
    r2_s  <= r1_s;
    r2_d  <= d;
  end

  gf4_inv u_inv (.q(r2_d), .a(d_inv));
  gf4_mul u_mhi (.q(d_inv), .w(r2_ah), .k(hi));
  gf4_mul u_mlo (.q(d_inv), .w(r2_s),  .k(lo));

  always_ff @(posedge clk) begin
    r3_hi <= hi;
    r3_lo <= lo;
  end

  gf8_inv_iso_map u_iiso (.j({r3_hi, r3_lo}), .y(x_inv));

  if (INVERSE) begin : g_inv_out
    assign dout = x_inv;
  end else begin : g_fwd_out
    affine_trans u_aff (.x(x_inv), .s(dout));
  end
endmodule
