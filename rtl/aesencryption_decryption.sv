// aesencryption_decryption: AES-256 encryption and decryption core with
// composite-field (logic-gate) S-boxes, each cut into three pipeline stages.
//
// enc_dec = 0 encrypts aesin with the 256-bit keyin, enc_dec = 1 decrypts
// it. The two directions are separate unrolled pipelines (aes256_enc and
// aes256_dec); a block enters the one its enc_dec selects on a clock where
// in_valid is 1. Encryption takes 42 clocks and decryption 81, so the
// encryption result is delayed by 39 clocks; both then reach the output
// register together in entry order, and aesout/out_valid follow the input by
// LATENCY = 82 clocks whatever the mix of directions and keys. One block per
// clock in either direction. aesout holds its last value while out_valid is
// 0. rst is synchronous and active high and clears the valid flags and
// aesout. Port names follow the original schematic (clk, rst, enc_dec,
// aesin, keyin, aesout); in_valid and out_valid are additions.
module aesencryption_decryption
  import aes_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    enc_dec,
  input  logic    in_valid,
  input  block_t  aesin,
  input  keywin_t keyin,
  output block_t  aesout,
  output logic    out_valid
);
  localparam int unsigned ENC_LAT = NR * SBOX_LATENCY;
  localparam int unsigned DEC_LAT = (2 * NR - 1) * SBOX_LATENCY;

  logic   enc_v, dec_v, enc_v_d;
  block_t enc_s, dec_s, enc_s_d;

  aes256_enc u_enc (
    .clk(clk), .rst(rst), .valid_in(in_valid & ~enc_dec),
    .pt(aesin), .key(keyin), .valid_out(enc_v), .ct(enc_s)
  );

  aes256_dec u_dec (
    .clk(clk), .rst(rst), .valid_in(in_valid & enc_dec),
    .ct(aesin), .key(keyin), .valid_out(dec_v), .pt(dec_s)
  );

  pipe_delay #(.WIDTH(128), .DEPTH(DEC_LAT - ENC_LAT)) u_enc_d (
    .clk(clk), .rst(1'b0), .din(enc_s), .dout(enc_s_d)
  );
  pipe_delay #(.WIDTH(1), .DEPTH(DEC_LAT - ENC_LAT), .RESET(1'b1)) u_enc_v_d (
    .clk(clk), .rst(rst), .din(enc_v), .dout(enc_v_d)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      aesout    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= enc_v_d | dec_v;
      if (enc_v_d)    aesout <= enc_s_d;
      else if (dec_v) aesout <= dec_s;
    end
  end

  // Equal latencies mean the two pipelines never deliver in the same clock.
  always_ff @(posedge clk)
    if (!rst) assert (!(enc_v_d && dec_v))
      else $error("encryption and decryption results collided");
endmodule
