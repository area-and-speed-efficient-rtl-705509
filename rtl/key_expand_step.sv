// key_expand_step: one step of the AES-256 key schedule, forward or
// backward, using four pipelined composite-field S-boxes for SubWord.
//
// The key window holds eight words, two round keys, oldest word in bits
// [255:224]. Words are numbered as in FIPS-197 (w0..w59, round key r is
// w[4r..4r+3]).
//  REVERSE = 0: window w[4g-8 .. 4g-1] -> w[4g-4 .. 4g+3], g = NEW_GROUP
//               (2..14), w[i] = w[i-8] ^ temp(w[i-1]).
//  REVERSE = 1: window w[4g+4 .. 4g+11] -> w[4g .. 4g+7], g = NEW_GROUP
//               (0..12), w[i-8] = w[i] ^ temp(w[i-1]).
// temp(w) is SubWord(RotWord(w)) ^ Rcon for i % 8 == 0, SubWord(w) for
// i % 8 == 4, and w otherwise; only the first word of the new group needs
// an S-box. The result appears three clocks after win (the S-box latency),
// a new window is accepted every clock. The source shows only a 256-bit
// key feeding every round; this on-the-fly schedule is the design's own.
module key_expand_step
  import aes_pkg::*;
#(
  parameter bit          REVERSE   = 1'b0,
  parameter int unsigned NEW_GROUP = 2
) (
  input  logic    clk,
  input  keywin_t win,
  output keywin_t wout
);
  // Word index i of the first word of the group whose equation is used.
  localparam int unsigned I_IDX   = REVERSE ? 4*(NEW_GROUP+2) : 4*NEW_GROUP;
  localparam bit          ROT     = (I_IDX % 8) == 0;
  localparam byte_t       RC      = ROT ? rcon(I_IDX / 8) : 8'h00;

  word_t   sub_in, sub_out, temp;
  keywin_t win_d;
  word_t   w [8];
  word_t   n [4];

  // The word fed to SubWord is w[i-1]: the last word of the window going
  // forward, the fourth word (w[4g+7]) going backward.
  always_comb begin
    word_t src;
    src    = REVERSE ? win[255-32*3 -: 32] : win[31:0];
    sub_in = ROT ? {src[23:0], src[31:24]} : src;
  end

  for (genvar b = 0; b < 4; b++) begin : g_sub
    sbox_gf #(.INVERSE(1'b0)) u_sbox (
      .clk (clk),
      .din (sub_in[8*b +: 8]),
      .dout(sub_out[8*b +: 8])
    );
  end

  pipe_delay #(.WIDTH(256), .DEPTH(SBOX_LATENCY)) u_win_d (
    .clk(clk), .rst(1'b0), .din(win), .dout(win_d)
  );

  always_comb begin
    for (int k = 0; k < 8; k++) w[k] = win_d[255-32*k -: 32];
    temp = sub_out ^ {RC, 24'h0};
    if (!REVERSE) begin
      n[0] = w[0] ^ temp;
      for (int k = 1; k < 4; k++) n[k] = w[k] ^ n[k-1];
      wout = {w[4], w[5], w[6], w[7], n[0], n[1], n[2], n[3]};
    end else begin
      n[3] = w[7] ^ w[6];
      n[2] = w[6] ^ w[5];
      n[1] = w[5] ^ w[4];
      n[0] = w[4] ^ temp;
      wout = {n[0], n[1], n[2], n[3], w[0], w[1], w[2], w[3]};
    end
  end
endmodule
