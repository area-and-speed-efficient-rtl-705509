// aes_enc_round: one round of AES-256 encryption as a 3-clock pipeline
// section, carrying its block's round keys along.
//
// SubBytes uses sixteen three-stage composite-field S-boxes; ShiftRows,
// MixColumns (left out when ROUND = NR, the last round) and AddRoundKey are
// combinational after the S-box output registers. key_in holds round keys
// ROUND-1 and ROUND of this block; in parallel with SubBytes one key-schedule
// step computes round key ROUND+1, so key_out holds keys ROUND and ROUND+1
// for the next round. Outputs follow the inputs by three clocks; one block
// can enter per clock. valid travels with the block and is cleared by the
// synchronous, active-high rst.
module aes_enc_round
  import aes_pkg::*;
#(
  parameter int unsigned ROUND = 1
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    valid_in,
  input  block_t  state_in,
  input  keywin_t key_in,
  output logic    valid_out,
  output block_t  state_out,
  output keywin_t key_out
);
  block_t sb, sr, mc;
  block_t rk;

  for (genvar n = 0; n < 16; n++) begin : g_sbox
    sbox_gf #(.INVERSE(1'b0)) u_sbox (
      .clk (clk),
      .din (state_in[127-8*n -: 8]),
      .dout(sb[127-8*n -: 8])
    );
  end

  assign sr = shift_rows(sb);

  if (ROUND < NR) begin : g_mix
    mix_columns #(.INVERSE(1'b0)) u_mix (.din(sr), .dout(mc));
    key_expand_step #(.REVERSE(1'b0), .NEW_GROUP(ROUND + 1)) u_key (
      .clk(clk), .win(key_in), .wout(key_out)
    );
  end else begin : g_last
    assign mc = sr;
    pipe_delay #(.WIDTH(256), .DEPTH(SBOX_LATENCY)) u_key_d (
      .clk(clk), .rst(1'b0), .din(key_in), .dout(key_out)
    );
  end

  // Round key ROUND is the newer half of the input window, i.e. the older
  // half of the output window (or the newer half when only delayed).
  assign rk        = (ROUND < NR) ? key_out[255:128] : key_out[127:0];
  assign state_out = mc ^ rk;

  pipe_delay #(.WIDTH(1), .DEPTH(SBOX_LATENCY), .RESET(1'b1)) u_valid_d (
    .clk(clk), .rst(rst), .din(valid_in), .dout(valid_out)
  );
endmodule
