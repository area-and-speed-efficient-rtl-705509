// aes_dec_round: one round of AES-256 decryption (FIPS-197 inverse cipher)
// as a 3-clock pipeline section, carrying its block's round keys along.
//
// ROUND is the index of the round key the round adds, NR-1 down to 0.
// InvShiftRows is wiring in front of sixteen three-stage inverse S-boxes;
// AddRoundKey and InvMixColumns (left out when ROUND = 0, the last round)
// are combinational after the S-box output registers. key_in holds round
// keys ROUND and ROUND+1; one backward key-schedule step computes round key
// ROUND-1 in parallel, so key_out holds keys ROUND-1 and ROUND. Outputs
// follow the inputs by three clocks; one block can enter per clock. valid
// travels with the block and is cleared by the synchronous, active-high rst.
module aes_dec_round
  import aes_pkg::*;
#(
  parameter int unsigned ROUND = 13
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
  block_t isr, isb, ark;
  block_t rk;

  assign isr = inv_shift_rows(state_in);

  for (genvar n = 0; n < 16; n++) begin : g_sbox
    sbox_gf #(.INVERSE(1'b1)) u_sbox (
      .clk (clk),
      .din (isr[127-8*n -: 8]),
      .dout(isb[127-8*n -: 8])
    );
  end

  if (ROUND > 0) begin : g_mix
    key_expand_step #(.REVERSE(1'b1), .NEW_GROUP(ROUND - 1)) u_key (
      .clk(clk), .win(key_in), .wout(key_out)
    );
    assign rk  = key_out[127:0];
    assign ark = isb ^ rk;
    mix_columns #(.INVERSE(1'b1)) u_imix (.din(ark), .dout(state_out));
  end else begin : g_last
    pipe_delay #(.WIDTH(256), .DEPTH(SBOX_LATENCY)) u_key_d (
      .clk(clk), .rst(1'b0), .din(key_in), .dout(key_out)
    );
    assign rk        = key_out[255:128];
    assign ark       = isb ^ rk;
    assign state_out = ark;
  end

  pipe_delay #(.WIDTH(1), .DEPTH(SBOX_LATENCY), .RESET(1'b1)) u_valid_d (
    .clk(clk), .rst(rst), .din(valid_in), .dout(valid_out)
  );
endmodule
