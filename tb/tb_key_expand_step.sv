// tb_key_expand_step: forward steps for groups 2 (RotWord + Rcon), 3
// (SubWord only) and 14 (last, Rcon 40), backward steps producing groups
// 0, 1 and 12, all fed a new random key window every clock and checked three
// clocks later against the reference key schedule.
module tb_key_expand_step;
  import aes_ref_pkg::*;
  localparam int NI = 6;
  localparam int FWD [NI] = '{1, 1, 1, 0, 0, 0};
  localparam int GRP [NI] = '{2, 3, 14, 0, 1, 12};
  logic clk = 0;
  logic [255:0] win [NI];
  logic [255:0] wout [NI];
  logic [255:0] exp_q [NI][$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  for (genvar i = 0; i < NI; i++) begin : g_dut
    key_expand_step #(.REVERSE(FWD[i] == 0), .NEW_GROUP(GRP[i])) u (
      .clk(clk), .win(win[i]), .wout(wout[i]));
  end

  function automatic logic [255:0] window(wsched_t w, int g);
    return {round_key(w, g), round_key(w, g + 1)};
  endfunction

  initial begin
    for (int n = 0; n < 200; n++) begin
      automatic logic [255:0] key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      automatic wsched_t w = expand(key);
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        if (exp_q[i].size() == 3) begin
          automatic logic [255:0] e = exp_q[i].pop_front();
          checks++;
          if (wout[i] !== e) begin failures++; $display("FAIL inst %0d: %h exp %h", i, wout[i], e); end
        end
        if (FWD[i] == 1) begin win[i] = window(w, GRP[i] - 2); exp_q[i].push_back(window(w, GRP[i] - 1)); end
        else             begin win[i] = window(w, GRP[i] + 1); exp_q[i].push_back(window(w, GRP[i])); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
