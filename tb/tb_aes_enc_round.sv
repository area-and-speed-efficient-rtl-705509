// tb_aes_enc_round: a middle round (1) and the last round (14, no
// MixColumns) fed a random state and key window every clock; state, next key
// window and valid are checked three clocks later against the reference.
module tb_aes_enc_round;
  import aes_ref_pkg::*;
  localparam int RS [2] = '{1, 14};
  logic clk = 0, rst = 1;
  logic vin [2], vout [2];
  logic [127:0] sin [2], sout [2];
  logic [255:0] kin [2], kout [2];
  logic [384:0] q [2][$];
  int checks = 0, failures = 0, nvalid = 0;
  always #5 clk = ~clk;

  for (genvar i = 0; i < 2; i++) begin : g_dut
    aes_enc_round #(.ROUND(RS[i])) u (.clk(clk), .rst(rst), .valid_in(vin[i]), .state_in(sin[i]),
      .key_in(kin[i]), .valid_out(vout[i]), .state_out(sout[i]), .key_out(kout[i]));
  end

  initial begin
    for (int i = 0; i < 2; i++) begin vin[i] = 0; sin[i] = 0; kin[i] = 0; end
    repeat (4) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 150; n++) begin
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        automatic int r = RS[i];
        automatic logic [255:0] key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        automatic wsched_t w = expand(key);
        st_t s;
        automatic logic [127:0] st = {$urandom, $urandom, $urandom, $urandom};
        logic [255:0] kexp;
        automatic logic v = $urandom_range(3) != 0;
        if (q[i].size() == 3) begin
          automatic logic [384:0] e = q[i].pop_front();
          checks++;
          if (vout[i] !== e[384]) failures++;
          if (e[384]) begin
            nvalid++;
            checks += 2;
            if (sout[i] !== e[383:256]) begin failures++; $display("FAIL r%0d state %h exp %h", RS[i], sout[i], e[383:256]); end
            if (r < 14 && kout[i] !== e[255:0]) begin failures++; $display("FAIL r%0d key", RS[i]); end
          end
        end
        s = to_st(st);
        for (int b = 0; b < 16; b++) s[b] = sbox(s[b]);
        s = shrows(s, 0);
        if (r < 14) s = mixcol(s, 0);
        kexp = (r < 14) ? {round_key(w, r), round_key(w, r + 1)} : '0;
        vin[i] = v; sin[i] = st; kin[i] = {round_key(w, r - 1), round_key(w, r)};
        q[i].push_back({v, from_st(s) ^ round_key(w, r), kexp});
      end
    end
    checks++; if (nvalid < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
