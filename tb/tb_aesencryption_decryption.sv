// tb_aesencryption_decryption: end-to-end test of the AES-256
// encryption/decryption core at its only size.
//
// It runs the two rows of the original design's results table through the
// core (the pair K.JANSHI LAKSHMI / 8afc5ae4... under the key
// "SRI VENKATESWARA UNIVERSITY, TPT", in both directions), the FIPS-197 C.3
// vector, and a random stream in which the direction, the key and the idle
// clocks change from block to block. A reset is applied while blocks are in
// flight, and none of them may come out afterwards. Every result must appear
// exactly 82 clocks after its block, equal to the reference (de)cipher.
// It counts how often each mechanism happened: encryption, decryption, a
// direction switch between consecutive blocks, a key change between
// consecutive blocks, an idle clock, and a reset that flushed blocks in
// flight. A mechanism that never happened counts as a failure.
module tb_aesencryption_decryption;
  import aes_ref_pkg::*;
  localparam int LAT = 82;
  logic clk = 0, rst = 1, enc_dec = 0, in_valid = 0, out_valid;
  logic [127:0] aesin = '0, aesout;
  logic [255:0] keyin = '0;
  logic [128:0] expq [$];
  int checks = 0, failures = 0, nres = 0;
  int n_enc = 0, n_dec = 0, n_switch = 0, n_keychg = 0, n_idle = 0, n_flush = 0;
  logic last_mode = 0;
  logic [255:0] last_key = '0;
  bit have_last = 0;

  aesencryption_decryption dut (.clk(clk), .rst(rst), .enc_dec(enc_dec), .in_valid(in_valid),
    .aesin(aesin), .keyin(keyin), .aesout(aesout), .out_valid(out_valid));
  always #5 clk = ~clk;

  always @(negedge clk) if (!rst) begin
    if (expq.size() == LAT) begin
      automatic logic [128:0] e = expq.pop_front();
      checks++;
      if (out_valid !== e[128]) begin failures++; $display("FAIL out_valid %b exp %b", out_valid, e[128]); end
      if (e[128]) begin
        nres++; checks++;
        if (aesout !== e[127:0]) begin failures++; $display("FAIL aesout %h exp %h", aesout, e[127:0]); end
      end
    end
  end

  task automatic put(logic v, logic mode, logic [127:0] d, logic [255:0] k, logic [127:0] e);
    @(negedge clk);
    #1;
    in_valid = v; enc_dec = mode; aesin = d; keyin = k;
    expq.push_back({v, e});
    if (!v) n_idle++;
    else begin
      if (mode) n_dec++; else n_enc++;
      if (have_last && mode != last_mode) n_switch++;
      if (have_last && k != last_key) n_keychg++;
      last_mode = mode; last_key = k; have_last = 1;
    end
  endtask

  task automatic put_rand(int n);
    for (int i = 0; i < n; i++) begin
      automatic logic [127:0] d = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [255:0] k = ($urandom_range(3) == 0 && have_last) ? last_key
        : {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      automatic logic m = 1'($urandom_range(1));
      if ($urandom_range(7) == 0) put(0, 0, d, k, '0);
      else put(1, m, d, k, m ? decrypt(d, k) : encrypt(d, k));
    end
  endtask

  localparam logic [255:0] KEY_T1 = 256'h5352492056454e4b415445535741524120554e49564552534954592c20545054;
  localparam logic [127:0] TXT_T1 = 128'h4b2e4a414e534849204c414b53484d49;
  localparam logic [127:0] VAL_T1 = 128'h8afc5ae4b35ddfcae4ba15cf06a673c8;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // Table rows of the original design, both directions, back to back.
    put(1, 1, TXT_T1, KEY_T1, VAL_T1);
    put(1, 0, VAL_T1, KEY_T1, TXT_T1);
    // FIPS-197 C.3, both directions.
    put(1, 0, 128'h00112233445566778899aabbccddeeff,
        256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
        128'h8ea2b7ca516745bfeafc49904b496089);
    put(1, 1, 128'h8ea2b7ca516745bfeafc49904b496089,
        256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
        128'h00112233445566778899aabbccddeeff);
    put_rand(200);
    // Reset with blocks in flight: they must all be dropped.
    put_rand(30);
    @(negedge clk);
    #1;
    rst = 1; in_valid = 0;
    expq.delete();
    n_flush++;
    @(negedge clk);
    #2;
    checks += 2;
    if (out_valid !== 1'b0) failures++;
    if (aesout !== '0) failures++;
    rst = 0;
    // After the reset: nothing may come out for LAT clocks except new blocks.
    put_rand(200);
    repeat (LAT + 2) put(0, 0, '0, '0, '0);
    $display("mechanisms: enc=%0d dec=%0d switch=%0d keychange=%0d idle=%0d flush=%0d results=%0d",
             n_enc, n_dec, n_switch, n_keychg, n_idle, n_flush, nres);
    checks += 7;
    if (n_enc == 0) failures++;
    if (n_dec == 0) failures++;
    if (n_switch == 0) failures++;
    if (n_keychg == 0) failures++;
    if (n_idle == 0) failures++;
    if (n_flush == 0) failures++;
    if (nres < 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
