// tb_aes256_enc: the FIPS-197 appendix C.3 AES-256 vector, the pair of
// values printed for the original design (encrypting 8afc5ae4... under the
// key "SRI VENKATESWARA UNIVERSITY, TPT" gives "K.JANSHI LAKSHMI"), and 300
// random blocks, each with its own random key, entered back to back with
// occasional idle clocks. Every result is checked against the reference
// cipher and must appear exactly 42 clocks after its block.
module tb_aes256_enc;
  import aes_ref_pkg::*;
  localparam int LAT = 42;
  logic clk = 0, rst = 1, vin = 0, vout;
  logic [127:0] din = '0, dout;
  logic [255:0] key = '0;
  logic [128:0] expq [$];
  int checks = 0, failures = 0, nres = 0;
  aes256_enc dut (.clk(clk), .rst(rst), .valid_in(vin), .pt(din), .key(key), .valid_out(vout), .ct(dout));
  always #5 clk = ~clk;

  // Each clock: compare the output with the entry made LAT clocks earlier.
  always @(negedge clk) if (!rst) begin
    if (expq.size() == LAT) begin
      automatic logic [128:0] e = expq.pop_front();
      checks++;
      if (vout !== e[128]) begin failures++; $display("FAIL valid %b exp %b", vout, e[128]); end
      if (e[128]) begin
        nres++; checks++;
        if (dout !== e[127:0]) begin failures++; $display("FAIL ct %h exp %h", dout, e[127:0]); end
      end
    end
  end

  task automatic put(logic v, logic [127:0] d, logic [255:0] k, logic [127:0] e);
    @(negedge clk);
    #1;
    vin = v; din = d; key = k;
    expq.push_back({v, e});
  endtask

  initial begin
    logic [127:0] p, c;
    logic [255:0] k;
    repeat (3) @(negedge clk);
    rst = 0;
    put(1, 128'h00112233445566778899aabbccddeeff,
        256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
        128'h8ea2b7ca516745bfeafc49904b496089);
    put(1, 128'h8afc5ae4b35ddfcae4ba15cf06a673c8,
        256'h5352492056454e4b415445535741524120554e49564552534954592c20545054,
        128'h4b2e4a414e534849204c414b53484d49);
    for (int n = 0; n < 300; n++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      if ($urandom_range(9) == 0) put(0, p, k, '0);
      else put(1, p, k, encrypt(p, k));
    end
    repeat (LAT + 2) put(0, '0, '0, '0);
    checks++; if (nres < 250) begin failures++; $display("FAIL only %0d results", nres); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
