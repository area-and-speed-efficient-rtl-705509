// tb_gf4_inv: for every q != 0 the product q * inv(q) must be 1 (reference
// multiplier); inv(0) must be 0; the worked example gives inv(3) = 2.
module tb_gf4_inv;
  import aes_ref_pkg::*;
  logic [3:0] q, a;
  int checks = 0, failures = 0;
  gf4_inv dut (.q(q), .a(a));
  initial begin
    for (int i = 0; i < 16; i++) begin
      q = 4'(i); #1; checks++;
      if (i == 0 ? (a !== 4'h0) : (m4(q, a) !== 4'h1)) begin
        failures++; $display("FAIL inv(%h)=%h", q, a);
      end
    end
    q = 4'h3; #1; checks++; if (a !== 4'h2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
