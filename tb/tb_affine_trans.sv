// tb_affine_trans: all 256 inputs against the affine map written with byte
// rotations (x ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 63); affine(CB) = F2.
module tb_affine_trans;
  import aes_ref_pkg::*;
  logic [7:0] x, s;
  int checks = 0, failures = 0;
  affine_trans dut (.x(x), .s(s));
  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i); #1; checks++;
      if (s !== aff(x)) begin failures++; $display("FAIL aff(%h)=%h exp %h", x, s, aff(x)); end
    end
    x = 8'hcb; #1; checks++; if (s !== 8'hf2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
