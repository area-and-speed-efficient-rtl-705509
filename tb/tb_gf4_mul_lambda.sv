// tb_gf4_mul_lambda: exhaustive check of the multiply-by-lambda block
// against the reference product j*{1100}.
module tb_gf4_mul_lambda;
  import aes_ref_pkg::*;
  logic [3:0] j, b;
  int checks = 0, failures = 0;
  gf4_mul_lambda dut (.j(j), .b(b));
  initial begin
    for (int i = 0; i < 16; i++) begin
      j = 4'(i); #1;
      checks++;
      if (b !== m4(j, 4'hc)) begin failures++; $display("FAIL lam(%h)=%h exp %h", j, b, m4(j, 4'hc)); end
    end
    j = 4'h4; #1; checks++; if (b !== 4'hd) failures++;  // worked example: 4*lambda = D
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
