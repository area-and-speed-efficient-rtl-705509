// tb_gf4_sq: exhaustive check of the GF(2^4) squarer against j*j computed
// with the reference composite-field multiplier.
module tb_gf4_sq;
  import aes_ref_pkg::*;
  logic [3:0] j, b;
  int checks = 0, failures = 0;
  gf4_sq dut (.j(j), .b(b));
  initial begin
    for (int i = 0; i < 16; i++) begin
      j = 4'(i); #1;
      checks++;
      if (b !== m4(j, j)) begin failures++; $display("FAIL sq(%h)=%h exp %h", j, b, m4(j, j)); end
    end
    // worked example: 7^2 = 4
    j = 4'h7; #1; checks++; if (b !== 4'h4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
