// tb_inv_affine_trans: the block must undo the reference affine map for all
// 256 bytes, and map 63 (the image of 0) back to 0.
module tb_inv_affine_trans;
  import aes_ref_pkg::*;
  logic [7:0] s, x;
  int checks = 0, failures = 0;
  inv_affine_trans dut (.s(s), .x(x));
  initial begin
    for (int i = 0; i < 256; i++) begin
      s = aff(8'(i)); #1; checks++;
      if (x !== 8'(i)) begin failures++; $display("FAIL inv_aff(%h)=%h exp %h", s, x, i); end
    end
    s = 8'h63; #1; checks++; if (x !== 8'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
