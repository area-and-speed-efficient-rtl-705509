// tb_gf4_mul: all 256 operand pairs of the GF(2^4) multiplier against the
// reference shift-and-reduce multiplier, plus the products printed in the
// worked S-box example for input 04 (B*C = E, 2*7 = 9, 2*B = D).
module tb_gf4_mul;
  import aes_ref_pkg::*;
  logic [3:0] q, w, k;
  int checks = 0, failures = 0;
  gf4_mul dut (.q(q), .w(w), .k(k));
  task automatic chk(logic [3:0] a, logic [3:0] c, logic [3:0] e);
    q = a; w = c; #1; checks++;
    if (k !== e) begin failures++; $display("FAIL %h*%h=%h exp %h", a, c, k, e); end
  endtask
  initial begin
    for (int a = 0; a < 16; a++)
      for (int c = 0; c < 16; c++) chk(4'(a), 4'(c), m4(4'(a), 4'(c)));
    chk(4'hb, 4'hc, 4'he);
    chk(4'h2, 4'h7, 4'h9);
    chk(4'h2, 4'hb, 4'hd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
