// tb_gf8_inv_iso_map: delta^-1 must be a field isomorphism from
// GF((2^4)^2) back to GF(2^8): one-to-one, additive, products preserved, and
// delta^-1(9D) = CB (the inverse of 04 in the worked example).
module tb_gf8_inv_iso_map;
  import aes_ref_pkg::*;
  logic [7:0] j, y;
  logic [7:0] img [256];
  bit seen [256];
  int checks = 0, failures = 0;
  gf8_inv_iso_map dut (.j(j), .y(y));
  initial begin
    for (int i = 0; i < 256; i++) begin j = 8'(i); #1; img[i] = y; end
    for (int i = 0; i < 256; i++) seen[i] = 0;
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (seen[img[i]]) begin failures++; $display("FAIL not one-to-one at %h", i); end
      seen[img[i]] = 1;
    end
    for (int n = 0; n < 3000; n++) begin
      automatic int a = $urandom_range(255), c = $urandom_range(255);
      checks += 2;
      if (img[a ^ c] !== (img[a] ^ img[c])) failures++;
      if (img[m8c(8'(a), 8'(c))] !== gmul(img[a], img[c])) begin
        failures++; $display("FAIL product %h*%h", a, c);
      end
    end
    checks++; if (img[8'h9d] !== 8'hcb) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
