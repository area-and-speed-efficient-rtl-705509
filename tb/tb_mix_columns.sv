// tb_mix_columns: MixColumns and InvMixColumns on random states against the
// reference matrix products, the FIPS-197 example column db 13 53 45 ->
// 8e 4d a1 bc, and the round trip InvMix(Mix(s)) = s.
module tb_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] din, d_f, d_i, rt;
  int checks = 0, failures = 0;
  mix_columns #(.INVERSE(1'b0)) u_f (.din(din), .dout(d_f));
  mix_columns #(.INVERSE(1'b1)) u_i (.din(din), .dout(d_i));
  mix_columns #(.INVERSE(1'b1)) u_rt (.din(d_f), .dout(rt));
  initial begin
    for (int n = 0; n < 300; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom}; #1;
      checks += 3;
      if (d_f !== from_st(mixcol(to_st(din), 0))) begin failures++; $display("FAIL mix %h", din); end
      if (d_i !== from_st(mixcol(to_st(din), 1))) begin failures++; $display("FAIL imix %h", din); end
      if (rt !== din) failures++;
    end
    din = {32'hdb135345, 32'hf20a225c, 32'h01010101, 32'hc6c6c6c6}; #1;
    checks += 3;
    if (d_f[127:96] !== 32'h8e4da1bc) failures++;
    if (d_f[95:64]  !== 32'h9fdc589d) failures++;
    if (d_f[63:32]  !== 32'h01010101) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
