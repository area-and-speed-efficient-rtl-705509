// tb_sbox_gf: streams one byte per clock into a forward and an inverse
// three-stage S-box (all 256 bytes, then random ones) and checks each output
// exactly three clocks after its input against the reference tables.
module tb_sbox_gf;
  import aes_ref_pkg::*;
  logic clk = 0;
  logic [7:0] din, dout_f, dout_i;
  logic [7:0] hist [$];
  int checks = 0, failures = 0, cyc = 0;
  sbox_gf #(.INVERSE(1'b0)) u_fwd (.clk(clk), .din(din), .dout(dout_f));
  sbox_gf #(.INVERSE(1'b1)) u_inv (.clk(clk), .din(din), .dout(dout_i));
  always #5 clk = ~clk;
  initial begin
    din = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      if (hist.size() >= 3) begin
        automatic logic [7:0] x = hist[hist.size()-3];
        checks += 2;
        if (dout_f !== sbox(x)) begin failures++; $display("FAIL S(%h)=%h exp %h", x, dout_f, sbox(x)); end
        if (dout_i !== inv_sbox(x)) begin failures++; $display("FAIL IS(%h)=%h exp %h", x, dout_i, inv_sbox(x)); end
      end
      din = (n < 256) ? 8'(n) : 8'($urandom);
      hist.push_back(din);
    end
    // Worked example: S(04) = F2.
    checks++; if (sbox(8'h04) !== 8'hf2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
