// pipe_delay: a DEPTH-stage register delay line for WIDTH bits, used to keep
// side data (valid flags, round keys, waiting blocks) in step with the S-box
// pipeline. With DEPTH = 0 it is a wire. The registers are reset to zero by
// the synchronous, active-high rst when RESET = 1, and not reset otherwise.
module pipe_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1,
  parameter bit          RESET = 1'b0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [WIDTH-1:0] q [DEPTH];
    always_ff @(posedge clk) begin
      if (RESET && rst) begin
        for (int unsigned i = 0; i < DEPTH; i++) q[i] <= '0;
      end else begin
        q[0] <= din;
        for (int unsigned i = 1; i < DEPTH; i++) q[i] <= q[i-1];
      end
    end
    assign dout = q[DEPTH-1];
  end
endmodule
