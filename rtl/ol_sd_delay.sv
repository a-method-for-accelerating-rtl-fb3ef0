// ol_sd_delay: a signed-digit stream delayed by DEPTH clocks.
//
// A plain shift register of digits, cleared by reset. The reduction tree uses
// it to keep the streams that skip a 3:2 node in step with the node outputs,
// and the perceptron to line streams up. DEPTH = 0 is a wire.
module ol_sd_delay
  import ol_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  sd_t  d_i,
  output sd_t  d_o
);

  if (DEPTH == 0) begin : g_wire
    assign d_o = d_i;
  end else begin : g_reg
    sd_t sr_q [DEPTH];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) sr_q[i] <= SD_ZERO;
      end else begin
        sr_q[0] <= d_i;
        for (int i = 1; i < int'(DEPTH); i++) sr_q[i] <= sr_q[i-1];
      end
    end
    assign d_o = sr_q[DEPTH-1];
  end

endmodule
