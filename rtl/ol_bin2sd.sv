// ol_bin2sd: two's-complement word to MSD-first signed-digit stream.
//
// A W-bit two's-complement word B is read as the fraction B * 2^-W in
// [-1/2, 1/2). Its sign bit has weight -2^-1 and becomes digit -1 (or 0), the
// other bits become digits 0/1 of weights 2^-2 .. 2^-W, so no arithmetic is
// needed. `load` captures the word; its digits leave on d_o in the W cycles
// starting one cycle after the load, most significant first, and zeros follow.
// The perceptron uses it to feed the bias b into the reduction tree as one
// more product-like stream. This conversion is this design's choice.
module ol_bin2sd
  import ol_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] val_i,
  output sd_t          d_o
);

  logic [W-1:0] sr_q;   // bits still to send, next one at the top

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr_q <= '0;
      d_o  <= SD_ZERO;
    end else if (load) begin
      // sign bit: digit of weight 2^-1, negative
      sr_q <= {val_i[W-2:0], 1'b0};
      d_o  <= val_i[W-1] ? SD_NEG : SD_ZERO;
    end else begin
      sr_q <= {sr_q[W-2:0], 1'b0};
      d_o  <= sr_q[W-1] ? SD_POS : SD_ZERO;
    end
  end

endmodule
