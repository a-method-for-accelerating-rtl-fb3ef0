// ol_input_rf: input register file holding the feature vector x_1..x_N.
//
// Each element is an NB-bit two's-complement word X read as the fraction
// X * 2^-NB (a Q8.8 value then maps to X / 2^16; the scale is restored after
// the sum). Elements are written one at a time. For the online datapath the
// file presents digit j (j = 0 is the most significant) of all N elements at
// once, as signed digits: the sign bit gives digit -1 or 0, every other bit
// 0 or +1. For j >= NB all digits are 0, which is what the multipliers need
// while they finish the product. The read is combinational from dig_idx.
// The register file as the source of x_i is the source's; the digit
// presentation is this design's choice. Registers reset to zero.
module ol_input_rf
  import ol_pkg::*;
#(
  parameter int unsigned N  = 64,
  parameter int unsigned NB = 16,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned DW = 8        // width of the digit index
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [IW-1:0] widx,
  input  logic [NB-1:0] wdata,
  input  logic [DW-1:0] dig_idx,
  output sd_t           x_dig_o [N]
);

  logic [NB-1:0] x_q [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) x_q[i] <= '0;
    end else if (we) begin
      x_q[widx] <= wdata;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      x_dig_o[i] = SD_ZERO;
      if (dig_idx == '0)
        x_dig_o[i] = x_q[i][NB-1] ? SD_NEG : SD_ZERO;
      else if (dig_idx < DW'(NB))
        x_dig_o[i] = x_q[i][NB-1-int'(dig_idx)] ? SD_POS : SD_ZERO;
    end
  end

endmodule
