// ol_threshold: threshold activation y = phi(u) = (u >= 0), decided on the
// MSD-first digit stream of u.
//
// The sign of a signed-digit number is the sign of its first nonzero digit,
// so the decision is taken in the cycle that digit arrives, usually long
// before the last digit: +1 gives y = 1, -1 gives y = 0. If every digit is
// zero, u = 0 and y = 1 once the last digit has passed. The bias is already
// inside u (it enters the reduction tree as one more stream), so the
// comparison is against zero.
//
// Interface: `en` marks digit cycles, `first` the first digit, `last` the
// last. decided_o and y_o are registered: they rise the cycle after the
// deciding digit and hold until the next `first`. early_o tells that the
// decision came before the last digit. The rule y = 1 for u >= 0 is the
// source's; deciding on the first nonzero digit is this design's way of doing
// it digit-serially.
module ol_threshold
  import ol_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic first,
  input  logic last,
  input  sd_t  d_i,
  output logic decided_o,
  output logic y_o,
  output logic early_o
);

  logic dec_c;

  always_comb dec_c = first ? 1'b0 : decided_o;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      decided_o <= 1'b0;
      y_o       <= 1'b0;
      early_o   <= 1'b0;
    end else if (en) begin
      if (first) begin
        decided_o <= 1'b0;
        y_o       <= 1'b0;
        early_o   <= 1'b0;
      end
      if (!dec_c) begin
        if (d_i != SD_ZERO) begin
          decided_o <= 1'b1;
          y_o       <= (d_i == SD_POS);
          early_o   <= !last;
        end else if (last) begin
          decided_o <= 1'b1;
          y_o       <= 1'b1;
          early_o   <= 1'b0;
        end
      end
    end
  end

endmodule
