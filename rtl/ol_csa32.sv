// ol_csa32: 3:2 reduction node for three signed-digit streams.
//
// Three MSD-first streams a, b, c with the same weights go in; two streams
// come out whose sum equals a + b + c. Each input digit is split into a
// borrow-save pair (pos - neg). One full adder adds the three positive bits
// and one adds the three negative bits; the two sum bits give a sum digit
// s = sp - sn of the same weight, the two carry bits a carry digit
// c = cp - cn of twice that weight. Both stay in {-1,0,1}, and no carry runs
// between digit positions.
//
// Timing: the output streams have one more leading digit than the inputs
// (weight doubled at the head). The carry digit of input cycle t leaves at
// t+1; the sum digit of input cycle t leaves at t+2, so both output streams
// start one cycle after the inputs with a leading digit, and the sum stream's
// leading digit is 0. One clock per tree level, as in the source; the
// borrow-save full-adder construction is this design's choice.
module ol_csa32
  import ol_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  sd_t  a_i,
  input  sd_t  b_i,
  input  sd_t  c_i,
  output sd_t  sum_o,    // partial-sum stream
  output sd_t  carry_o   // partial-carry stream
);

  logic [1:0] ba, bb, bc;
  logic       sp, cp, sn, cn;
  sd_t        s_d, c_d, s_q;

  always_comb begin
    ba = sd_to_bs(a_i);
    bb = sd_to_bs(b_i);
    bc = sd_to_bs(c_i);
    // full adder on the positive bits
    sp = ba[1] ^ bb[1] ^ bc[1];
    cp = (ba[1] & bb[1]) | (ba[1] & bc[1]) | (bb[1] & bc[1]);
    // full adder on the negative bits
    sn = ba[0] ^ bb[0] ^ bc[0];
    cn = (ba[0] & bb[0]) | (ba[0] & bc[0]) | (bb[0] & bc[0]);
    s_d = bs_to_sd(sp, sn);
    c_d = bs_to_sd(cp, cn);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_q     <= SD_ZERO;
      sum_o   <= SD_ZERO;
      carry_o <= SD_ZERO;
    end else begin
      s_q     <= s_d;
      sum_o   <= s_q;
      carry_o <= c_d;
    end
  end

endmodule
