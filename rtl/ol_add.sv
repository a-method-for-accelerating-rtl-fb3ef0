// ol_add: radix-2 online adder for two signed-digit streams (root of the
// reduction tree).
//
// z = a + b, all three MSD-first streams with digits in {-1,0,1}. Per digit
// position the raw sum s = a + b in [-2,2] is split as s = 2t + w, with t a
// transfer to the next more significant position. For s = +-1 the split looks
// one position ahead: s = 1 gives (t,w) = (1,-1) when the next s is >= 1 and
// (0,1) otherwise; s = -1 mirrors this. The output digit z = w + t' (t' from
// the next less significant position) then always stays in {-1,0,1}, so no
// carry runs further than one position.
//
// Timing: online delay 2. The output stream has one more leading digit than
// the inputs; its first digit (the transfer of the inputs' first position)
// leaves 2 cycles after the inputs' first digit. The registers must hold
// zeros before a stream starts (reset, or zero digits ahead of it).
// The source names only the tree root that delivers u; this
// two-position-lookahead adder is this design's choice for it.
module ol_add
  import ol_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  sd_t  a_i,
  input  sd_t  b_i,
  output sd_t  z_o
);

  typedef logic signed [2:0] s3_t;

  s3_t s_cur, s_q;        // s of this input position and of the previous one
  sd_t t_prev, w_prev_q;  // split of the previous position
  sd_t w_prev;
  sd_t z_d;

  // split s (given the next less significant s) into transfer and local digit
  function automatic logic [3:0] split(s3_t s, s3_t s_next);
    sd_t t, w;
    case (s)
      3'sd2:   begin t = SD_POS;  w = SD_ZERO; end
      -3'sd2:  begin t = SD_NEG;  w = SD_ZERO; end
      3'sd1:   if (s_next >= 3'sd1) begin t = SD_POS; w = SD_NEG; end
               else begin t = SD_ZERO; w = SD_POS; end
      -3'sd1:  if (s_next <= -3'sd1) begin t = SD_NEG; w = SD_POS; end
               else begin t = SD_ZERO; w = SD_NEG; end
      default: begin t = SD_ZERO; w = SD_ZERO; end
    endcase
    return {t, w};
  endfunction

  always_comb begin
    s_cur = s3_t'(a_i) + s3_t'(b_i);
    // the previous position now knows its neighbour: split it
    {t_prev, w_prev} = split(s_q, s_cur);
    // output digit of the position before that: its w plus the transfer in
    z_d = sd_t'(s3_t'(w_prev_q) + s3_t'(t_prev));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_q      <= '0;
      w_prev_q <= SD_ZERO;
      z_o      <= SD_ZERO;
    end else begin
      s_q      <= s_cur;
      w_prev_q <= w_prev;
      z_o      <= z_d;
    end
  end

endmodule
