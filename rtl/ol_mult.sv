// ol_mult: radix-2 serial-serial online multiplier (MSD first).
//
// Both operands arrive as signed-digit streams, one digit of each per clock,
// most significant first: x = sum x_j 2^-j and w = sum w_j 2^-j, j = 1..NB,
// digits in {-1,0,1}, so |x|,|w| < 1. The product p = x*w leaves as a
// signed-digit stream of weight 2^-1, 2^-2, ... and is exact after 2*NB
// digits when the operand digits after position NB are zero.
//
// How it works: the unit keeps the operand prefixes X and W (built up one
// digit per cycle) and a residual R. Each cycle forms
//     v = 2R + (x_j * W_new + w_j * X_old) * 2^-DELTA
// During the first DELTA cycles v is kept as the residual (warm-up). After that
// an output digit p is chosen from v truncated to two fractional bits
// (p = +1 if >= 1/2, -1 if < -1/2, else 0) and R = v - p. The residual is the
// feedback c_k of the block diagram; the output digit passes one register
// (z^-1) before it leaves. Residual: NB+DELTA fractional bits and 3 integer
// bits (|v| stays below 1.2).
//
// Interface and timing: assert `first` in the cycle that carries x_1/w_1;
// that cycle also restarts the unit, so operations can follow each other with
// no gap. Digit p_1 is on p_o DELTA+1 cycles after the `first` cycle, and one
// new digit follows every cycle: the last of the 2*NB product digits leaves
// 2*NB+DELTA cycles after `first`. p_o is 0 during the warm-up.
//
// The digit set, MSD-first order, the online delay of 3 and the feedback
// structure follow the source architecture; the recurrence and selection rule
// are the standard radix-2 online multiplication algorithm, chosen here
// because the source gives only the block's function.
module ol_mult
  import ol_pkg::*;
#(
  parameter int unsigned NB    = 16,       // operand digits (n)
  parameter int unsigned DELTA = OL_DELTA  // online delay (p)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic first,   // this cycle carries digit 1 of both operands
  input  sd_t  x_i,     // feature digit
  input  sd_t  w_i,     // weight digit
  output sd_t  p_o      // product digit
);

  localparam int unsigned FRAC = NB + DELTA;
  localparam int unsigned RW   = FRAC + 3;        // residual width
  localparam int unsigned OW   = NB + 2;          // operand prefix width
  localparam int unsigned CW   = $clog2(NB + 1) + 1;

  logic signed [RW-1:0] res_q;
  logic signed [OW-1:0] xa_q, wa_q;
  logic [CW-1:0]        cnt_q;   // digits consumed so far, saturates at NB

  logic signed [RW-1:0] res_c, v, sel_v, res_n;
  logic signed [OW-1:0] xa_c, wa_c, xa_n, wa_n;
  logic [CW-1:0]        cnt_c;
  logic signed [OW-1:0] xs, ws;   // x_j and w_j at their weights
  sd_t                  pd;

  always_comb begin
    // state as seen this cycle (cleared when a new operation starts)
    res_c = first ? '0 : res_q;
    xa_c  = first ? '0 : xa_q;
    wa_c  = first ? '0 : wa_q;
    cnt_c = first ? '0 : cnt_q;

    xs = '0;
    ws = '0;
    if (cnt_c < CW'(NB)) begin
      xs = OW'(signed'(x_i)) <<< (NB - 1 - int'(cnt_c));
      ws = OW'(signed'(w_i)) <<< (NB - 1 - int'(cnt_c));
    end
    xa_n = xa_c + xs;
    wa_n = wa_c + ws;

    v = (res_c <<< 1);
    if (x_i == SD_POS)      v = v + RW'(wa_n);
    else if (x_i == SD_NEG) v = v - RW'(wa_n);
    if (w_i == SD_POS)      v = v + RW'(xa_c);
    else if (w_i == SD_NEG) v = v - RW'(xa_c);

    // selection on v truncated to two fractional bits
    sel_v = v >>> (FRAC - 2);
    pd    = SD_ZERO;
    if (cnt_c >= CW'(DELTA)) begin
      if (sel_v >= RW'(2))       pd = SD_POS;
      else if (sel_v < -RW'(2))  pd = SD_NEG;
    end
    res_n = v - (RW'(signed'(pd)) <<< FRAC);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_q <= '0;
      xa_q  <= '0;
      wa_q  <= '0;
      cnt_q <= CW'(NB);
      p_o   <= SD_ZERO;
    end else begin
      res_q <= res_n;
      xa_q  <= xa_n;
      wa_q  <= wa_n;
      cnt_q <= (cnt_c == CW'(NB)) ? cnt_c : cnt_c + 1'b1;
      p_o   <= pd;
    end
  end

  // operand digits must come from {-1,0,1}; NB must cover the warm-up
  initial assert (NB >= DELTA) else $error("ol_mult: NB must be >= DELTA");
  a_digits : assert property (@(posedge clk) disable iff (!rst_n)
                              x_i != 2'sb10 && w_i != 2'sb10)
    else $error("ol_mult: illegal operand digit");

endmodule
