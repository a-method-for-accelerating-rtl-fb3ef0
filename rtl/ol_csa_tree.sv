// ol_csa_tree: the redundant reduction tree, M signed-digit streams to two.
//
// Levels of 3:2 nodes (ol_csa32) are applied until two streams remain. In a
// level the streams are taken in groups of three, each group reduced to a sum
// and a carry stream; the M mod 3 streams left over pass through two
// registers (ol_sd_delay) so that they stay in step with the node sum
// streams. A level with m streams leaves 2*(m/3) + m%3 (ol_pkg::csa_next);
// the number of levels is LEVELS = ol_pkg::csa_levels(M), 10 for 65 streams.
//
// Timing: each level costs one clock and adds one leading digit, so the two
// output streams start LEVELS cycles after the inputs and their first digit
// weighs 2^LEVELS times the first input digit. sum(out) = sum(in) exactly;
// no carry propagates along a digit stream at any point. Output order within
// a level: sum and carry of node g at 2g and 2g+1, then the pass-through
// streams. With M = 1 the second output is 0; with M = 2 the inputs pass
// straight through. One clock per 3:2 level follows the source; the
// Wallace-style arrangement of the levels is this design's choice.
module ol_csa_tree
  import ol_pkg::*;
#(
  parameter int unsigned M = 9
) (
  input  logic clk,
  input  logic rst_n,
  input  sd_t  d_i [M],
  output sd_t  d_o [2]
);

  localparam int unsigned LEVELS = csa_levels(M);

  // number of streams entering level l
  function automatic int unsigned width_at(int unsigned l);
    int unsigned w;
    w = M;
    for (int unsigned i = 0; i < l; i++) w = csa_next(w);
    return w;
  endfunction

  // st[l][*] are the streams entering level l; entries beyond width_at(l)
  // are tied to zero
  sd_t st [LEVELS+1][M];

  for (genvar i = 0; i < int'(M); i++) begin : g_in
    assign st[0][i] = d_i[i];
  end

  for (genvar l = 0; l < int'(LEVELS); l++) begin : g_level
    localparam int unsigned WI = width_at(l);
    localparam int unsigned WO = csa_next(WI);
    localparam int unsigned G  = WI / 3;
    localparam int unsigned R  = WI % 3;

    for (genvar g = 0; g < int'(G); g++) begin : g_node
      ol_csa32 u_node (
        .clk     (clk),
        .rst_n   (rst_n),
        .a_i     (st[l][3*g]),
        .b_i     (st[l][3*g+1]),
        .c_i     (st[l][3*g+2]),
        .sum_o   (st[l+1][2*g]),
        .carry_o (st[l+1][2*g+1])
      );
    end

    for (genvar r = 0; r < int'(R); r++) begin : g_pass
      ol_sd_delay #(.DEPTH(2)) u_dly (
        .clk   (clk),
        .rst_n (rst_n),
        .d_i   (st[l][3*G+r]),
        .d_o   (st[l+1][2*G+r])
      );
    end

    for (genvar z = int'(WO); z < int'(M); z++) begin : g_unused
      assign st[l+1][z] = SD_ZERO;
    end
  end

  if (M == 1) begin : g_one
    assign d_o[0] = st[LEVELS][0];
    assign d_o[1] = SD_ZERO;
  end else begin : g_two
    assign d_o[0] = st[LEVELS][0];
    assign d_o[1] = st[LEVELS][1];
  end

endmodule
