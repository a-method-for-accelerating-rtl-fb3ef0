// ol_sd2bin: redundant-to-binary converter (on-the-fly conversion).
//
// Turns an MSD-first signed-digit stream into a two's-complement word while
// the digits arrive, without a carry-propagate adder. Two registers are kept:
// Q, the value of the digits seen so far, and QM = Q - 1. Each digit d only
// appends one bit to one of them:
//     d = +1: Q <- {Q,1}   QM <- {Q,0}
//     d =  0: Q <- {Q,0}   QM <- {QM,1}
//     d = -1: Q <- {QM,1}  QM <- {QM,0}
// so the converter's work per digit is a 2:1 choice and a shift, whatever the
// word width. After D digits Q holds the whole value as a signed integer in
// units of the last digit's weight.
//
// Interface: `en` marks a digit cycle, `first` (with `en`) the first digit of
// a stream, which restarts Q = 0, QM = -1. prefix_o is Q after the digits
// received so far (the running MSD-first estimate of the result, used for
// early decisions); it settles one cycle after each digit. The source
// specifies an MSD-first conversion with bounded carry storage; on-the-fly
// conversion is the standard method of that kind and was chosen here.
module ol_sd2bin
  import ol_pkg::*;
#(
  parameter int unsigned W = 44   // output width: digits of the stream + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                first,
  input  sd_t                 d_i,
  output logic signed [W-1:0] prefix_o
);

  logic [W-1:0] q_q, qm_q, q_c, qm_c;

  always_comb begin
    q_c  = (first) ? '0 : q_q;
    qm_c = (first) ? '1 : qm_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_q  <= '0;
      qm_q <= '1;
    end else if (en) begin
      unique case (d_i)
        SD_POS: begin q_q <= {q_c[W-2:0], 1'b1};  qm_q <= {q_c[W-2:0], 1'b0};  end
        SD_NEG: begin q_q <= {qm_c[W-2:0], 1'b1}; qm_q <= {qm_c[W-2:0], 1'b0}; end
        default: begin q_q <= {q_c[W-2:0], 1'b0}; qm_q <= {qm_c[W-2:0], 1'b1}; end
      endcase
    end
  end

  assign prefix_o = signed'(q_q);

endmodule
