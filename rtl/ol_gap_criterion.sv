// ol_gap_criterion: early classification from K logits still being formed.
//
// K online perceptrons produce their logits MSD-first in lockstep; each
// converter exposes the running value of the digits received so far (prefix),
// an integer in units of the weight of the latest digit. The digits still to
// come add less than one such unit to each logit, so if the leading prefix
// exceeds every other by more than 2 units (gap > 2|R| with |R| = 1 unit), no
// later digit can change the ranking and the class is final. Otherwise the
// test repeats on the next digit; after the last digit the largest logit
// wins outright (ties go to the lowest index).
//
// Interface: `en` marks a cycle whose prefix values are new, `first` the
// first of an operation (clears the decision), `last` the final digit.
// decided_o, class_o and early_o are registered, rise the cycle after the
// deciding test and hold until the next `first`. The criterion is the
// source's; the bound is worked out here for a single already-reduced digit
// stream per logit rather than for N separate product streams.
module ol_gap_criterion #(
  parameter int unsigned K  = 4,    // classes
  parameter int unsigned QW = 44,   // prefix width
  parameter int unsigned CW = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 first,
  input  logic                 last,
  input  logic signed [QW-1:0] prefix_i [K],
  output logic                 decided_o,
  output logic [CW-1:0]        class_o,
  output logic                 early_o
);

  logic [CW-1:0]        lead;
  logic signed [QW-1:0] lead_v, second_v;
  logic signed [QW:0]   gap;
  logic                 have_second;
  logic                 dec_c;

  always_comb begin
    lead   = '0;
    lead_v = prefix_i[0];
    for (int k = 1; k < int'(K); k++) begin
      if (prefix_i[k] > lead_v) begin
        lead   = CW'(k);
        lead_v = prefix_i[k];
      end
    end
    second_v    = '0;
    have_second = 1'b0;
    for (int k = 0; k < int'(K); k++) begin
      if (CW'(k) != lead && (!have_second || prefix_i[k] > second_v)) begin
        second_v    = prefix_i[k];
        have_second = 1'b1;
      end
    end
    gap   = (QW+1)'(lead_v) - (QW+1)'(second_v);
    dec_c = first ? 1'b0 : decided_o;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      decided_o <= 1'b0;
      class_o   <= '0;
      early_o   <= 1'b0;
    end else if (en) begin
      if (first) begin
        decided_o <= 1'b0;
        early_o   <= 1'b0;
      end
      if (!dec_c && (!have_second || gap > (QW+1)'(2) || last)) begin
        decided_o <= 1'b1;
        class_o   <= lead;
        early_o   <= !last;
      end
    end
  end

endmodule
