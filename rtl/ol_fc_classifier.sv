// ol_fc_classifier: fully connected classifier layer of K online perceptrons
// with early classification by the gap criterion.
//
// All K perceptrons share one feature register file (N elements of NB bits)
// and run in lockstep, each with its own weight BRAM and bias, so their
// logits u_k form MSD-first at the same time. A gap-criterion unit watches
// the running values of the K logits: as soon as the leader is ahead of every
// other logit by more than twice what the remaining digits can still add, the
// class is final. With early_en set the layer then stops all perceptrons and
// reports the class (early termination); with early_en clear it runs to the
// last digit and also returns the exact logits and the K threshold outputs.
//
// Interface:
//   x_we/x_idx/x_data           write feature x_idx (NB-bit two's complement)
//   w_we/w_class/w_waddr/w_wdata write one weight bit plane of class w_class
//                               (word s*NB+j = bit NB-1-j of the N weights of
//                               set s, lane i in bit i)
//   bias_i[k]                   2NB-bit bias of class k at product scale
//   wset_i                      weight set used by all classes
//   start/busy_o/done_o         start when idle; done_o pulses with the result
//   class_o/class_early_o       winning class, and whether it was decided
//                               before the last digit
//   u_o[k], y_o[k], y_valid_o   logits and threshold outputs (complete when
//                               the run was not cut short)
//   fp_*                        floating-point alignment loop (ol_fp_align):
//                               exponents first, then N mantissa digit
//                               streams leave aligned to the largest exponent.
//                               The fixed-point Q8.8 layer does not use it;
//                               it is brought out for floating-point operands
// Timing: without early termination done_o comes 62 cycles after start at the
// default sizes; with it, three cycles after the deciding digit of the logits.
//
// From the source: the perceptron as the element of the FC classifier, the
// 64-element feature vector, 4 classes, Q8.8 operands, the gap criterion
// and early termination. This design's choices: the shared register file,
// lockstep operation of the K cores, the early_en switch and the handshake.
module ol_fc_classifier
  import ol_pkg::*;
#(
  parameter int unsigned N     = 64,        // features (FC input length)
  parameter int unsigned K     = 4,         // classes (output neurons)
  parameter int unsigned NB    = 16,        // operand digits, Q8.8
  parameter int unsigned DELTA = OL_DELTA,  // online delay p
  parameter int unsigned SETS  = 4,         // weight sets per class BRAM
  parameter int unsigned EW    = 8,         // floating-point exponent width
  parameter int unsigned MAXSH = 16,        // largest mantissa alignment shift
  // derived
  parameter int unsigned LV    = csa_levels(N + 1),
  parameter int unsigned D     = 2 * NB + LV + 1,
  parameter int unsigned UW    = D + 1,
  parameter int unsigned AW    = $clog2(SETS * NB),
  parameter int unsigned SW    = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned IW    = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned CW    = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // feature register file
  input  logic                 x_we,
  input  logic [IW-1:0]        x_idx,
  input  logic [NB-1:0]        x_data,
  // weight memories
  input  logic                 w_we,
  input  logic [CW-1:0]        w_class,
  input  logic [AW-1:0]        w_waddr,
  input  logic [N-1:0]         w_wdata,
  // operation
  input  logic [SW-1:0]        wset_i,
  input  logic [2*NB-1:0]      bias_i [K],
  input  logic                 early_en,
  input  logic                 start,
  output logic                 busy_o,
  output logic                 done_o,
  output logic [CW-1:0]        class_o,
  output logic                 class_early_o,
  output logic signed [UW-1:0] u_o [K],
  output logic [K-1:0]         y_o,
  output logic [K-1:0]         y_valid_o,
  // floating-point alignment front end (exponents first, then mantissas)
  input  logic                 fp_exp_valid,
  input  logic [EW-1:0]        fp_exp_i   [N],
  output logic [EW-1:0]        fp_emax_o,
  output logic [EW-1:0]        fp_shift_o [N],
  input  sd_t                  fp_m_i     [N],
  output sd_t                  fp_m_o     [N]
);

  localparam int unsigned DW = 8;

  logic [DW-1:0] dig_idx [K];
  sd_t           x_dig [N];
  logic [K-1:0]  busy, done, uv, uf, ul, ye;
  sd_t           u_dig [K];
  logic signed [UW-1:0] prefix [K];
  logic          cancel;
  logic          gap_en, gap_first, gap_last;
  logic          decided, early;
  logic          run_q;

  ol_input_rf #(.N(N), .NB(NB), .IW(IW), .DW(DW)) u_rf (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (x_we),
    .widx    (x_idx),
    .wdata   (x_data),
    .dig_idx (dig_idx[0]),
    .x_dig_o (x_dig)
  );

  for (genvar c = 0; c < int'(K); c++) begin : g_class
    ol_perceptron #(
      .N(N), .NB(NB), .DELTA(DELTA), .SETS(SETS), .DW(DW),
      .LV(LV), .D(D), .UW(UW), .AW(AW), .SW(SW)
    ) u_neuron (
      .clk           (clk),
      .rst_n         (rst_n),
      .w_we          (w_we && w_class == CW'(c)),
      .w_waddr       (w_waddr),
      .w_wdata       (w_wdata),
      .wset_i        (wset_i),
      .bias_i        (bias_i[c]),
      .start         (start && !busy_o),
      .cancel        (cancel),
      .busy_o        (busy[c]),
      .x_dig_idx_o   (dig_idx[c]),
      .x_dig_i       (x_dig),
      .u_dig_o       (u_dig[c]),
      .u_dig_valid_o (uv[c]),
      .u_dig_first_o (uf[c]),
      .u_dig_last_o  (ul[c]),
      .u_prefix_o    (prefix[c]),
      .u_o           (u_o[c]),
      .done_o        (done[c]),
      .y_o           (y_o[c]),
      .y_valid_o     (y_valid_o[c]),
      .y_early_o     (ye[c])
    );
  end

  // alignment loop for floating-point operands: it stands beside the
  // fixed-point layer with its own ports and aligns N mantissa streams
  ol_fp_align #(.LANES(N), .EW(EW), .MAXSH(MAXSH)) u_fp_align (
    .clk       (clk),
    .rst_n     (rst_n),
    .exp_valid (fp_exp_valid),
    .exp_i     (fp_exp_i),
    .emax_o    (fp_emax_o),
    .shift_o   (fp_shift_o),
    .m_i       (fp_m_i),
    .m_o       (fp_m_o)
  );

  // the prefix values settle one cycle after each digit
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gap_en    <= 1'b0;
      gap_first <= 1'b0;
      gap_last  <= 1'b0;
    end else begin
      gap_en    <= uv[0] && !cancel;
      gap_first <= uf[0] && !cancel;
      gap_last  <= ul[0] && !cancel;
    end
  end

  ol_gap_criterion #(.K(K), .QW(UW), .CW(CW)) u_gap (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (gap_en),
    .first     (gap_first),
    .last      (gap_last),
    .prefix_i  (prefix),
    .decided_o (decided),
    .class_o   (class_o),
    .early_o   (early)
  );

  // an operation is finished when the class is known (early mode) or when
  // the class is known and the perceptrons are done (full mode)
  logic full_done_q;   // perceptrons finished, waiting for the last gap test
  logic started_q;     // the gap unit has seen this operation's first digit

  assign cancel = run_q && started_q && early_en && decided && busy[0];
  assign busy_o = run_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q         <= 1'b0;
      done_o        <= 1'b0;
      class_early_o <= 1'b0;
      full_done_q   <= 1'b0;
      started_q     <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (!run_q) begin
        if (start) begin
          run_q       <= 1'b1;
          full_done_q <= 1'b0;
          started_q   <= 1'b0;
        end
      end else begin
        if (done[0])   full_done_q <= 1'b1;
        if (gap_first) started_q   <= 1'b1;
        if (started_q && decided && ((early_en && busy[0]) || done[0] || full_done_q)) begin
          run_q         <= 1'b0;
          done_o        <= 1'b1;
          class_early_o <= early;
        end
      end
    end
  end

endmodule
