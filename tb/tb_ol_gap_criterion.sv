// tb_ol_gap_criterion: self-checking test of the early-classification unit.
//
// K random signed-digit logit streams are generated; half the time they share
// their leading digits so the decision must wait for low digits. After each
// digit the running prefix values are applied. The testbench checks that the
// unit decides at the first digit where the leader is more than 2 units ahead
// (or at the last digit), that the class it reports is the true largest final
// logit, and the early flag.
module tb_ol_gap_criterion;
  import ol_pkg::*;

  localparam int unsigned K = 4, D = 24, QW = 32;
  localparam int unsigned CW = $clog2(K);

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 en, first, last;
  logic signed [QW-1:0] prefix_i [K];
  logic                 decided_o, early_o;
  logic [CW-1:0]        class_o;
  int                   checks = 0, failures = 0;
  int                   n_early = 0, n_late = 0;

  always #5 clk = ~clk;

  ol_gap_criterion #(.K(K), .QW(QW)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int     dg [K][D];
    longint pv [K];
    int     share, exp_step, got_step, best, lead, r;
    longint lv, sv;
    en = 1'b0; first = 1'b0; last = 1'b0;
    for (int k = 0; k < int'(K); k++) prefix_i[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int op = 0; op < 500; op++) begin
      share = (op % 2 == 0) ? int'($urandom_range(D, D - 6)) : int'($urandom_range(4, 0));
      for (int j = 0; j < int'(D); j++) begin
        r = int'($urandom_range(2, 0)) - 1;
        for (int k = 0; k < int'(K); k++)
          dg[k][j] = (j < share) ? r : int'($urandom_range(2, 0)) - 1;
      end
      for (int k = 0; k < int'(K); k++) pv[k] = 0;
      exp_step = -1; got_step = -1; lead = 0;
      for (int j = 0; j < int'(D); j++) begin
        for (int k = 0; k < int'(K); k++) pv[k] = pv[k] * 2 + longint'(dg[k][j]);
        // reference decision at this step
        best = 0;
        for (int k = 1; k < int'(K); k++) if (pv[k] > pv[best]) best = k;
        lv = pv[best]; sv = -64'sd1 <<< 40;
        for (int k = 0; k < int'(K); k++) if (k != best && pv[k] > sv) sv = pv[k];
        if (exp_step < 0 && (lv - sv > 2 || j == int'(D) - 1)) begin
          exp_step = j; lead = best;
        end
        @(negedge clk);
        if (got_step < 0 && decided_o && j > 0) got_step = j - 1;
        en = 1'b1; first = (j == 0); last = (j == int'(D) - 1);
        for (int k = 0; k < int'(K); k++) prefix_i[k] = QW'(pv[k]);
      end
      @(negedge clk);
      if (got_step < 0 && decided_o) got_step = int'(D) - 1;
      en = 1'b0; first = 1'b0; last = 1'b0;
      // true winner of the finished logits
      best = 0;
      for (int k = 1; k < int'(K); k++) if (pv[k] > pv[best]) best = k;
      checks += 4;
      if (got_step != exp_step) begin
        failures++;
        $display("FAIL op %0d: decided at digit %0d, expected %0d", op, got_step, exp_step);
      end
      if (int'(class_o) != lead) begin
        failures++;
        $display("FAIL op %0d: class %0d, expected %0d", op, class_o, lead);
      end
      if (pv[int'(class_o)] != pv[best]) begin
        failures++;
        $display("FAIL op %0d: class %0d is not the largest logit", op, class_o);
      end
      if (early_o != (exp_step < int'(D) - 1)) begin
        failures++;
        $display("FAIL op %0d: early flag", op);
      end
      if (early_o) n_early++; else n_late++;
    end
    checks++;
    if (n_early == 0 || n_late == 0) begin
      failures++;
      $display("FAIL: early %0d, full-length %0d decisions", n_early, n_late);
    end
    $display("early decisions %0d, full-length %0d", n_early, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
