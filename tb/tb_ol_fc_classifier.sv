// tb_ol_fc_classifier: end-to-end test of the FC classifier layer at its
// default size (64 Q8.8 features, 4 classes, 16-digit operands), no
// parameter overrides.
//
// For every test vector the features, the weights of a chosen weight set and
// the biases are loaded through the layer's write ports. Each vector runs
// twice: once with early termination off (the exact logits u_k = sum
// X_i*W_k,i + B_k, the threshold outputs y_k = (u_k >= 0) and the class are
// checked, and done_o must come 62 cycles after start) and once with it on
// (the same class must come back, no later than in the full run). Vectors
// come in three kinds: random weights (clear winner, early decision), classes
// with almost equal weights and biases (the decision has to wait for the low
// digits, sometimes to the last one), and exact ties (lowest class index
// wins). The testbench counts early decisions, full-length decisions,
// cancelled runs, weight-set switches and both threshold outcomes, and fails
// if any of them never happened.
module tb_ol_fc_classifier;
  import ol_pkg::*;

  localparam int unsigned N = 64, K = 4, NB = 16, SETS = 4;
  localparam int unsigned LV = csa_levels(N + 1);
  localparam int unsigned D  = 2 * NB + LV + 1;
  localparam int unsigned UW = D + 1;
  localparam int unsigned AW = $clog2(SETS * NB);
  localparam int unsigned SW = $clog2(SETS);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned CW = $clog2(K);
  localparam int unsigned FULL_LAT = 2 * NB + 3 + 2 * LV + 7;   // 62

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 x_we;
  logic [IW-1:0]        x_idx;
  logic [NB-1:0]        x_data;
  logic                 w_we;
  logic [CW-1:0]        w_class;
  logic [AW-1:0]        w_waddr;
  logic [N-1:0]         w_wdata;
  logic [SW-1:0]        wset_i;
  logic [2*NB-1:0]      bias_i [K];
  logic                 early_en, start, busy_o, done_o;
  logic [CW-1:0]        class_o;
  logic                 class_early_o;
  logic signed [UW-1:0] u_o [K];
  logic [K-1:0]         y_o, y_valid_o;
  logic                 fp_exp_valid;
  logic [7:0]           fp_exp_i [N];
  logic [7:0]           fp_emax_o;
  logic [7:0]           fp_shift_o [N];
  sd_t                  fp_m_i [N];
  sd_t                  fp_m_o [N];

  ol_fc_classifier dut (.*);

  logic [NB-1:0] xv [N];
  logic [NB-1:0] wv [K][N];
  longint        bv [K];
  longint        uexp [K];
  int checks = 0, failures = 0;
  int n_early = 0, n_full = 0, n_cancel = 0, n_set = 0, n_ypos = 0, n_yneg = 0, n_tie = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int set);
    for (int i = 0; i < int'(N); i++) begin
      @(negedge clk);
      x_we = 1'b1; x_idx = IW'(i); x_data = xv[i];
    end
    @(negedge clk) x_we = 1'b0;
    for (int c = 0; c < int'(K); c++)
      for (int j = 0; j < int'(NB); j++) begin
        @(negedge clk);
        w_we = 1'b1; w_class = CW'(c); w_waddr = AW'(set * int'(NB) + j);
        for (int i = 0; i < int'(N); i++) w_wdata[i] = wv[c][i][NB-1-j];
      end
    @(negedge clk) w_we = 1'b0;
    for (int c = 0; c < int'(K); c++) bias_i[c] = (2*NB)'(bv[c]);
  endtask

  // run once; returns class and cycles from start to done
  task automatic run(bit early, int set, output int cls, output int lat, output bit was_early);
    int cyc;
    @(negedge clk);
    early_en = early; wset_i = SW'(set); start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done_o && cyc < 500) begin
      @(negedge clk);
      cyc++;
    end
    cls = int'(class_o); lat = cyc; was_early = class_early_o;
  endtask

  initial begin
    int kind, set, prev_set, best, c_full, c_early, l_full, l_early;
    bit e_full, e_early;
    x_we = 1'b0; x_idx = '0; x_data = '0; w_we = 1'b0; w_class = '0;
    w_waddr = '0; w_wdata = '0; wset_i = '0; early_en = 1'b0; start = 1'b0;
    for (int c = 0; c < int'(K); c++) bias_i[c] = '0;
    fp_exp_valid = 1'b0;
    for (int i = 0; i < int'(N); i++) begin fp_exp_i[i] = 8'(120 + i % 8); fp_m_i[i] = SD_ZERO; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // floating-point alignment: lane i has exponent 120 + i%8, emax = 127;
    // a single +1 digit sent on every lane must come out 7 - i%8 cycles late
    @(negedge clk) fp_exp_valid = 1'b1;
    @(negedge clk) fp_exp_valid = 1'b0;
    checks++;
    if (fp_emax_o != 8'd127) begin
      failures++;
      $display("FAIL: floating-point emax %0d", fp_emax_o);
    end
    for (int c = 0; c < 10; c++) begin
      for (int i = 0; i < int'(N); i++) fp_m_i[i] = (c == 0) ? SD_POS : SD_ZERO;
      #1;
      for (int i = 0; i < int'(N); i++) begin
        checks++;
        if (fp_m_o[i] != ((c == 7 - i % 8) ? SD_POS : SD_ZERO)) begin
          failures++;
          $display("FAIL: aligned digit lane %0d cycle %0d", i, c);
        end
      end
      @(negedge clk);
    end
    prev_set = 0;
    for (int v = 0; v < 48; v++) begin
      kind = v % 3;
      set  = (v / 3) % int'(SETS);
      for (int i = 0; i < int'(N); i++) begin
        xv[i] = NB'($urandom);
        wv[0][i] = NB'($urandom);
      end
      bv[0] = longint'($signed(32'($urandom)));
      for (int c = 1; c < int'(K); c++) begin
        for (int i = 0; i < int'(N); i++)
          wv[c][i] = (kind == 0) ? NB'($urandom)
                   : (kind == 1 && i == c) ? wv[0][i] ^ NB'(1) : wv[0][i];
        bv[c] = (kind == 0) ? longint'($signed(32'($urandom))) : bv[0];
      end
      load(set);
      if (set != prev_set) n_set++;
      prev_set = set;
      for (int c = 0; c < int'(K); c++) begin
        uexp[c] = bv[c];
        for (int i = 0; i < int'(N); i++)
          uexp[c] += longint'($signed(xv[i])) * longint'($signed(wv[c][i]));
      end
      best = 0;
      for (int c = 1; c < int'(K); c++) if (uexp[c] > uexp[best]) best = c;
      if (kind == 2) n_tie++;

      // full-length run
      run(1'b0, set, c_full, l_full, e_full);
      checks += 3;
      if (c_full != best) begin
        failures++;
        $display("FAIL vector %0d: class %0d, expected %0d", v, c_full, best);
      end
      if (l_full != int'(FULL_LAT)) begin
        failures++;
        $display("FAIL vector %0d: full run took %0d cycles, expected %0d", v, l_full, FULL_LAT);
      end
      for (int c = 0; c < int'(K); c++) begin
        checks += 2;
        if (longint'(u_o[c]) != uexp[c]) begin
          failures++;
          $display("FAIL vector %0d: logit %0d = %0d, expected %0d", v, c, u_o[c], uexp[c]);
        end
        if (!y_valid_o[c] || y_o[c] != (uexp[c] >= 0)) begin
          failures++;
          $display("FAIL vector %0d: y%0d = %0d for u = %0d", v, c, y_o[c], uexp[c]);
        end
        if (uexp[c] >= 0) n_ypos++; else n_yneg++;
      end
      if (e_full) n_early++; else n_full++;

      // early-termination run
      run(1'b1, set, c_early, l_early, e_early);
      checks += 3;
      if (c_early != best) begin
        failures++;
        $display("FAIL vector %0d: early-mode class %0d, expected %0d", v, c_early, best);
      end
      if (e_early != e_full) begin
        failures++;
        $display("FAIL vector %0d: early flag differs between modes", v);
      end
      if (e_early ? (l_early >= l_full) : (l_early > l_full)) begin
        failures++;
        $display("FAIL vector %0d: early mode took %0d cycles, full %0d", v, l_early, l_full);
      end
      if (e_early) n_cancel++;
    end
    checks++;
    if (n_early == 0 || n_full == 0 || n_cancel == 0 || n_set == 0 ||
        n_ypos == 0 || n_yneg == 0 || n_tie == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("early decisions %0d, full-length decisions %0d, early-terminated runs %0d",
             n_early, n_full, n_cancel);
    $display("weight-set switches %0d, y=1 %0d, y=0 %0d, tie vectors %0d",
             n_set, n_ypos, n_yneg, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
