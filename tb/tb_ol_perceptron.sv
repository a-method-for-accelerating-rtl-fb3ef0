// tb_ol_perceptron: self-checking test of one online perceptron at its
// default size (N = 64 inputs, 16-digit operands).
//
// Random Q8.8 weights for all weight sets are written as bit planes, random
// features are served digit by digit from a model of the register file, and
// random biases are applied. For every operation the testbench checks:
//   - u_o equals sum X_i*W_i + B exactly (integer reference),
//   - the MSD-first u digit stream adds up to the same value,
//   - done_o comes exactly 2*NB + DELTA + 2*LV + 6 = 61 cycles after start,
//   - y_o = (u >= 0), and y_valid_o rises one cycle after the first nonzero
//     digit of u (counted as early when that is before the last digit),
//   - an operation cancelled halfway leaves the next one correct.
// Some operations use small or extreme operands so both signs and both the
// early and the full-length activation decision occur.
module tb_ol_perceptron;
  import ol_pkg::*;

  localparam int unsigned N = 64, NB = 16, DELTA = 3, SETS = 4, DW = 8;
  localparam int unsigned LV = csa_levels(N + 1);
  localparam int unsigned D  = 2 * NB + LV + 1;
  localparam int unsigned UW = D + 1;
  localparam int unsigned AW = $clog2(SETS * NB);
  localparam int unsigned SW = $clog2(SETS);
  localparam int unsigned LAT = 2 * NB + DELTA + 2 * LV + 6;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 w_we;
  logic [AW-1:0]        w_waddr;
  logic [N-1:0]         w_wdata;
  logic [SW-1:0]        wset_i;
  logic [2*NB-1:0]      bias_i;
  logic                 start, cancel, busy_o;
  logic [DW-1:0]        x_dig_idx_o;
  sd_t                  x_dig_i [N];
  sd_t                  u_dig_o;
  logic                 u_dig_valid_o, u_dig_first_o, u_dig_last_o;
  logic signed [UW-1:0] u_prefix_o, u_o;
  logic                 done_o, y_o, y_valid_o, y_early_o;

  logic [NB-1:0] wv [SETS][N];
  logic [NB-1:0] xv [N];
  int checks = 0, failures = 0;
  int n_early = 0, n_pos = 0, n_neg = 0, n_cancel = 0;

  always #5 clk = ~clk;

  ol_perceptron #(.N(N), .NB(NB), .DELTA(DELTA), .SETS(SETS), .DW(DW)) dut (.*);

  // register-file model: digit x_dig_idx_o of every feature
  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      if (x_dig_idx_o == 0)               x_dig_i[i] = xv[i][NB-1] ? SD_NEG : SD_ZERO;
      else if (x_dig_idx_o < DW'(NB))     x_dig_i[i] = xv[i][NB-1-int'(x_dig_idx_o)] ? SD_POS : SD_ZERO;
      else                                x_dig_i[i] = SD_ZERO;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_weights();
    for (int s = 0; s < int'(SETS); s++)
      for (int j = 0; j < int'(NB); j++) begin
        @(negedge clk);
        w_we = 1'b1;
        w_waddr = AW'(s * int'(NB) + j);
        for (int i = 0; i < int'(N); i++) w_wdata[i] = wv[s][i][NB-1-j];
      end
    @(negedge clk) w_we = 1'b0;
  endtask

  task automatic run_op(int op, int set, longint bias, bit do_cancel);
    longint expv, sv;
    int cyc, first_nz, yv_at, dcount;
    bit got_done;
    expv = bias;
    for (int i = 0; i < int'(N); i++)
      expv += longint'($signed(xv[i])) * longint'($signed(wv[set][i]));
    @(negedge clk);
    wset_i = SW'(set);
    bias_i = (2*NB)'(bias);
    start  = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1; got_done = 0; sv = 0; first_nz = -1; yv_at = -1; dcount = 0;
    while (!got_done && cyc < 200) begin
      if (do_cancel && cyc == 25) begin
        cancel = 1'b1;
        @(negedge clk) cancel = 1'b0;
        checks++;
        if (busy_o) begin
          failures++;
          $display("FAIL op %0d: still busy after cancel", op);
        end
        n_cancel++;
        return;
      end
      if (yv_at < 0 && dcount > 0 && y_valid_o) yv_at = cyc;
      if (u_dig_valid_o) begin
        if (first_nz < 0 && (u_dig_o != SD_ZERO || u_dig_last_o)) first_nz = cyc;
        sv = sv * 2 + longint'(u_dig_o);
        dcount++;
      end
      if (done_o) got_done = 1;
      else begin
        @(negedge clk);
        cyc++;
      end
    end
    checks += 5;
    if (cyc != int'(LAT)) begin
      failures++;
      $display("FAIL op %0d: done after %0d cycles, expected %0d", op, cyc, LAT);
    end
    if (longint'(u_o) != expv) begin
      failures++;
      $display("FAIL op %0d: u = %0d, expected %0d", op, u_o, expv);
    end
    if (sv != expv || dcount != int'(D)) begin
      failures++;
      $display("FAIL op %0d: stream gives %0d in %0d digits", op, sv, dcount);
    end
    if (y_o != (expv >= 0) || !y_valid_o) begin
      failures++;
      $display("FAIL op %0d: y = %0d for u = %0d", op, y_o, expv);
    end
    // decision one cycle after the first nonzero digit (or the last digit)
    if (yv_at != first_nz + 1) begin
      failures++;
      $display("FAIL op %0d: activation decided in cycle %0d, first nonzero digit in %0d", op, yv_at, first_nz);
    end
    if (y_early_o) n_early++;
    if (expv >= 0) n_pos++; else n_neg++;
  endtask

  initial begin
    longint b;
    w_we = 1'b0; w_waddr = '0; w_wdata = '0; wset_i = '0; bias_i = '0;
    start = 1'b0; cancel = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int s = 0; s < int'(SETS); s++)
      for (int i = 0; i < int'(N); i++) begin
        wv[s][i] = NB'($urandom);
        if (s == 1) wv[s][i] = 16'h8000;      // extreme weights
        if (s == 2) wv[s][i] = NB'($urandom_range(3, 0)) - NB'(1);
      end
    write_weights();
    for (int op = 0; op < 60; op++) begin
      for (int i = 0; i < int'(N); i++) begin
        xv[i] = NB'($urandom);
        if (op == 1) xv[i] = 16'h8000;
        if (op == 2) xv[i] = 16'h0000;
      end
      b = longint'($signed(32'($urandom)));
      if (op == 2) b = 0;                    // u = 0 exactly
      run_op(op, (op < 3) ? (op == 1 ? 1 : 0) : op % int'(SETS), b, (op % 7) == 5);
    end
    checks++;
    if (n_early == 0 || n_pos == 0 || n_neg == 0 || n_cancel == 0) begin
      failures++;
      $display("FAIL: early %0d, positive %0d, negative %0d, cancelled %0d",
               n_early, n_pos, n_neg, n_cancel);
    end
    $display("early activations %0d, u>=0 %0d, u<0 %0d, cancelled %0d", n_early, n_pos, n_neg, n_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
