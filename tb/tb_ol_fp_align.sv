// tb_ol_fp_align: self-checking test of the exponent-first alignment loop.
//
// Each round presents random exponents of all lanes (some far below the
// maximum, beyond MAXSH), then random mantissa digit streams. The testbench
// checks the maximum exponent, every lane's shift, and that every aligned
// output digit equals the input digit s_i cycles earlier (0 before the
// stream, and always 0 for lanes shifted beyond MAXSH), i.e. the value
// of each output stream is the mantissa times 2^-s_i.
module tb_ol_fp_align;
  import ol_pkg::*;

  localparam int unsigned LANES = 64, EW = 8, MAXSH = 16, L = 12;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          exp_valid;
  logic [EW-1:0] exp_i   [LANES];
  logic [EW-1:0] emax_o;
  logic [EW-1:0] shift_o [LANES];
  sd_t           m_i     [LANES];
  sd_t           m_o     [LANES];
  int checks = 0, failures = 0, n_drop = 0;

  always #5 clk = ~clk;

  ol_fp_align #(.LANES(LANES), .EW(EW), .MAXSH(MAXSH)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  ev [LANES];
    int  em, s;
    sd_t md [LANES][L];
    sd_t want;
    exp_valid = 1'b0;
    for (int i = 0; i < int'(LANES); i++) begin exp_i[i] = '0; m_i[i] = SD_ZERO; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 60; r++) begin
      em = 0;
      for (int i = 0; i < int'(LANES); i++) begin
        ev[i] = 100 + int'($urandom_range(30, 0));
        if (ev[i] > em) em = ev[i];
        for (int j = 0; j < int'(L); j++)
          md[i][j] = sd_t'(int'($urandom_range(2, 0)) - 1);
      end
      // exponent phase
      @(negedge clk);
      exp_valid = 1'b1;
      for (int i = 0; i < int'(LANES); i++) begin exp_i[i] = EW'(ev[i]); m_i[i] = SD_ZERO; end
      @(negedge clk);
      exp_valid = 1'b0;
      checks++;
      if (int'(emax_o) != em) begin
        failures++;
        $display("FAIL round %0d: emax %0d, expected %0d", r, emax_o, em);
      end
      for (int i = 0; i < int'(LANES); i++) begin
        checks++;
        if (int'(shift_o[i]) != em - ev[i]) begin
          failures++;
          $display("FAIL round %0d lane %0d: shift %0d", r, i, shift_o[i]);
        end
        if (em - ev[i] > int'(MAXSH)) n_drop++;
      end
      // mantissa phase: cycle c carries digit c
      for (int c = 0; c < int'(L + MAXSH + 1); c++) begin
        for (int i = 0; i < int'(LANES); i++) m_i[i] = (c < int'(L)) ? md[i][c] : SD_ZERO;
        #1;
        for (int i = 0; i < int'(LANES); i++) begin
          s = em - ev[i];
          want = SD_ZERO;
          if (s <= int'(MAXSH) && c - s >= 0 && c - s < int'(L)) want = md[i][c - s];
          checks++;
          if (m_o[i] != want) begin
            failures++;
            $display("FAIL round %0d lane %0d cycle %0d: digit %0d, expected %0d", r, i, c, m_o[i], want);
          end
        end
        @(negedge clk);
      end
    end
    checks++;
    if (n_drop == 0) begin
      failures++;
      $display("FAIL: no lane was shifted beyond MAXSH");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
