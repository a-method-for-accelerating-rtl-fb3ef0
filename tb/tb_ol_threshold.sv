// tb_ol_threshold: self-checking test of the digit-serial threshold unit.
//
// Streams with a random number of leading zeros and random digits after them
// are applied; y must equal (value >= 0), y_valid must rise exactly one cycle
// after the first nonzero digit (early decision), and an all-zero stream
// must give y = 1 only after its last digit.
module tb_ol_threshold;
  import ol_pkg::*;

  localparam int unsigned D = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en, first, last;
  sd_t  d_i;
  logic decided_o, y_o, early_o;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  ol_threshold dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    int lz, r, dec_at, seen_at;
    sd_t s [D];
    en = 1'b0; first = 1'b0; last = 1'b0; d_i = SD_ZERO;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int op = 0; op < 400; op++) begin
      lz = int'($urandom_range(D, 0));     // lz = D: all zeros
      v = 0; dec_at = -1;
      for (int k = 0; k < int'(D); k++) begin
        r = (k < lz) ? 0 : int'($urandom_range(2, 0)) - 1;
        s[k] = (r < 0) ? SD_NEG : (r > 0) ? SD_POS : SD_ZERO;
        if (dec_at < 0 && r != 0) dec_at = k;
        v = v * 2 + longint'(r);
      end
      if (dec_at < 0) dec_at = int'(D) - 1;
      seen_at = -1;
      for (int k = 0; k < int'(D) + 1; k++) begin
        @(negedge clk);
        if (seen_at < 0 && decided_o && k > 0) seen_at = k - 1;
        en = (k < int'(D)); first = (k == 0); last = (k == int'(D) - 1);
        d_i = (k < int'(D)) ? s[k] : SD_ZERO;
      end
      @(negedge clk);
      en = 1'b0; first = 1'b0; last = 1'b0;
      checks += 3;
      if (y_o != (v >= 0)) begin
        failures++;
        $display("FAIL op %0d: value %0d y %0d", op, v, y_o);
      end
      if (seen_at != dec_at) begin
        failures++;
        $display("FAIL op %0d: decided after digit %0d, expected %0d", op, seen_at, dec_at);
      end
      if (early_o != (dec_at < int'(D) - 1)) begin
        failures++;
        $display("FAIL op %0d: early flag %0d", op, early_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
