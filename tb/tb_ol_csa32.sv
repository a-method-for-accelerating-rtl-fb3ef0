// tb_ol_csa32: self-checking test of the 3:2 signed-digit node.
//
// First every one of the 27 digit triples is applied alone, followed by
// zeros, and the registered outputs are checked: the carry digit one cycle
// later at twice the weight, the sum digit two cycles later, with
// a + b + c = 2*carry + sum. Then random streams check that the two output
// streams (one more leading digit, one cycle later) add up to the inputs.
module tb_ol_csa32;
  import ol_pkg::*;

  localparam int unsigned L = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  sd_t  a_i, b_i, c_i, sum_o, carry_o;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  ol_csa32 dut (.*);

  function automatic sd_t mk(int v);
    return (v < 0) ? SD_NEG : (v > 0) ? SD_POS : SD_ZERO;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cy, sm;
    longint vin, vout;
    sd_t sa [L], sb [L], sc [L];
    a_i = SD_ZERO; b_i = SD_ZERO; c_i = SD_ZERO;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // exhaustive single-position test
    for (int a = -1; a <= 1; a++)
      for (int b = -1; b <= 1; b++)
        for (int c = -1; c <= 1; c++) begin
          @(negedge clk);
          a_i = mk(a); b_i = mk(b); c_i = mk(c);
          @(negedge clk);
          a_i = SD_ZERO; b_i = SD_ZERO; c_i = SD_ZERO;
          cy = int'(carry_o);
          @(negedge clk);
          sm = int'(sum_o);
          checks++;
          if (2 * cy + sm != a + b + c) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: carry %0d sum %0d", a, b, c, cy, sm);
          end
          @(negedge clk);
        end
    // random streams
    for (int op = 0; op < 300; op++) begin
      vin = 0;
      for (int k = 0; k < int'(L); k++) begin
        sa[k] = mk(int'($urandom_range(2, 0)) - 1);
        sb[k] = mk(int'($urandom_range(2, 0)) - 1);
        sc[k] = mk(int'($urandom_range(2, 0)) - 1);
        vin += (longint'(sa[k]) + longint'(sb[k]) + longint'(sc[k])) <<< (L - 1 - k);
      end
      vout = 0;
      for (int k = 0; k < int'(L) + 3; k++) begin
        @(negedge clk);
        a_i = (k < int'(L)) ? sa[k] : SD_ZERO;
        b_i = (k < int'(L)) ? sb[k] : SD_ZERO;
        c_i = (k < int'(L)) ? sc[k] : SD_ZERO;
        // visible now: output digit k-1 of the streams (first digit weight 2^L)
        if (k >= 1 && k <= int'(L) + 1)
          vout += (longint'(sum_o) + longint'(carry_o)) <<< (int'(L) + 1 - k);
      end
      checks++;
      if (vin != vout) begin
        failures++;
        $display("FAIL stream %0d: in %0d out %0d", op, vin, vout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
