// tb_ol_add: self-checking test of the online root adder.
//
// Random signed-digit stream pairs (and the all +1 / all -1 extremes) go in;
// the output stream, which starts two cycles later with one more leading
// digit, must hold only digits from {-1,0,1} and add up to exactly a + b.
module tb_ol_add;
  import ol_pkg::*;

  localparam int unsigned L = 30;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  sd_t  a_i, b_i, z_o;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  ol_add dut (.*);

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
    longint vin, vout;
    sd_t sa [L], sb [L];
    a_i = SD_ZERO; b_i = SD_ZERO;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int op = 0; op < 500; op++) begin
      vin = 0;
      for (int k = 0; k < int'(L); k++) begin
        sa[k] = (op == 0) ? SD_POS : (op == 1) ? SD_NEG : mk(int'($urandom_range(2, 0)) - 1);
        sb[k] = (op == 0) ? SD_POS : (op == 1) ? SD_NEG : mk(int'($urandom_range(2, 0)) - 1);
        vin += (longint'(sa[k]) + longint'(sb[k])) <<< (L - 1 - k);
      end
      vout = 0;
      for (int k = 0; k < int'(L) + 4; k++) begin
        @(negedge clk);
        a_i = (k < int'(L)) ? sa[k] : SD_ZERO;
        b_i = (k < int'(L)) ? sb[k] : SD_ZERO;
        checks++;
        if (z_o == 2'sb10) begin
          failures++;
          $display("FAIL op %0d: illegal digit", op);
        end
        // visible now: output digit k-2 (first digit weight 2^L)
        if (k >= 2 && k <= int'(L) + 2)
          vout += longint'(z_o) <<< (int'(L) + 2 - k);
        else if (k < 2 && z_o != SD_ZERO) begin
          failures++;
          $display("FAIL op %0d: output ahead of the online delay", op);
        end
      end
      checks++;
      if (vin != vout) begin
        failures++;
        $display("FAIL op %0d: in %0d out %0d", op, vin, vout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
