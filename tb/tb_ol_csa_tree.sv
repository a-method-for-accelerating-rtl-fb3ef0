// tb_ol_csa_tree: self-checking test of the 3:2 reduction tree.
//
// M random signed-digit streams of L digits (then zeros) enter together. The
// two output streams must start LEVELS cycles later, carry LEVELS more
// leading digits, be zero before that, and add up to exactly the sum of the
// inputs. Runs the 65-stream tree of the default perceptron (10 levels).
module tb_ol_csa_tree;
  import ol_pkg::*;

  localparam int unsigned M   = 65;
  localparam int unsigned LEV = csa_levels(M);
  localparam int unsigned L   = 24;
  localparam int unsigned OPS = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  sd_t  d_i [M];
  sd_t  d_o [2];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  ol_csa_tree #(.M(M)) dut (.*);

  function automatic sd_t rnd_dig(int mode);
    int r;
    r = int'($urandom_range(2, 0));
    if (mode == 1) return SD_POS;          // all +1: largest carries
    if (mode == 2) return SD_NEG;          // all -1
    return (r == 0) ? SD_NEG : (r == 1) ? SD_ZERO : SD_POS;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint vin, vout;
    sd_t    st [M][L];
    for (int i = 0; i < int'(M); i++) d_i[i] = SD_ZERO;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    if (LEV != 10) begin
      failures++;
      $display("FAIL levels for 65 streams: %0d", LEV);
    end
    for (int op = 0; op < int'(OPS); op++) begin
      vin = 0;
      for (int i = 0; i < int'(M); i++)
        for (int c = 0; c < int'(L); c++) begin
          st[i][c] = rnd_dig(op < 3 ? op : 0);
          vin += longint'(st[i][c]) <<< (L - 1 - c);
        end
      vout = 0;
      for (int c = 0; c < int'(L + 2*LEV + 2); c++) begin
        @(negedge clk);
        for (int i = 0; i < int'(M); i++) d_i[i] = (c < int'(L)) ? st[i][c] : SD_ZERO;
        #1;
        // outputs now show what left the tree this cycle
        if (c < int'(LEV)) begin
          checks++;
          if (c > 0 && (d_o[0] != SD_ZERO || d_o[1] != SD_ZERO)) begin
            failures++;
            $display("FAIL op %0d: output before the tree latency, cycle %0d", op, c);
          end
        end else if (c < int'(L + 2*LEV)) begin
          vout += (longint'(d_o[0]) + longint'(d_o[1])) <<< (L - 1 + LEV - (c - LEV));
        end else begin
          checks++;
          if (d_o[0] != SD_ZERO || d_o[1] != SD_ZERO) begin
            failures++;
            $display("FAIL op %0d: digits after the end of the stream", op);
          end
        end
      end
      checks++;
      if (vin != vout) begin
        failures++;
        $display("FAIL op %0d: sum in %0d, sum out %0d", op, vin, vout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
