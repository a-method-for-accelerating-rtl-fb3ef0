// tb_ol_sd2bin: self-checking test of the on-the-fly converter.
//
// Random D-digit signed-digit streams (plus all +1, all -1 and all 0) are fed
// with one idle cycle between digits now and then; after every digit the
// prefix output must equal the value of the digits so far, and after the
// last one the full two's-complement value. Streams follow each other with
// `first` restarting the conversion.
module tb_ol_sd2bin;
  import ol_pkg::*;

  localparam int unsigned D = 43;
  localparam int unsigned W = D + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en, first;
  sd_t  d_i;
  logic signed [W-1:0] prefix_o;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  ol_sd2bin #(.W(W)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_v;
    int r;
    en = 1'b0; first = 1'b0; d_i = SD_ZERO;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int op = 0; op < 300; op++) begin
      ref_v = 0;
      for (int k = 0; k < int'(D); k++) begin
        @(negedge clk);
        r = int'($urandom_range(2, 0)) - 1;
        if (op == 0) r = 1;
        if (op == 1) r = -1;
        if (op == 2) r = 0;
        en    = 1'b1;
        first = (k == 0);
        d_i   = (r < 0) ? SD_NEG : (r > 0) ? SD_POS : SD_ZERO;
        ref_v = ref_v * 2 + longint'(r);
        @(negedge clk);
        en = 1'b0; first = 1'b0;
        checks++;
        if (longint'(prefix_o) != ref_v) begin
          failures++;
          $display("FAIL op %0d digit %0d: prefix %0d expected %0d", op, k, prefix_o, ref_v);
        end
        if ($urandom_range(3, 0) == 0) @(negedge clk);   // idle cycle
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
