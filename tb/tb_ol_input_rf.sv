// tb_ol_input_rf: self-checking test of the feature register file.
//
// Writes random values to all N elements, then for every digit index checks
// the digit of every element: index 0 gives -1 for a set sign bit, the other
// indices +1 for a set bit, indices >= NB give 0. Rebuilding each element
// from its digits must give its two's-complement value.
module tb_ol_input_rf;
  import ol_pkg::*;

  localparam int unsigned N = 64, NB = 16, DW = 8;
  localparam int unsigned IW = $clog2(N);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          we;
  logic [IW-1:0] widx;
  logic [NB-1:0] wdata;
  logic [DW-1:0] dig_idx;
  sd_t           x_dig_o [N];
  logic [NB-1:0] model [N];
  longint        acc [N];
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  ol_input_rf #(.N(N), .NB(NB), .DW(DW)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; widx = '0; wdata = '0; dig_idx = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < int'(N); i++) begin
        @(negedge clk);
        we = 1'b1; widx = IW'(i); wdata = NB'($urandom);
        if (rep == 0 && i == 0) wdata = 16'h8000;
        if (rep == 0 && i == 1) wdata = 16'h7fff;
        model[i] = wdata;
      end
      @(negedge clk) we = 1'b0;
      for (int i = 0; i < int'(N); i++) acc[i] = 0;
      for (int j = 0; j < int'(NB) + 3; j++) begin
        dig_idx = DW'(j);
        #1;
        for (int i = 0; i < int'(N); i++) begin
          if (j < int'(NB)) acc[i] = acc[i] * 2 + longint'(x_dig_o[i]);
          else begin
            checks++;
            if (x_dig_o[i] != SD_ZERO) begin
              failures++;
              $display("FAIL element %0d: digit %0d not zero", i, j);
            end
          end
        end
      end
      for (int i = 0; i < int'(N); i++) begin
        checks++;
        if (acc[i] != longint'($signed(model[i]))) begin
          failures++;
          $display("FAIL element %0d: digits give %0d, value %0d", i, acc[i], $signed(model[i]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
