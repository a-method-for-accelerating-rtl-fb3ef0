// tb_ol_mult: self-checking test of the online multiplier.
//
// Random and corner-case NB-bit operands are turned into MSD-first digit
// streams (sign bit -> digit -1), fed one digit pair per clock, and the 2*NB
// product digits are summed back into an integer that must equal X*W. It
// also checks that the output stays 0 during the DELTA-cycle warm-up, that
// the first digit appears DELTA+1 cycles after `first`, and that operations
// can follow one another with no idle cycle.
module tb_ol_mult;
  import ol_pkg::*;

  localparam int unsigned NB    = 16;
  localparam int unsigned DELTA = 3;
  localparam int unsigned OPS   = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic first;
  sd_t  x_i, w_i, p_o;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  ol_mult #(.NB(NB), .DELTA(DELTA)) dut (.*);

  function automatic sd_t dig(logic [NB-1:0] v, int j);
    if (j >= int'(NB)) return SD_ZERO;
    if (j == 0)        return v[NB-1] ? SD_NEG : SD_ZERO;
    return v[NB-1-j] ? SD_POS : SD_ZERO;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] xv, wv;
    longint acc, expv;
    int cyc;
    first = 1'b0; x_i = SD_ZERO; w_i = SD_ZERO;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int op = 0; op < int'(OPS); op++) begin
      case (op)
        0: begin xv = 16'h8000; wv = 16'h8000; end
        1: begin xv = 16'h7fff; wv = 16'h7fff; end
        2: begin xv = 16'h8000; wv = 16'h7fff; end
        3: begin xv = 16'h0000; wv = 16'h1234; end
        4: begin xv = 16'hffff; wv = 16'hffff; end
        default: begin xv = NB'($urandom); wv = NB'($urandom); end
      endcase
      expv = longint'($signed(xv)) * longint'($signed(wv));
      acc  = 0;
      // operations back to back: the next `first` follows the last digit
      for (cyc = 0; cyc < int'(2*NB + DELTA); cyc++) begin
        @(negedge clk);
        first = (cyc == 0);
        x_i   = dig(xv, cyc);
        w_i   = dig(wv, cyc);
        @(posedge clk); #1;
        if (cyc < int'(DELTA)) begin
          checks++;
          if (p_o != SD_ZERO) begin
            failures++;
            $display("FAIL op %0d: digit during warm-up, cycle %0d", op, cyc);
          end
        end else begin
          acc = acc * 2 + longint'(p_o);
        end
      end
      checks++;
      if (acc != expv) begin
        failures++;
        $display("FAIL op %0d: %h * %h = %0d, got %0d", op, xv, wv, expv, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
