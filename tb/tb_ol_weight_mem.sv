// tb_ol_weight_mem: self-checking test of the bit-plane weight memory.
//
// Fills every word with random data, then reads all words back in random
// order (one per cycle, data one cycle after the address) against a copy
// kept in the testbench, and checks a write followed by a read of the same
// word in the next cycle.
module tb_ol_weight_mem;

  localparam int unsigned N = 64, NB = 16, SETS = 4;
  localparam int unsigned AW = $clog2(SETS * NB);

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [N-1:0]  wdata, rdata_o;
  logic [N-1:0]  model [SETS * NB];
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  ol_weight_mem #(.N(N), .NB(NB), .SETS(SETS)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] a;
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < int'(SETS * NB); i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = {$urandom, $urandom};
      model[i] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int r = 0; r < 500; r++) begin
      a = AW'($urandom_range(SETS * NB - 1, 0));
      @(negedge clk) raddr = a;
      @(negedge clk);
      checks++;
      if (rdata_o != model[a]) begin
        failures++;
        $display("FAIL read %0d: %h expected %h", a, rdata_o, model[a]);
      end
    end
    // write then read back
    for (int r = 0; r < 50; r++) begin
      a = AW'($urandom_range(SETS * NB - 1, 0));
      @(negedge clk);
      we = 1'b1; waddr = a; wdata = {$urandom, $urandom}; model[a] = wdata;
      @(negedge clk);
      we = 1'b0; raddr = a;
      @(negedge clk);
      checks++;
      if (rdata_o != model[a]) begin
        failures++;
        $display("FAIL write/read %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
