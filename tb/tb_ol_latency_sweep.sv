// tb_ol_latency_sweep: the operand-width sweep at N = 128 inputs.
//
// Runs online perceptrons with 128 inputs and 8-, 12-, 16- and 20-digit
// operands side by side (the sizes of the published latency comparison),
// checks every result exactly and every latency against
// 2n + 3 + 2*LV + 6 cycles (LV = 11 levels of 3:2 nodes for 129 streams),
// and prints the measured latencies.
module tb_ol_latency_sweep;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   c [4], f [4], lat [4];
  logic fin [4];
  int   checks, failures;

  always #5 clk = ~clk;

  tb_ol_sweep_point #(.N(128), .NB(8))  p8  (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .latency(lat[0]), .finished(fin[0]));
  tb_ol_sweep_point #(.N(128), .NB(12)) p12 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .latency(lat[1]), .finished(fin[1]));
  tb_ol_sweep_point #(.N(128), .NB(16)) p16 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .latency(lat[2]), .finished(fin[2]));
  tb_ol_sweep_point #(.N(128), .NB(20)) p20 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .latency(lat[3]), .finished(fin[3]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("N = 128: latency n=8 %0d, n=12 %0d, n=16 %0d, n=20 %0d cycles",
             lat[0], lat[1], lat[2], lat[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
