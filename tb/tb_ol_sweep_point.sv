// tb_ol_sweep_point: one size point of the latency sweep (helper of
// tb_ol_latency_sweep).
//
// Instantiates an online perceptron with N inputs and NB-digit operands,
// loads random weights, runs OPS random operations and checks each result
// exactly against sum X_i*W_i + B and the latency against
// 2*NB + 3 + 2*LV + 6 cycles. Reports its counts on its ports and raises
// `finished` when done; it shares the clock of the sweep testbench.
module tb_ol_sweep_point
  import ol_pkg::*;
#(
  parameter int unsigned N   = 128,
  parameter int unsigned NB  = 16,
  parameter int unsigned OPS = 8
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   latency,
  output logic finished
);

  localparam int unsigned SETS = 4, DW = 8;
  localparam int unsigned LV = csa_levels(N + 1);
  localparam int unsigned D  = 2 * NB + LV + 1;
  localparam int unsigned UW = D + 1;
  localparam int unsigned AW = $clog2(SETS * NB);
  localparam int unsigned SW = $clog2(SETS);
  localparam int unsigned LAT = 2 * NB + 3 + 2 * LV + 6;

  logic                 w_we;
  logic [AW-1:0]        w_waddr;
  logic [N-1:0]         w_wdata;
  logic [SW-1:0]        wset_i;
  logic [2*NB-1:0]      bias_i;
  logic                 start, cancel, busy_o;
  logic [DW-1:0]        x_dig_idx_o;
  sd_t                  x_dig_i [N];
  sd_t                  u_dig_o;
  logic                 u_dig_valid_o, u_dig_first_o, u_dig_last_o;
  logic signed [UW-1:0] u_prefix_o, u_o;
  logic                 done_o, y_o, y_valid_o, y_early_o;

  logic [NB-1:0] wv [N];
  logic [NB-1:0] xv [N];

  ol_perceptron #(.N(N), .NB(NB), .SETS(SETS), .DW(DW)) dut (.*);

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      if (x_dig_idx_o == 0)           x_dig_i[i] = xv[i][NB-1] ? SD_NEG : SD_ZERO;
      else if (x_dig_idx_o < DW'(NB)) x_dig_i[i] = xv[i][NB-1-int'(x_dig_idx_o)] ? SD_POS : SD_ZERO;
      else                            x_dig_i[i] = SD_ZERO;
    end
  end

  initial begin
    longint expv, b;
    int cyc;
    checks = 0; failures = 0; latency = 0; finished = 1'b0;
    w_we = 1'b0; w_waddr = '0; w_wdata = '0; wset_i = '0; bias_i = '0;
    start = 1'b0; cancel = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      wv[i] = NB'({$urandom, $urandom});
      xv[i] = '0;
    end
    @(posedge rst_n);
    for (int j = 0; j < int'(NB); j++) begin
      @(negedge clk);
      w_we = 1'b1; w_waddr = AW'(j);
      for (int i = 0; i < int'(N); i++) w_wdata[i] = wv[i][NB-1-j];
    end
    @(negedge clk) w_we = 1'b0;
    for (int op = 0; op < int'(OPS); op++) begin
      for (int i = 0; i < int'(N); i++) xv[i] = NB'({$urandom, $urandom});
      b = longint'($signed((2*NB)'({$urandom, $urandom})));
      expv = b;
      for (int i = 0; i < int'(N); i++)
        expv += longint'($signed(xv[i])) * longint'($signed(wv[i]));
      @(negedge clk);
      bias_i = (2*NB)'(b); start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      while (!done_o && cyc < 1000) begin
        @(negedge clk);
        cyc++;
      end
      latency = cyc;
      checks += 2;
      if (cyc != int'(LAT)) begin
        failures++;
        $display("FAIL N=%0d n=%0d: latency %0d, expected %0d", N, NB, cyc, LAT);
      end
      if (longint'(u_o) != expv) begin
        failures++;
        $display("FAIL N=%0d n=%0d: u = %0d, expected %0d", N, NB, u_o, expv);
      end
    end
    finished = 1'b1;
  end

endmodule
