// ol_perceptron: one perceptron computed in online (MSD-first) arithmetic.
//
//   u = sum_{i=1..N} w_i x_i + b,   y = 1 if u >= 0 else 0
//
// Datapath (all streams carry one signed digit in {-1,0,1} per clock):
//   weight BRAM (bit planes) --+
//                              +--> N online multipliers (delay DELTA)
//   feature digits x_i --------+          |
//   bias b -> ol_bin2sd -----------------(+1 stream)
//                                         v
//            3:2 reduction tree, N+1 streams -> 2 (LV levels, 1 clock each)
//                                         v
//            online root adder -> u stream (MSD first, 2 clocks)
//                                  |-> on-the-fly converter -> u word
//                                  |-> threshold (sign of first nonzero digit)
// The stages overlap: the tree starts on the first product digits while the
// multipliers are still consuming operand digits, and the activation usually
// decides from the first few digits of u.
//
// Number scaling: x_i and w_i are NB-bit two's-complement integers X_i, W_i
// (Q8.8 for NB = 16), b is a 2NB-bit two's-complement integer B at the
// product scale (Q16.16). The result word u_o is exactly
// sum X_i*W_i + B, a UW-bit signed integer. B must lie in [-2^(2NB-1),
// 2^(2NB-1)).
//
// Timing (t = cycles after the `start` cycle): operand digit j (0 = MSD) is
// used at t = j+1; weight plane j is read at t = j. Product digits enter the
// tree at t = DELTA+2, the u stream runs for D = 2NB+LV+1 digits from
// t = T_U = DELTA+LV+4, and done_o is high at t = T_U + D + 1 with u_o final:
// 61 cycles for N = 64, NB = 16, DELTA = 3 (LV = 10). The latency does not
// depend on the data. y_valid_o rises the cycle after the first nonzero digit
// of u. `cancel` stops the operation at once (used for early classification).
// Only one operation runs at a time; start is ignored while busy_o is high.
//
// Interface to the shared feature register file: x_dig_idx_o names the digit
// position wanted this cycle, x_dig_i returns that digit of every x_i.
//
// From the source: the structure multiplier bank -> 3:2 redundant tree ->
// conversion -> threshold, the digit set, MSD-first order, online delay 3,
// weights in block RAM, features from a register file, N = 64, n = 16.
// This design's choices: the bit-plane memory layout, entering the bias as an
// extra tree stream, the root adder, the fixed-point scaling and the
// start/done handshake.
module ol_perceptron
  import ol_pkg::*;
#(
  parameter int unsigned N     = 64,        // inputs per neuron
  parameter int unsigned NB    = 16,        // operand digits (n)
  parameter int unsigned DELTA = OL_DELTA,  // multiplier online delay (p)
  parameter int unsigned SETS  = 4,         // weight sets in the BRAM
  parameter int unsigned DW    = 8,         // digit-index width
  // derived
  parameter int unsigned LV    = csa_levels(N + 1),
  parameter int unsigned D     = 2 * NB + LV + 1,   // digits of u
  parameter int unsigned UW    = D + 1,             // width of u_o
  parameter int unsigned AW    = $clog2(SETS * NB),
  parameter int unsigned SW    = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // weight memory write port (one bit plane per write)
  input  logic                 w_we,
  input  logic [AW-1:0]        w_waddr,
  input  logic [N-1:0]         w_wdata,
  // operation control
  input  logic [SW-1:0]        wset_i,   // weight set to use
  input  logic [2*NB-1:0]      bias_i,   // held stable while busy
  input  logic                 start,
  input  logic                 cancel,
  output logic                 busy_o,
  // feature digits from the register file
  output logic [DW-1:0]        x_dig_idx_o,
  input  sd_t                  x_dig_i [N],
  // MSD-first logit stream
  output sd_t                  u_dig_o,
  output logic                 u_dig_valid_o,
  output logic                 u_dig_first_o,
  output logic                 u_dig_last_o,
  output logic signed [UW-1:0] u_prefix_o,   // value of the u digits so far
  // final result
  output logic signed [UW-1:0] u_o,
  output logic                 done_o,
  output logic                 y_o,
  output logic                 y_valid_o,
  output logic                 y_early_o
);

  localparam int unsigned T_U   = DELTA + LV + 4;
  localparam int unsigned T_END = T_U + D;
  localparam int unsigned TW    = $clog2(T_END + 2);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t        state_q;
  logic [TW-1:0] t_q;
  logic [SW-1:0] wset_q;
  logic          go;
  logic          dp_rst_n;

  assign go     = (state_q == S_IDLE) && start;
  assign busy_o = (state_q == S_RUN);

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      t_q     <= '0;
      wset_q  <= '0;
      done_o  <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (go) begin
        state_q <= S_RUN;
        t_q     <= TW'(1);
        wset_q  <= wset_i;
      end else if (state_q == S_RUN) begin
        if (cancel) begin
          state_q <= S_IDLE;
        end else if (t_q == TW'(T_END)) begin
          state_q <= S_IDLE;
          done_o  <= 1'b1;
        end else begin
          t_q <= t_q + 1'b1;
        end
      end
    end
  end

  // the pipeline registers restart with each operation; the clear also covers
  // t = 1, when the multiplier outputs still show the last digit of a
  // cancelled operation
  assign dp_rst_n = rst_n && !go && !(busy_o && t_q == TW'(1));

  // ------------------------------------------------------ operand digits
  logic [AW-1:0] raddr;
  logic [N-1:0]  wplane;
  logic          in_ops;      // t = 1..NB: operand digits are being fed
  logic [TW-1:0] k;           // operand digit index at this cycle

  always_comb begin
    if (go) raddr = AW'(int'(wset_i) * int'(NB));
    else    raddr = AW'(int'(wset_q) * int'(NB) + int'(t_q));
    k      = t_q - 1'b1;
    in_ops = busy_o && (t_q >= TW'(1)) && (t_q <= TW'(NB));
    x_dig_idx_o = in_ops ? DW'(k) : DW'(NB);
  end

  ol_weight_mem #(.N(N), .NB(NB), .SETS(SETS), .AW(AW)) u_wmem (
    .clk     (clk),
    .we      (w_we),
    .waddr   (w_waddr),
    .wdata   (w_wdata),
    .raddr   (raddr),
    .rdata_o (wplane)
  );

  sd_t w_dig [N];
  sd_t p_dig [N+1];

  for (genvar i = 0; i < int'(N); i++) begin : g_lane
    always_comb begin
      w_dig[i] = SD_ZERO;
      if (in_ops && wplane[i]) w_dig[i] = (k == '0) ? SD_NEG : SD_POS;
    end

    ol_mult #(.NB(NB), .DELTA(DELTA)) u_mult (
      .clk   (clk),
      .rst_n (rst_n),
      .first (busy_o && t_q == TW'(1)),
      .x_i   (in_ops ? x_dig_i[i] : SD_ZERO),
      .w_i   (w_dig[i]),
      .p_o   (p_dig[i])
    );
  end

  // bias enters as stream N+1, aligned with the product digits
  ol_bin2sd #(.W(2 * NB)) u_bias (
    .clk   (clk),
    .rst_n (dp_rst_n),
    .load  (busy_o && t_q == TW'(DELTA + 1)),
    .val_i (bias_i),
    .d_o   (p_dig[N])
  );

  // --------------------------------------------------------- reduction tree
  sd_t pair [2];
  sd_t u_dig;

  ol_csa_tree #(.M(N + 1)) u_tree (
    .clk   (clk),
    .rst_n (dp_rst_n),
    .d_i   (p_dig),
    .d_o   (pair)
  );

  ol_add u_root (
    .clk   (clk),
    .rst_n (dp_rst_n),
    .a_i   (pair[0]),
    .b_i   (pair[1]),
    .z_o   (u_dig)
  );

  // ------------------------------------------------ conversion, activation
  logic u_en, u_first, u_last;

  assign u_en    = busy_o && (t_q >= TW'(T_U)) && (t_q < TW'(T_END));
  assign u_first = busy_o && (t_q == TW'(T_U));
  assign u_last  = busy_o && (t_q == TW'(T_END - 1));

  ol_sd2bin #(.W(UW)) u_conv (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (u_en),
    .first    (u_first),
    .d_i      (u_dig),
    .prefix_o (u_prefix_o)
  );

  ol_threshold u_act (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (u_en),
    .first     (u_first),
    .last      (u_last),
    .d_i       (u_dig),
    .decided_o (y_valid_o),
    .y_o       (y_o),
    .early_o   (y_early_o)
  );

  assign u_dig_o       = u_en ? u_dig : SD_ZERO;
  assign u_dig_valid_o = u_en;
  assign u_dig_first_o = u_first;
  assign u_dig_last_o  = u_last;
  assign u_o           = u_prefix_o;

  initial assert (N + 1 >= 2) else $error("ol_perceptron: N must be >= 1");

endmodule
