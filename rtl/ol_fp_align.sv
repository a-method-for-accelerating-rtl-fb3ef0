// ol_fp_align: exponent-first alignment loop for floating-point operands in
// online mode.
//
// A floating-point operand reaches the online datapath in two phases. First
// its exponent field arrives (exp_valid with exp_i of every lane); the unit
// finds the largest exponent and, for every lane, the shift
// s_i = e_max - e_i that aligns its mantissa to it, and registers them. Then
// the mantissas follow as MSD-first signed-digit streams, and each lane's
// stream leaves delayed by s_i cycles: delaying an MSD-first stream by one
// cycle is a right shift by one digit position, so the streams come out
// already aligned to weight 2^e_max and the datapath never has to stop for a
// correction in the middle of a mantissa. A lane whose shift exceeds MAXSH
// contributes nothing (its digits lie below the kept precision).
//
// Interface: exp_valid/exp_i (LANES exponents, unsigned or biased, EW bits)
// in one cycle; emax_o and shift_o are valid from the next cycle and hold
// until the next exp_valid. m_i carries the mantissa digits of all lanes,
// m_o the aligned digits: digit j of lane i leaves at cycle j + s_i after it
// entered (combinational tap of a delay line). The two-phase scheme comes
// from the source; the delay-line realisation, the widths and MAXSH are this
// design's choices.
module ol_fp_align
  import ol_pkg::*;
#(
  parameter int unsigned LANES = 64,   // operand streams
  parameter int unsigned EW    = 8,    // exponent width
  parameter int unsigned MAXSH = 16    // largest alignment shift kept
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          exp_valid,
  input  logic [EW-1:0] exp_i   [LANES],
  output logic [EW-1:0] emax_o,
  output logic [EW-1:0] shift_o [LANES],
  input  sd_t           m_i     [LANES],
  output sd_t           m_o     [LANES]
);

  logic [EW-1:0] emax_c;

  always_comb begin
    emax_c = exp_i[0];
    for (int i = 1; i < int'(LANES); i++)
      if (exp_i[i] > emax_c) emax_c = exp_i[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      emax_o <= '0;
      for (int i = 0; i < int'(LANES); i++) shift_o[i] <= '0;
    end else if (exp_valid) begin
      emax_o <= emax_c;
      for (int i = 0; i < int'(LANES); i++) shift_o[i] <= emax_c - exp_i[i];
    end
  end

  for (genvar i = 0; i < int'(LANES); i++) begin : g_lane
    sd_t dl_q [MAXSH];   // dl_q[k] = digit that entered k+1 cycles ago

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < int'(MAXSH); k++) dl_q[k] <= SD_ZERO;
      end else begin
        dl_q[0] <= m_i[i];
        for (int k = 1; k < int'(MAXSH); k++) dl_q[k] <= dl_q[k-1];
      end
    end

    always_comb begin
      if (shift_o[i] == '0)                 m_o[i] = m_i[i];
      else if (shift_o[i] > EW'(MAXSH))     m_o[i] = SD_ZERO;
      else                                  m_o[i] = dl_q[int'(shift_o[i]) - 1];
    end
  end

endmodule
