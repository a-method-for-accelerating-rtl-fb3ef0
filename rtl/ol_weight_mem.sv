// ol_weight_mem: on-chip weight memory (block RAM) of one online perceptron.
//
// The multiplier bank needs one digit of every weight in each cycle, most
// significant first. The memory is therefore organised by bit planes: word
// (s*NB + j) holds bit NB-1-j of all N weights of weight set s, lane i in
// bit i. Reading words s*NB, s*NB+1, ... in consecutive cycles streams the
// weights MSD-first at one read per cycle, which a single-port block RAM
// sustains. SETS weight sets (e.g. one per neuron mapped onto this core) can
// be held.
//
// Interface: one synchronous write port (we, waddr, wdata: a whole bit plane)
// and one synchronous read port (raddr in, rdata_o the next cycle). Contents
// are not reset. Weights in block RAM are the source's; the bit-plane layout
// and the number of sets are this design's choices.
module ol_weight_mem #(
  parameter int unsigned N    = 64,  // weights per set (lanes)
  parameter int unsigned NB   = 16,  // bits per weight
  parameter int unsigned SETS = 4,   // weight sets
  parameter int unsigned AW   = $clog2(SETS * NB)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [N-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [N-1:0]  rdata_o
);

  logic [N-1:0] mem [SETS * NB];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata_o <= mem[raddr];
  end

endmodule
