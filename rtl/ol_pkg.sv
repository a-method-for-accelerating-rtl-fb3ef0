// ol_pkg: shared types and constants of the online (most-significant-digit
// first) perceptron datapath.
//
// Every arithmetic stream in the design carries one radix-2 signed digit per
// clock, most significant first, from the digit set {-1, 0, 1}. A digit is a
// 2-bit two's-complement value (2'b11 = -1, 2'b00 = 0, 2'b01 = +1); 2'b10 is
// never produced. The digit set and the MSD-first order follow the source
// architecture; the 2-bit encoding is this design's choice.
//
// csa_levels() gives the number of 3:2 levels that reduce M streams to two;
// the perceptron controller uses it to know when the result stream starts.
package ol_pkg;

  typedef logic signed [1:0] sd_t;

  localparam sd_t SD_NEG  = 2'sb11;
  localparam sd_t SD_ZERO = 2'sb00;
  localparam sd_t SD_POS  = 2'sb01;

  // Online delay of the radix-2 serial-serial multiplier.
  localparam int unsigned OL_DELTA = 3;

  // Number of 3:2 levels needed to reduce m streams to at most two.
  function automatic int unsigned csa_levels(int unsigned m);
    int unsigned cnt;
    int unsigned k;
    cnt = 0;
    k = m;
    while (k > 2) begin
      k = 2 * (k / 3) + (k % 3);
      cnt++;
    end
    return cnt;
  endfunction

  // Streams left after one 3:2 level applied to m streams.
  function automatic int unsigned csa_next(int unsigned m);
    return (m > 2) ? (2 * (m / 3) + (m % 3)) : m;
  endfunction

  // Signed digit -> borrow-save pair (pos, neg) with digit = pos - neg.
  function automatic logic [1:0] sd_to_bs(sd_t d);
    return {d == SD_POS, d == SD_NEG};
  endfunction

  // Borrow-save pair -> signed digit (pos = neg gives 0).
  function automatic sd_t bs_to_sd(logic p, logic n);
    sd_t d;
    if (p && !n)      d = SD_POS;
    else if (n && !p) d = SD_NEG;
    else              d = SD_ZERO;
    return d;
  endfunction

endpackage
