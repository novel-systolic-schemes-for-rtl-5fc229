// Modified Booth partial product generator (one bit per clock).
//
// Given the current bit of the serial multiplier X and the bit one place
// below it (which is the current bit of 2X), it forms one bit of w*X for a
// Booth digit w: a 2:1 mux picks X or 2X, an AND gate forces zero when w = 0,
// and an XOR gate complements the bit when w is negative. The +1 that
// completes the two's complement is not added here; the enclosing cell seeds
// its carry with `d.neg` at the start of every word.
//
// Purely combinational. Structure as described for the generator; the digit
// encoding (spmult_pkg::booth_digit_t) is this design's.
module mb_cell
  import spmult_pkg::*;
(
  input  logic         x,   // bit i of X
  input  logic         x2,  // bit i of 2X, i.e. bit i-1 of X
  input  booth_digit_t d,   // Booth digit of this cell
  output logic         pp   // bit i of w*X before the +1 correction
);

  always_comb begin
    pp = ((d.two ? x2 : x) & d.nz) ^ d.neg;
  end

endmodule
