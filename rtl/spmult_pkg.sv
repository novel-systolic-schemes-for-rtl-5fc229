// Shared types for the two systolic serial-parallel multipliers.
//
// booth_digit_t is one radix-4 Modified Booth digit w in {-2,-1,0,1,2} in
// the three-wire form the partial product generator consumes: `two` selects
// 2X instead of X, `nz` is low for a zero digit (the AND gate of the
// generator), `neg` complements the selected term (the XOR gate) and also
// seeds the cell's carry with the +1 of the two's complement. The wire-level
// encoding is a choice of this design; the three gates are the generator's.
package spmult_pkg;

  typedef struct packed {
    logic neg;  // digit is negative (complement X or 2X)
    logic two;  // magnitude 2: use 2X
    logic nz;   // digit is non-zero
  } booth_digit_t;

endpackage
