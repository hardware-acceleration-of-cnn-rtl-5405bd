// ohn_pkg - shared constants and helpers for the one-hot CNN datapaths.
//
// A one-hot value is a signed power of two or zero. It is stored as a code
// of EW+2 bits:
//   [EW+1]   sign      (1 = negative); the most significant bit, as in the
//                      sign/exponent format the design adopts
//   [EW:1]   exponent  e, the value's magnitude is 2**e
//   [0]      nz        non-zero flag; the all-zero code is the value 0
// The sign-plus-exponent layout follows the one-hot format of the design.
// The separate non-zero flag is this implementation's choice: an N-bit
// one-hot set {0, +-1, ..., +-2**(N-1)} has 2N+1 members, one more than
// sign plus exponent can name, so zero needs a bit of its own.
//
// Two configurations are used: a 16-bit one-hot DaDianNao tile (4-bit
// exponents, EW = 4) and an 8-bit one-hot Laconic tile (3-bit exponents,
// EW = 3).
package ohn_pkg;

  // Exponent widths of the two configurations.
  localparam int unsigned DADN_EW = 4;   // 16-bit values: exponents 0..15
  localparam int unsigned LAC_EW  = 3;   // 8-bit values:  exponents 0..7

  // Code width for a given exponent width.
  function automatic int unsigned code_w(input int unsigned ew);
    return ew + 2;
  endfunction

  // Number of histogram bins for a given exponent width: exponent sums run
  // from 0 to 2*(2**ew - 1); the bin count is rounded up to 2**(ew+1).
  function automatic int unsigned n_bins(input int unsigned ew);
    return 1 << (ew + 1);
  endfunction

endpackage
