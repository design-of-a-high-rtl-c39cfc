// Shared definitions of the multiplexer-based multipliers.
//
// A multiplier of this family splits its multiplier operand Y into 2-bit
// digits. Each digit drives the select lines S1S0 of one 4x1 multiplexer,
// which passes one of the four multiples of the multiplicand X that a 2-bit
// digit can stand for: 0, X, 2X or 3X. The enumeration below names those four
// select codes; the code values 00, 01, 10 and 11 and their meaning are those
// of the multiplier, gathering them in a package is this design's own choice.
package mux_mult_pkg;

  // Select code of one 4x1 multiplexer (the 2-bit Y digit S1S0).
  typedef enum logic [1:0] {
    SEL_ZERO  = 2'b00,  // output is all zeros
    SEL_X1    = 2'b01,  // output is X
    SEL_X2    = 2'b10,  // output is X shifted left once (2X)
    SEL_X3    = 2'b11   // output is X + 2X (3X)
  } sel_e;

  // Number of 2-bit digits, and so of multiplexers, of an N-bit multiplier.
  function automatic int unsigned num_digits(int unsigned n);
    return (n + 1) / 2;
  endfunction

endpackage
