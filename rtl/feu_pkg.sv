// Shared types and constants of the function evaluation unit.
//
// A signed digit d in {-1, 0, +1} travels on two wires. The code is the one
// the byte-slice module is defined with: 00 = 0, 01 = -1, 11 = +1, and 10 is
// not a legal code. Bit 0 marks a nonzero digit, bit 1 its sign (1 = plus).
// This file holds only definitions; it has no timing.
package feu_pkg;

  typedef logic [1:0] digit_t;

  localparam digit_t DIG_ZERO = 2'b00;
  localparam digit_t DIG_NEG  = 2'b01;
  localparam digit_t DIG_POS  = 2'b11;

  // Value of a digit code as an integer; the illegal code reads as 0.
  function automatic int digit_value(digit_t d);
    if (!d[0]) return 0;
    return d[1] ? 1 : -1;
  endfunction

  // Code of an integer digit value in {-1, 0, +1}.
  function automatic digit_t digit_code(int v);
    if (v > 0) return DIG_POS;
    if (v < 0) return DIG_NEG;
    return DIG_ZERO;
  endfunction

endpackage
