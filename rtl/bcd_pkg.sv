// bcd_pkg: shared types, constants and the majority function of the BCD adder.
//
// A BCD digit is a 4-bit binary value 0..9. When two digits plus a carry
// exceed 9 the binary result is corrected by adding six (0110), which skips
// the six unused codes 10..15 and produces the decimal carry. The 3-input
// majority function is the basic carry gate used throughout: a full adder's
// carry, the decimal group generate term and the decimal carry
// dCout = M(dG, dP, dCin) are all written with it, as the design describes.
package bcd_pkg;

  // Bits per decimal digit.
  localparam int unsigned DIGIT_W = 4;

  // Digits of the whole adder: 64 bits / 4 bits per digit.
  localparam int unsigned DEFAULT_DIGITS = 16;

  // Correction added to a binary digit sum that exceeds 9.
  localparam logic [DIGIT_W-1:0] BCD_CORR = 4'd6;

  typedef logic [DIGIT_W-1:0] bcd_digit_t;

  // 3-input majority: 1 when at least two inputs are 1.
  function automatic logic maj3(input logic x, input logic y, input logic z);
    return (x & y) | (x & z) | (y & z);
  endfunction

endpackage
