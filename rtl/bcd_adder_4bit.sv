// bcd_adder_4bit: one-digit BCD adder with carry select correction.
//
// Three parts, as in the design: a 4-bit binary adder (ADD1) forms A + B
// without the incoming carry; the correction logic turns its sum and carry
// into decimal group generate dG (A+B >= 10) and propagate dP (A+B >= 9);
// the carry select adder holds the two corrected results, one per value of
// the incoming carry, and the incoming carry picks one. Keeping the carry
// out of ADD1 is this implementation's reading of the design: it is what
// makes dG and dP independent of the carry, so that in a chain of digits
// only the final select waits for the previous digit.
// Purely combinational. Inputs must be valid BCD digits (0..9).
//
// Ports: a, b [3:0], cin in; sum [3:0], cout out.
module bcd_adder_4bit
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cin,
  output bcd_digit_t sum,
  output logic       cout
);

  bcd_digit_t bs;
  logic       bcout;
  logic       dg, dp;

  binary_adder_4bit #(.WIDTH(DIGIT_W)) u_add1 (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (bs),
    .cout(bcout)
  );

  bcd_correction_logic u_cl (
    .bs   (bs),
    .bcout(bcout),
    .dg   (dg),
    .dp   (dp)
  );

  carry_select_adder u_csel (
    .bs  (bs),
    .dg  (dg),
    .dp  (dp),
    .cin (cin),
    .sum (sum),
    .cout(cout)
  );

endmodule
