// carry_select_adder: carry select correction stage of one BCD digit.
//
// The incoming decimal carry is the last signal of a digit to arrive, so both
// of its possible values are prepared in advance in two banks:
//   bank 0 (carry in = 0): bS + {0, dG, dG, 0}       carry out dG
//   bank 1 (carry in = 1): bS + {0, dP, dP, 0} + 1   carry out dP
// Each bank is a 4-bit binary adder that adds the correction six when its
// carry is set. When the carry arrives it only selects a bank, so the digit
// sum and carry out follow it after one 2:1 select. The selected carry,
// dG + dP.cin, is the majority M(dG, dP, cin) the design specifies for the
// decimal carry. Replacing the look-ahead correction by this two-bank select
// follows the design; the bank contents are this implementation's reading of
// it. Purely combinational.
//
// Ports: bs [3:0] (ADD1 sum), dg, dp, cin in; sum [3:0], cout out.
module carry_select_adder
  import bcd_pkg::*;
(
  input  bcd_digit_t bs,
  input  logic       dg,
  input  logic       dp,
  input  logic       cin,
  output bcd_digit_t sum,
  output logic       cout
);

  bcd_digit_t sum0, sum1;
  logic       unused_c0, unused_c1;

  // Bank 0: incoming carry assumed 0.
  binary_adder_4bit #(.WIDTH(DIGIT_W)) u_bank0 (
    .a   (bs),
    .b   (BCD_CORR & {DIGIT_W{dg}}),
    .cin (1'b0),
    .sum (sum0),
    .cout(unused_c0)
  );

  // Bank 1: incoming carry assumed 1.
  binary_adder_4bit #(.WIDTH(DIGIT_W)) u_bank1 (
    .a   (bs),
    .b   (BCD_CORR & {DIGIT_W{dp}}),
    .cin (1'b1),
    .sum (sum1),
    .cout(unused_c1)
  );

  // The carry out of a bank's binary adder is not the decimal carry (that is
  // dG or dP); it only wraps the 4-bit result modulo 16 and is left unused.
  assign sum  = cin ? sum1 : sum0;
  assign cout = maj3(dg, dp, cin);

endmodule
