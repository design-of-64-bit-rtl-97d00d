// bcd_adder_64bit: multi-digit BCD adder, 16 digits (64 bits) by default.
//
// The operands are cut into DIGITS 4-bit decimal digits, digit 0 in bits 3:0.
// Each digit goes to its own one-digit BCD adder; all of them form their
// binary sums and decimal generate/propagate signals at the same time, and
// the decimal carry then runs from digit to digit through one carry select
// per digit. The carry out of the most significant digit is the carry out of
// the whole addition. The 16-digit width and the one-adder-per-digit
// structure follow the design; the cin port, which lets adders be chained,
// is this implementation's addition (tie it to 0 for a plain addition).
// Purely combinational, no clock or reset. Operands must be valid BCD.
//
// Ports: a, b [4*DIGITS-1:0], cin in; sum [4*DIGITS-1:0], cout out.
module bcd_adder_64bit
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = DEFAULT_DIGITS
) (
  input  logic [DIGIT_W*DIGITS-1:0] a,
  input  logic [DIGIT_W*DIGITS-1:0] b,
  input  logic                      cin,
  output logic [DIGIT_W*DIGITS-1:0] sum,
  output logic                      cout
);

  // carry[i] is the decimal carry into digit i; carry[DIGITS] is the carry out.
  logic [DIGITS:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    bcd_adder_4bit u_digit (
      .a   (a[DIGIT_W*i +: DIGIT_W]),
      .b   (b[DIGIT_W*i +: DIGIT_W]),
      .cin (carry[i]),
      .sum (sum[DIGIT_W*i +: DIGIT_W]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[DIGITS];

endmodule
