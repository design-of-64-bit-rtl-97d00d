// bcd_correction_logic: decimal group generate and propagate of one digit.
//
// From the binary sum bS3:0 and carry bCout of the two digits (no carry in):
//   dG = bCout + (bS >= 10) = M(bCout, M(bCout, bS3, 1), M(bS3, bS2, bS1))
//   dP = bCout + (bS >= 9)  = dG + bS3.bS0
// dG says the digit pair produces a decimal carry on its own; dP says it
// produces one if a carry comes in. Neither depends on the incoming carry, so
// every digit of a multi-digit adder computes them at the same time. The
// majority-gate forms are the design's own; the decimal carry itself,
// M(dG, dP, dCin), is formed by the carry select stage that follows.
// Purely combinational.
//
// Ports: bs [3:0], bcout in; dg, dp out.
module bcd_correction_logic
  import bcd_pkg::*;
(
  input  bcd_digit_t bs,
  input  logic       bcout,
  output logic       dg,
  output logic       dp
);

  assign dg = maj3(bcout, maj3(bcout, bs[3], 1'b1), maj3(bs[3], bs[2], bs[1]));
  assign dp = dg | (bs[3] & bs[0]);

endmodule
