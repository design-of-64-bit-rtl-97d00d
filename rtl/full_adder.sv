// full_adder: one-bit full adder.
//
// Implements the three-input truth table of the design's carry select adder
// table: s = a xor b xor cin and cout = majority(a, b, cin). The carry is
// written with the same 3-input majority function the decimal carry logic
// uses. Purely combinational; no clock.
//
// Ports: a, b, cin (1 bit each) in; s, cout (1 bit each) out.
module full_adder
  import bcd_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  assign s    = a ^ b ^ cin;
  assign cout = maj3(a, b, cin);

endmodule
