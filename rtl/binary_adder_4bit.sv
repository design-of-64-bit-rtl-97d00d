// binary_adder_4bit: ripple-carry binary adder, WIDTH bits (default 4).
//
// The BCD digit adder uses 4-bit binary adders in two places: once to form
// the raw binary sum of the two digits (ADD1) and once per carry select bank
// to add the correction (ADD2). The design leaves the adder type open (ripple,
// carry-flow or parallel); this one is a chain of full adders, the simplest
// choice. Purely combinational: cout settles after WIDTH full-adder delays.
//
// Ports: a, b [WIDTH-1:0], cin in; sum [WIDTH-1:0], cout out.
module binary_adder_4bit #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // c[i] is the carry into bit i; c[WIDTH] is the carry out.
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];

endmodule
