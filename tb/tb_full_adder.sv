// tb_full_adder: exhaustive self-checking test of the one-bit full adder.
//
// Applies all eight input combinations and compares s and cout with the
// arithmetic sum a + b + cin, worked out in the testbench. A free-running
// clock paces the stimulus; a watchdog ends the run as a failure if it has
// not finished after a fixed number of cycles.
module tb_full_adder;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, cin, s, cout;
  int   checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      @(posedge clk);
      checks++;
      if ({cout, s} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> s=%0d cout=%0d", a, b, cin, s, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
