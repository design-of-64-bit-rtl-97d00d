// tb_binary_adder_4bit: exhaustive self-checking test of the 4-bit
// ripple-carry adder.
//
// Runs all 16 x 16 x 2 operand and carry combinations and compares {cout, sum}
// with the integer sum a + b + cin. A watchdog ends the run as a failure if
// it has not finished after a fixed number of clock cycles.
module tb_binary_adder_4bit;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] a, b, sum;
  logic       cin, cout;
  int         checks = 0, failures = 0;

  binary_adder_4bit dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = 9'(v);
      @(posedge clk);
      checks++;
      if ({cout, sum} != 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL %0d + %0d + %0d -> cout=%0d sum=%0d", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
