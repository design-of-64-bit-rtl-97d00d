// tb_bcd_adder_4bit: exhaustive self-checking test of the one-digit BCD adder.
//
// Applies every pair of BCD digits 0..9 with both carries in (200 cases) and
// compares the result with the decimal sum a + b + cin: digit (mod 10) and
// carry (>= 10). A watchdog ends the run as a failure if it has not finished
// after a fixed number of clock cycles.
module tb_bcd_adder_4bit;
  import bcd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  bcd_digit_t a, b, sum;
  logic       cin, cout;
  int         checks = 0, failures = 0;

  bcd_adder_4bit dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int x = 0; x < 10; x++) begin
      for (int y = 0; y < 10; y++) begin
        for (int c = 0; c < 2; c++) begin
          a   = 4'(x);
          b   = 4'(y);
          cin = c[0];
          @(posedge clk);
          checks++;
          if (sum != 4'((x + y + c) % 10) || cout != ((x + y + c) >= 10)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d -> cout=%0d sum=%0d", x, y, c, cout, sum);
          end
        end
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
