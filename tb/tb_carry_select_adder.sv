// tb_carry_select_adder: self-checking test of the two-bank correction stage.
//
// Drives the stage with every binary digit-pair sum s = 0..18 that two BCD
// digits can give (bs = s mod 16, dg = s >= 10, dp = s >= 9, all computed
// here) and both incoming carries, and checks that the selected digit is
// (s + cin) mod 10 and the carry out is (s + cin) >= 10. It also counts how
// often each bank was selected with a correction applied, and fails if
// either never happened. A watchdog ends the run after a fixed number of
// clock cycles.
module tb_carry_select_adder;
  import bcd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  bcd_digit_t bs, sum;
  logic       dg, dp, cin, cout;
  int         checks = 0, failures = 0;
  int         corr_bank0 = 0, corr_bank1 = 0;

  carry_select_adder dut (
    .bs(bs), .dg(dg), .dp(dp), .cin(cin), .sum(sum), .cout(cout)
  );

  initial begin
    for (int s = 0; s <= 18; s++) begin
      for (int c = 0; c < 2; c++) begin
        bs  = 4'(s);
        dg  = (s >= 10);
        dp  = (s >= 9);
        cin = c[0];
        @(posedge clk);
        checks++;
        if (sum != 4'((s + c) % 10) || cout != ((s + c) >= 10)) begin
          failures++;
          $display("FAIL s=%0d cin=%0d -> sum=%0d cout=%0d", s, c, sum, cout);
        end
        if (c == 0 && dg) corr_bank0++;
        if (c == 1 && dp) corr_bank1++;
      end
    end
    checks++;
    if (corr_bank0 == 0 || corr_bank1 == 0) begin
      failures++;
      $display("FAIL a corrected bank was never selected");
    end
    $display("corrections via bank0=%0d bank1=%0d", corr_bank0, corr_bank1);
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
