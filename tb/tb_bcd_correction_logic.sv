// tb_bcd_correction_logic: exhaustive test of decimal group generate and
// propagate.
//
// For every 5-bit binary result {bcout, bs} (0..31) it checks
// dg == (value >= 10) and dp == (value >= 9), the definitions the majority
// gate forms must reproduce. A watchdog ends the run as a failure if it has
// not finished after a fixed number of clock cycles.
module tb_bcd_correction_logic;
  import bcd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  bcd_digit_t bs;
  logic       bcout, dg, dp;
  int         checks = 0, failures = 0;

  bcd_correction_logic dut (.bs(bs), .bcout(bcout), .dg(dg), .dp(dp));

  initial begin
    for (int v = 0; v < 32; v++) begin
      {bcout, bs} = 5'(v);
      @(posedge clk);
      checks++;
      if (dg != (v >= 10) || dp != (v >= 9)) begin
        failures++;
        $display("FAIL value=%0d -> dg=%0d dp=%0d", v, dg, dp);
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
