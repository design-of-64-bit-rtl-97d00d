// tb_bcd_adder_64bit: end-to-end test of the 16-digit (64-bit) BCD adder at
// its default size.
//
// Each test draws two BCD operands and a carry in, works out the expected
// sum in the testbench by converting the operands to integers, adding them
// and converting back to BCD, and compares sum and cout. Directed cases cover
// zero, the largest operands and a carry running through all 16 digits;
// random cases follow, some biased so that digit pairs sum to exactly 9 and
// carries must travel through long runs of digits.
//
// From the reference carries it counts how often each mechanism of the adder
// occurred: a digit corrected by adding six, a digit whose incoming carry
// selected the carry-in-1 bank, a carry passing through at least four
// propagate-only digits, a carry through all digits, a carry out of the top
// digit and a carry into digit 0. A mechanism that never occurred is a
// failure. A watchdog ends the run as a failure after a fixed number of
// clock cycles.
module tb_bcd_adder_64bit;
  import bcd_pkg::*;

  localparam int unsigned N = DEFAULT_DIGITS;
  localparam int unsigned W = DIGIT_W * N;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0, failures = 0;

  // Mechanism counters.
  int n_correct = 0, n_bank1 = 0, n_long_prop = 0, n_full_prop = 0;
  int n_cout = 0, n_cin = 0;

  bcd_adder_64bit dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  // BCD vector to integer (16 digits fit in 64 bits).
  function automatic longint unsigned bcd_to_int(input logic [W-1:0] v);
    longint unsigned r = 0;
    for (int i = N - 1; i >= 0; i--) r = r * 10 + longint'(v[DIGIT_W*i +: DIGIT_W]);
    return r;
  endfunction

  // Integer (below 10**N) to BCD vector.
  function automatic logic [W-1:0] int_to_bcd(input longint unsigned v);
    logic [W-1:0] r = '0;
    for (int i = 0; i < N; i++) begin
      r[DIGIT_W*i +: DIGIT_W] = DIGIT_W'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic longint unsigned pow10(input int unsigned e);
    longint unsigned r = 1;
    for (int unsigned i = 0; i < e; i++) r = r * 10;
    return r;
  endfunction

  // Random BCD operand; with bias set, digit i of b is chosen so that a's
  // digit plus b's digit is 9 about three times in four.
  function automatic logic [W-1:0] rand_bcd();
    logic [W-1:0] r;
    for (int i = 0; i < N; i++) r[DIGIT_W*i +: DIGIT_W] = DIGIT_W'($urandom_range(9));
    return r;
  endfunction

  function automatic logic [W-1:0] nines_complement_biased(input logic [W-1:0] x);
    logic [W-1:0] r;
    for (int i = 0; i < N; i++) begin
      if ($urandom_range(3) != 0) r[DIGIT_W*i +: DIGIT_W] = DIGIT_W'(9 - int'(x[DIGIT_W*i +: DIGIT_W]));
      else                        r[DIGIT_W*i +: DIGIT_W] = DIGIT_W'($urandom_range(9));
    end
    return r;
  endfunction

  // Apply one addition, check it and record which mechanisms it exercised.
  task automatic run_case(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    longint unsigned total, modulus;
    logic [W-1:0]    exp_sum;
    logic            exp_cout;
    int              carry, ds, run;
    a   = x;
    b   = y;
    cin = c;
    @(posedge clk);
    modulus  = pow10(N);
    total    = bcd_to_int(x) + bcd_to_int(y) + longint'(c);
    exp_cout = (total >= modulus);
    exp_sum  = int_to_bcd(total % modulus);
    checks++;
    if (sum !== exp_sum || cout !== exp_cout) begin
      failures++;
      $display("FAIL %h + %h + %0d -> %0d_%h, expected %0d_%h", x, y, c, cout, sum, exp_cout, exp_sum);
    end
    // Digit-level reference carries for the mechanism counts.
    carry = int'(c);
    run   = 0;
    if (c) n_cin++;
    for (int i = 0; i < N; i++) begin
      ds = int'(x[DIGIT_W*i +: DIGIT_W]) + int'(y[DIGIT_W*i +: DIGIT_W]);
      if (carry == 1) n_bank1++;
      if (ds + carry >= 10) n_correct++;
      if (ds == 9 && carry == 1) run++;
      else run = 0;
      if (run == 4) n_long_prop++;
      if (run == N) n_full_prop++;
      carry = (ds + carry >= 10) ? 1 : 0;
    end
    if (exp_cout) n_cout++;
  endtask

  logic [W-1:0] nines, ones_digit, zero, x, y;

  initial begin
    zero  = '0;
    nines = int_to_bcd(pow10(N) - 1);
    ones_digit = int_to_bcd(1);

    run_case(zero, zero, 1'b0);
    run_case(zero, zero, 1'b1);
    run_case(nines, zero, 1'b1);        // carry through every digit
    run_case(nines, ones_digit, 1'b0);  // generate in digit 0, propagate above
    run_case(nines, nines, 1'b1);       // largest sum
    run_case(int_to_bcd(pow10(N) / 2), int_to_bcd(pow10(N) / 2), 1'b0);
    run_case(int_to_bcd(64'd1234567890123456), int_to_bcd(64'd8765432109876543), 1'b1);

    for (int t = 0; t < 20000; t++) begin
      x = rand_bcd();
      y = (t % 2 == 0) ? rand_bcd() : nines_complement_biased(x);
      run_case(x, y, 1'($urandom_range(1)));
    end

    $display("mechanisms: corrected_digits=%0d bank1_selects=%0d long_propagations=%0d full_propagations=%0d carry_outs=%0d carry_ins=%0d",
             n_correct, n_bank1, n_long_prop, n_full_prop, n_cout, n_cin);
    checks++;
    if (n_correct == 0 || n_bank1 == 0 || n_long_prop == 0 || n_full_prop == 0 ||
        n_cout == 0 || n_cin == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
