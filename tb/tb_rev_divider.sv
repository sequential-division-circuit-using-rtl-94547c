// tb_rev_divider: end-to-end test of the reversible divider at its default
// size (WIDTH = 4).
//  1. Worked example 10 / 2: after every clock pulse the A and Q registers
//     are compared with the hand-worked restoring-division trace
//     (A,Q: 0000,1010 -> 0001,0100 -> 0001,0100 -> 0010,1000 -> 0000,1001 ->
//     0001,0010 -> 0001,0010 -> 0010,0100 -> 0000,0101).
//  2. Every dividend 0..15 with every divisor 1..8 (the range where the
//     sign test is exact): quotient and remainder against / and %, done
//     rising exactly 2*WIDTH+1 pulses after the division starts, and both
//     registers holding for several cycles afterwards.
// It counts how often each mechanism happened: subtract steps (q0 = 1),
// restore steps (q0 = 0), holds after done, starts by reset release and by
// the start input; one that never happens is a failure.
module tb_rev_divider;
  localparam int unsigned W    = 4;
  localparam int unsigned LAST = 2 * W + 1;
  int checks = 0, failures = 0;
  int n_subtract = 0, n_restore = 0, n_hold = 0, n_reset_start = 0, n_start = 0;

  logic         clk = 1'b0, rst_n, start;
  logic [W-1:0] dividend, divisor, quotient, remainder;
  logic         done;

  rev_divider dut (.clk(clk), .rst_n(rst_n), .start(start), .dividend(dividend),
                   .divisor(divisor), .quotient(quotient), .remainder(remainder),
                   .done(done));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // count quotient-bit decisions as they are made (pulses 2, 4, ..., 2n)
  always @(posedge clk) begin
    if (rst_n && dut.phase == rev_div_pkg::PH_STEP) begin
      if (dut.sign_n) n_subtract++;
      else            n_restore++;
    end
  end

  // division already started (count 0 now): run it and check the result
  task automatic run_and_check(input int x, input int y);
    int pulses = 0;
    logic [W-1:0] q_done, a_done;
    #1;
    check(!done, "done low at start");
    while (!done && pulses < 4 * LAST) begin
      @(posedge clk); #1;
      pulses++;
    end
    check(pulses == LAST, $sformatf("%0d/%0d took %0d pulses, expected %0d", x, y, pulses, LAST));
    check(int'(quotient) == x / y && int'(remainder) == x % y,
          $sformatf("%0d/%0d gave q=%0d r=%0d", x, y, quotient, remainder));
    q_done = quotient; a_done = remainder;
    // inputs may change now: the registers must hold
    dividend = ~dividend; divisor = W'(1);
    repeat (3) @(posedge clk);
    #1;
    check(done && quotient == q_done && remainder == a_done, "registers hold after done");
    n_hold++;
  endtask

  initial begin
    static logic [W-1:0] exp_a[9] = '{4'b0000, 4'b0001, 4'b0001, 4'b0010, 4'b0000,
                                     4'b0001, 4'b0001, 4'b0010, 4'b0000};
    static logic [W-1:0] exp_q[9] = '{4'b1010, 4'b0100, 4'b0100, 4'b1000, 4'b1001,
                                     4'b0010, 4'b0010, 4'b0100, 4'b0101};
    rst_n = 1'b0; start = 1'b0;
    dividend = 4'd10; divisor = 4'd2;
    #12 rst_n = 1'b1;
    n_reset_start++;
    // 1. worked example, pulse by pulse
    for (int c = 0; c < 9; c++) begin
      @(posedge clk); #1;
      check(remainder == exp_a[c] && quotient == exp_q[c],
            $sformatf("trace pulse %0d: A=%b Q=%b expected %b %b", c, remainder, quotient,
                      exp_a[c], exp_q[c]));
    end
    check(done, "done after 9 pulses in the worked example");

    // 2. all dividends and in-range divisors, started with start
    for (int y = 1; y <= (1 << (W - 1)); y++)
      for (int x = 0; x < (1 << W); x++) begin
        @(negedge clk);
        dividend = W'(x); divisor = W'(y); start = 1'b1;
        @(posedge clk);
        #1 start = 1'b0;
        n_start++;
        run_and_check(x, y);
      end

    // one more start by reset release
    @(negedge clk);
    rst_n = 1'b0; dividend = 4'd13; divisor = 4'd5;
    @(negedge clk);
    rst_n = 1'b1;
    n_reset_start++;
    run_and_check(13, 5);

    $display("mechanisms: subtract=%0d restore=%0d hold=%0d reset_start=%0d start=%0d",
             n_subtract, n_restore, n_hold, n_reset_start, n_start);
    check(n_subtract > 0, "subtract step happened");
    check(n_restore > 0, "restore step happened");
    check(n_hold > 0, "hold after done happened");
    check(n_reset_start > 1, "start by reset release happened");
    check(n_start > 0, "start by start input happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
