// tb_rev_divider_w8: the reversible divider at WIDTH = 8 on 400 random
// divisions (dividend 0..255, divisor 1..128, the range where the sign
// test is exact) plus the range ends. Checks quotient, remainder and that
// done rises exactly 2*WIDTH+1 = 17 pulses after the start pulse.
module tb_rev_divider_w8;
  localparam int unsigned W    = 8;
  localparam int unsigned LAST = 2 * W + 1;
  int checks = 0, failures = 0;

  logic         clk = 1'b0, rst_n, start;
  logic [W-1:0] dividend, divisor, quotient, remainder;
  logic         done;

  rev_divider #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .start(start),
                                .dividend(dividend), .divisor(divisor),
                                .quotient(quotient), .remainder(remainder), .done(done));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input int x, input int y);
    int pulses = 0;
    @(negedge clk);
    dividend = W'(x); divisor = W'(y); start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    while (!done && pulses < 4 * LAST) begin
      @(posedge clk); #1;
      pulses++;
    end
    checks++;
    if (pulses != LAST || int'(quotient) != x / y || int'(remainder) != x % y) begin
      failures++;
      $display("FAIL %0d/%0d: q=%0d r=%0d after %0d pulses", x, y, quotient, remainder, pulses);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; dividend = '0; divisor = 8'd1;
    #12 rst_n = 1'b1;
    divide(255, 1);
    divide(255, 128);
    divide(0, 128);
    divide(127, 128);
    divide(200, 7);
    for (int n = 0; n < 400; n++)
      divide(int'($urandom % 256), int'($urandom % 128) + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
