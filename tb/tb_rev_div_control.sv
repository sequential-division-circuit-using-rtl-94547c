// tb_rev_div_control: clocked test of the divider's control unit at
// WIDTH = 4. After reset and after a start pulse it checks, edge by edge,
// the phase sequence LOAD, SHIFT, STEP, ..., SHIFT, STEP (2*WIDTH+1 pulses),
// the E/SELECT/M values of each phase, that K rises after exactly
// 2*WIDTH+1 pulses and that K then stays high.
module tb_rev_div_control;
  import rev_div_pkg::*;
  localparam int unsigned W = 4;
  int checks = 0, failures = 0;
  logic   clk = 1'b0, rst_n, start;
  logic   e, sel, m, k;
  phase_t phase;

  rev_div_control #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .start(start),
                                    .e(e), .sel(sel), .m(m), .k(k), .phase(phase));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (phase=%s e=%b sel=%b m=%b k=%b)", what, phase.name(), e, sel, m, k);
    end
  endtask

  // expects the count to be 0 now; walks one whole division
  task automatic walk();
    for (int c = 0; c < 2 * W + 1; c++) begin
      #1;
      if (c == 0)
        check(phase == PH_LOAD && e && sel && m && !k, $sformatf("pulse %0d load", c));
      else if (c % 2 == 1)
        check(phase == PH_SHIFT && !e && !sel && !m && !k, $sformatf("pulse %0d shift", c));
      else
        check(phase == PH_STEP && e && !sel && !m && !k, $sformatf("pulse %0d step", c));
      @(posedge clk);
    end
    #1;
    check(k && phase == PH_DONE, "K after 2n+1 pulses");
    repeat (5) @(posedge clk);
    #1;
    check(k, "K stays high");
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    #12 rst_n = 1'b1;
    walk();
    @(negedge clk); start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    walk();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
