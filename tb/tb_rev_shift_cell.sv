// tb_rev_shift_cell: clocked test of one shift-register cell. Random
// hold/e/q_prev/i_in each cycle; a reference bit follows the rule
// hold ? keep : (e ? i_in : q_prev) and is compared with q and o after
// every rising edge.
module tb_rev_shift_cell;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n;
  logic hold, e, q_prev, i_in, q, o, ref_bit;

  rev_shift_cell dut (.clk(clk), .rst_n(rst_n), .hold(hold), .e(e),
                      .q_prev(q_prev), .i_in(i_in), .q(q), .o(o));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; hold = 1'b0; e = 1'b0; q_prev = 1'b0; i_in = 1'b0;
    ref_bit = 1'b0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      {hold, e, q_prev, i_in} = 4'($urandom);
      if (!hold) ref_bit = e ? i_in : q_prev;
      @(posedge clk);
      #1;
      checks++;
      if (q !== ref_bit || o !== ref_bit) begin
        failures++;
        $display("FAIL n=%0d hold=%b e=%b q_prev=%b i=%b q=%b ref=%b", n, hold, e, q_prev, i_in, q, ref_bit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
