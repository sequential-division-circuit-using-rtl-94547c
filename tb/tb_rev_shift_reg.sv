// tb_rev_shift_reg: clocked test of the PIPO left-shift register at
// WIDTH = 6. Each cycle picks hold/e/si/d at random; a reference register
// does hold ? keep : e ? d : {ref[W-2:0], si}. q and so are compared after
// every edge.
module tb_rev_shift_reg;
  localparam int unsigned W = 6;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n;
  logic hold, e, si, so;
  logic [W-1:0] d, q, ref_q;

  rev_shift_reg #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .hold(hold), .e(e),
                                  .si(si), .d(d), .q(q), .so(so));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; hold = 1'b0; e = 1'b0; si = 1'b0; d = '0; ref_q = '0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      hold = ($urandom % 4) == 0;
      e    = ($urandom % 3) == 0;
      si   = 1'($urandom);
      d    = W'($urandom);
      if (!hold) ref_q = e ? d : {ref_q[W-2:0], si};
      @(posedge clk);
      #1;
      checks++;
      if (q !== ref_q || so !== ref_q[W-1]) begin
        failures++;
        $display("FAIL n=%0d hold=%b e=%b si=%b q=%h ref=%h", n, hold, e, si, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
