// tb_rev_not: exhaustive self-checking test of rev_not. Every input combination is
// applied and each output compared with the gate equation written out here:
// y = ~a
module tb_rev_not;
  int checks = 0, failures = 0;
  logic [0:0] in;
  logic y;
  rev_not dut (.a(in[0]), .y(y));
  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < (1 << 1); v++) begin
      in = v[0:0];
      #1;
      checks++; if (y !== !in[0]) begin failures++; $display("FAIL a=%b y=%b", in[0], y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
