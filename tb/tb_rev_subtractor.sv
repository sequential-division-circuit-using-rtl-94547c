// tb_rev_subtractor: exhaustive test of the reversible subtractor at
// WIDTH = 4 and 6 (every pair a, b); expected p = (a - b) mod 2^WIDTH.
module tb_rev_subtractor;
  int checks = 0, failures = 0;
  logic [3:0] a4, b4, p4;
  logic [5:0] a6, b6, p6;

  rev_subtractor #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .p(p4));
  rev_subtractor #(.WIDTH(6)) dut6 (.a(a6), .b(b6), .p(p6));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        #1;
        checks++;
        if (int'(p4) != ((x - y + 16) % 16)) begin
          failures++;
          $display("FAIL w4 %0d-%0d gave %0d", x, y, p4);
        end
      end
    for (int x = 0; x < 64; x++)
      for (int y = 0; y < 64; y++) begin
        a6 = 6'(x); b6 = 6'(y);
        #1;
        checks++;
        if (int'(p6) != ((x - y + 64) % 64)) begin
          failures++;
          $display("FAIL w6 %0d-%0d gave %0d", x, y, p6);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
