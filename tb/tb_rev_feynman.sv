// tb_rev_feynman: exhaustive self-checking test of rev_feynman. Every input combination is
// applied and each output compared with the gate equation written out here:
// p = a, q = a xor b
module tb_rev_feynman;
  int checks = 0, failures = 0;
  logic [1:0] in;
  logic p, q;
  rev_feynman dut (.a(in[1]), .b(in[0]), .p(p), .q(q));
  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < (1 << 2); v++) begin
      in = v[1:0];
      #1;
      checks++; if ({p, q} !== {in[1], in[1] != in[0]}) begin failures++; $display("FAIL in=%b p=%b q=%b", in, p, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
