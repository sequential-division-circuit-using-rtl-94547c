// tb_rev_fredkin: exhaustive self-checking test of rev_fredkin. Every input combination is
// applied and each output compared with the gate equation written out here:
// p = a, q = a ? c : b, r = a ? b : c (controlled swap)
module tb_rev_fredkin;
  int checks = 0, failures = 0;
  logic [2:0] in;
  logic p, q, r;
  rev_fredkin dut (.a(in[2]), .b(in[1]), .c(in[0]), .p(p), .q(q), .r(r));
  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < (1 << 3); v++) begin
      in = v[2:0];
      #1;
      checks++; if ({p, q, r} !== (in[2] ? {in[2], in[0], in[1]} : in)) begin failures++; $display("FAIL in=%b pqr=%b%b%b", in, p, q, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
