// tb_rev_mtsg: exhaustive self-checking test of rev_mtsg. Every input combination is
// applied and each output compared with the gate equation written out here:
// p = a, q = a xor b, r = sum bit of a+b+c, s = carry of a+b+c xor d
module tb_rev_mtsg;
  int checks = 0, failures = 0;
  logic [3:0] in;
  logic p, q, r, s;
  rev_mtsg dut (.a(in[3]), .b(in[2]), .c(in[1]), .d(in[0]), .p(p), .q(q), .r(r), .s(s));
  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < (1 << 4); v++) begin
      in = v[3:0];
      #1;
      checks++; if ({p, q, r, s} !== {in[3], in[3] != in[2], ((in[3] + in[2] + in[1]) % 2) == 1, ((in[3] + in[2] + in[1]) >= 2) != in[0]}) begin failures++; $display("FAIL in=%b pqrs=%b%b%b%b", in, p, q, r, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
