// tb_rev_mux3: self-checking test of the 3-input reversible MUX at
// WIDTH = 8: random data, all four select combinations; expected
// z = sel2 ? (sel1 ? a : b) : c.
module tb_rev_mux3;
  localparam int unsigned W = 8;
  int checks = 0, failures = 0;
  logic         sel1, sel2;
  logic [W-1:0] a, b, c, z, exp_z;

  rev_mux3 #(.WIDTH(W)) dut (.sel1(sel1), .sel2(sel2), .a(a), .b(b), .c(c), .z(z));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      {sel1, sel2} = n[1:0];
      #1;
      case ({sel1, sel2})
        2'b11:   exp_z = a;
        2'b01:   exp_z = b;
        default: exp_z = c;
      endcase
      checks++;
      if (z !== exp_z) begin
        failures++;
        $display("FAIL sel=%b%b a=%h b=%h c=%h z=%h", sel1, sel2, a, b, c, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
