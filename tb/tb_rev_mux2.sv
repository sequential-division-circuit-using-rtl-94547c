// tb_rev_mux2: self-checking test of the 2-input reversible MUX at WIDTH = 8.
// Random data on both inputs with both select values; the expected output
// is the selected input, and the select line must come out unchanged.
module tb_rev_mux2;
  localparam int unsigned W = 8;
  int checks = 0, failures = 0;
  logic         sel, sel_o;
  logic [W-1:0] a, b, z;

  rev_mux2 #(.WIDTH(W)) dut (.sel(sel), .a(a), .b(b), .z(z), .sel_o(sel_o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      a   = W'($urandom);
      b   = W'($urandom);
      sel = n[0];
      #1;
      checks++;
      if (z !== (sel ? a : b) || sel_o !== sel) begin
        failures++;
        $display("FAIL sel=%b a=%h b=%h z=%h", sel, a, b, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
