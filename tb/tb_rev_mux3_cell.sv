// tb_rev_mux3_cell: exhaustive test of one 3-input MUX cell: all 32
// combinations of (sel1, sel2, b, c, d); expected z = sel2 ? (sel1 ? b : c) : d.
module tb_rev_mux3_cell;
  int checks = 0, failures = 0;
  logic [4:0] in;
  logic z, s1o, s2o;

  rev_mux3_cell dut (.sel1(in[4]), .sel2(in[3]), .b(in[2]), .c(in[1]), .d(in[0]),
                     .z(z), .sel1_o(s1o), .sel2_o(s2o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic exp_z;
      in = v[4:0];
      #1;
      if (in[3]) exp_z = in[4] ? in[2] : in[1];
      else       exp_z = in[0];
      checks++;
      if (z !== exp_z || s1o !== in[4] || s2o !== in[3]) begin
        failures++;
        $display("FAIL in=%b z=%b", in, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
