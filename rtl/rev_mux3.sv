// rev_mux3: 3-input WIDTH-bit reversible multiplexer.
// WIDTH rev_mux3_cell cells in a chain sharing SELECT1 and SELECT2:
//   z = sel2 ? (sel1 ? a : b) : c.
// In the divider sel1 = M and sel2 = N, and a = 0 (initial A), b = the
// subtractor output, c = the A register itself; so (M,N) = (1,1) clears A,
// (0,1) takes the difference and (0,0) keeps (restores) A. Combinational.
module rev_mux3 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             sel1,
  input  logic             sel2,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] z
);
  logic [WIDTH:0] s1, s2;
  assign s1[0] = sel1;
  assign s2[0] = sel2;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    rev_mux3_cell u_cell (
      .sel1(s1[i]), .sel2(s2[i]), .b(a[i]), .c(b[i]), .d(c[i]),
      .z(z[i]), .sel1_o(s1[i+1]), .sel2_o(s2[i+1])
    );
  end
endmodule
