// rev_mux3_cell: one bit of the 3-input reversible multiplexer.
// Two SRK gates in cascade: the first picks b (sel1 = 1) or c (sel1 = 0),
// the second picks that result (sel2 = 1) or d (sel2 = 0):
//   z = sel2 ? (sel1 ? b : c) : d.
// Both select lines are passed on (sel1_o, sel2_o) to the next cell.
// Combinational.
module rev_mux3_cell (
  input  logic sel1,
  input  logic sel2,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic z,
  output logic sel1_o,
  output logic sel2_o
);
  logic first, g0, g1;
  rev_srk u_first  (.a(sel1), .b(b),     .c(c), .p(sel1_o), .q(g0), .r(first));
  rev_srk u_second (.a(sel2), .b(first), .c(d), .p(sel2_o), .q(g1), .r(z));
endmodule
