// rev_mux2: 2-input WIDTH-bit reversible multiplexer, z = sel ? a : b.
// A chain of WIDTH SRK gates: each gate takes SELECT on its control line,
// passes it on to the next gate, and produces z[i] on its multiplexing
// output R. The remaining output of each gate is garbage.
// In the divider, sel = SELECT, a = dividend, b = quotient register feedback.
// Combinational.
module rev_mux2 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] z,
  output logic             sel_o
);
  logic [WIDTH:0]   sel_chain;
  logic [WIDTH-1:0] garbage;

  assign sel_chain[0] = sel;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    rev_srk u_srk (
      .a(sel_chain[i]), .b(a[i]), .c(b[i]),
      .p(sel_chain[i+1]), .q(garbage[i]), .r(z[i])
    );
  end
  assign sel_o = sel_chain[WIDTH];
endmodule
