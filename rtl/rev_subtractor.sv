// rev_subtractor: WIDTH-bit reversible parallel subtractor, p = a - b
// (modulo 2^WIDTH), computed as a + ~b + 1.
// Every bit of b goes through a NOT gate. Bits 0 .. WIDTH-2 are MTSG gates
// used as full adders (D input 0, so output S is the carry), rippling from a
// carry-in of 1 at bit 0. The top bit is a TS-3 gate, which gives the sum
// only, since no carry out is needed. p[WIDTH-1] is read by the divider as
// the sign of the difference. Combinational; WIDTH must be at least 2.
module rev_subtractor #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] p
);
  logic [WIDTH-1:0] nb;
  logic [WIDTH-1:0] carry;   // carry[i] is the carry into bit i
  logic [WIDTH-1:0] g_p, g_q;

  assign carry[0] = 1'b1;    // Cin = 1
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    rev_not u_not (.a(b[i]), .y(nb[i]));
    if (i < WIDTH - 1) begin : g_fa
      rev_mtsg u_mtsg (
        .a(a[i]), .b(nb[i]), .c(carry[i]), .d(1'b0),
        .p(g_p[i]), .q(g_q[i]), .r(p[i]), .s(carry[i+1])
      );
    end else begin : g_msb
      rev_ts3 u_ts3 (
        .a(a[i]), .b(nb[i]), .c(carry[i]),
        .p(g_p[i]), .q(g_q[i]), .r(p[i])
      );
    end
  end
endmodule
