// rev_mtsg: 4x4 modified TSG (MTSG) gate.
// P = A, Q = A xor B, R = A xor B xor C, S = (A xor B).C xor A.B xor D.
// With D = 0, R is the sum and S the carry of A + B + C: one full adder.
// Combinational.
module rev_mtsg (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic ab;
  assign ab = a ^ b;
  assign p  = a;
  assign q  = ab;
  assign r  = ab ^ c;
  assign s  = (ab & c) ^ (a & b) ^ d;
endmodule
