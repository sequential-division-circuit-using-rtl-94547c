// rev_srk: 3x3 SRK gate: P = A, Q = A xor B xor C, R = ~A.C xor A.B.
// R is a 2:1 multiplexer, R = A ? B : C, with A the select line passed on
// through P; both MUXes of the divider are built from this gate.
// Combinational.
module rev_srk (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b ^ c;
  assign r = (~a & c) ^ (a & b);
endmodule
