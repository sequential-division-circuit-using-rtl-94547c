// rev_f2g: 3x3 Feynman double gate (F2G).
// P = A, Q = A xor B, R = A xor C. With B = C = 0 it makes two copies of A,
// which is how the divider fans register outputs out. Combinational.
module rev_f2g (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = a ^ c;
endmodule
