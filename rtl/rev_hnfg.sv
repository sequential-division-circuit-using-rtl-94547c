// rev_hnfg: 4x4 HNFG gate, two Feynman gates side by side with the middle
// lines crossed: P = A, Q = A xor C, R = B, S = B xor D.
// With C = D = 0 it duplicates two signals; the shift-register cell uses it
// to fan its stored bit out. Combinational.
module rev_hnfg (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = a ^ c;
  assign r = b;
  assign s = b ^ d;
endmodule
