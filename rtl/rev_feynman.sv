// rev_feynman: 2x2 Feynman (controlled-NOT) gate.
// P = A, Q = A xor B. With B = 0 it copies A (the reversible way to fan a
// signal out); with B = 1 it inverts A. Combinational, no timing.
module rev_feynman (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
