// rev_fredkin: 3x3 Fredkin gate (controlled swap).
// P = A, Q = ~A.B + A.C, R = A.B + ~A.C. Output R is therefore a 2:1
// multiplexer, R = A ? B : C, which is how the shift-register cell uses it.
// Combinational.
module rev_fredkin (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (a & b) | (~a & c);
endmodule
