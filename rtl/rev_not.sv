// rev_not: reversible NOT gate (Pauli-X), the 1x1 gate of the library.
// Output y is the complement of a. Purely combinational, no timing.
// Used on every divisor bit of the subtractor to form its one's complement.
module rev_not (
  input  logic a,
  output logic y
);
  assign y = ~a;
endmodule
