// rev_ts3: 3x3 TS-3 gate: P = A, Q = B, R = A xor B xor C.
// R is the sum bit of a full adder without the carry; the subtractor uses it
// for its most significant stage, where no carry out is needed. Combinational.
module rev_ts3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
endmodule
