// Haghparast-Navi gate (HNG): a 4x4 reversible gate.
// P = A, Q = B, R = A ^ B ^ C, S = ((A ^ B) & C) ^ (A & B) ^ D.
// With D tied to 0 it is a full adder: R is the sum of A, B, C and S their
// carry. Pure combinational logic, no clock. The truth function is the
// standard one from the reversible-logic literature.
module rev_hng (
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
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
