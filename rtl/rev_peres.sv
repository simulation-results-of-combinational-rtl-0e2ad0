// Peres gate (PG): a 3x3 reversible gate, a Toffoli followed by a Feynman.
// P = A, Q = A ^ B, R = (A & B) ^ C. With C tied to 0 it is a half adder:
// Q is the sum and R the carry. Pure combinational logic, no clock.
// The truth function is the standard one from the reversible-logic literature.
module rev_peres (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
