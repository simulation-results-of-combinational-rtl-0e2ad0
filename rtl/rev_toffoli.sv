// Toffoli gate (TG): the 3x3 reversible controlled-controlled-NOT.
// P = A, Q = B, R = (A & B) ^ C. With C tied to 0, R is the AND of A and B,
// which is how the multiplier forms each partial-product bit.
// Pure combinational logic, no clock. The truth function is the standard one
// from the reversible-logic literature.
module rev_toffoli (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
