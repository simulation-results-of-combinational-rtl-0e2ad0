// Feynman gate (FG): the 2x2 reversible controlled-NOT.
// P passes the control A through and Q = A ^ B. With B tied to 1 it
// produces ~A, with B tied to 0 it makes a copy of A. Pure combinational
// logic, no clock. The gate is one of those the design names; its truth
// function is the standard one from the reversible-logic literature.
module rev_feynman (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
