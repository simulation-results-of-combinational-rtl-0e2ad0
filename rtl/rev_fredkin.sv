// Fredkin gate (FRG): the 3x3 reversible controlled swap.
// P = A; when A is 0, Q = B and R = C; when A is 1 the two are swapped,
// Q = C and R = B. Used as a 2:1 multiplexer (Q selects C when A is 1) and,
// with C tied to 0, to split a line into its A=0 and A=1 halves.
// Pure combinational logic, no clock. The truth function is the standard
// one from the reversible-logic literature.
module rev_fredkin (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
