// Half adder made of one Peres gate.
// The Peres gate with its third input tied to 0 gives sum = a ^ b on Q and
// carry = a & b on R; its P output (a copy of a) is a garbage output.
// Combinational, no clock. Building the half adder from a Peres gate follows
// the design's choice of Toffoli, Peres and HNG gates for the multiplier.
module ha (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  logic g_p;  // garbage output

  rev_peres u_pg (.a(a), .b(b), .c(1'b0), .p(g_p), .q(sum), .r(carry));
endmodule
