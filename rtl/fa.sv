// Full adder made of one HNG (Haghparast-Navi) gate.
// The HNG gate with its fourth input tied to 0 gives sum = a ^ b ^ cin on R
// and the carry on S; its P and Q outputs (copies of a and b) are garbage.
// Combinational, no clock. The full adder is the cell of the multiplier's
// second reduction stage and of its final adder.
module fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic g_p, g_q;  // garbage outputs

  rev_hng u_hng (.a(a), .b(b), .c(cin), .d(1'b0),
                 .p(g_p), .q(g_q), .r(sum), .s(cout));
endmodule
