// XOR/XNOR cell ("special circuit") of the 4:2 compressor.
// Gives x = a ^ b and xn = ~(a ^ b) together, so that the multiplexers of the
// compressor can pick either polarity without an extra inverter. It is made of
// two Feynman gates: the first forms a ^ b, the second, with its target tied
// to 1, inverts it. The cell's name and place come from the design; what it
// computes is this implementation's choice (the usual XOR-XNOR cell of
// multiplexer-based 4:2 compressors). Combinational, no clock.
module special (
  input  logic a,
  input  logic b,
  output logic x,
  output logic xn
);
  logic g_a, g_x;  // garbage outputs

  rev_feynman u_fg0 (.a(a), .b(b),    .p(g_a), .q(x));
  rev_feynman u_fg1 (.a(x), .b(1'b1), .p(g_x), .q(xn));
endmodule
