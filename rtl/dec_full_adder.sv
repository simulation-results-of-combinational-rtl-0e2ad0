// Full adder built from a reversible 3-to-8 decoder.
// The decoder turns {a, b, cin} into its eight minterm lines m0..m7; the
// outputs are ORs of minterms, each formed by a Feynman-gate chain:
//   sum  = m1 | m2 | m4 | m7
//   cout = m3 | m5 | m6 | m7
// Building a full adder from a reversible decoder follows the design; the
// decoder structure and the Feynman chains are this implementation's choice.
// Combinational, no clock.
module dec_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic [7:0] m;

  rev_decoder #(.N(3)) u_dec (.a({a, b, cin}), .y(m));
  line_or #(.L(8), .MASK(8'b1001_0110)) u_sum  (.line(m), .y(sum));
  line_or #(.L(8), .MASK(8'b1110_1000)) u_cout (.line(m), .y(cout));
endmodule
