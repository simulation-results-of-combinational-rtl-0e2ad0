// Full subtractor built from a reversible 3-to-8 decoder.
// Computes a - b - bin = diff - 2 * bout. The decoder turns {a, b, bin} into
// its minterm lines m0..m7; Feynman-gate chains OR the minterms:
//   diff = m1 | m2 | m4 | m7
//   bout = m1 | m2 | m3 | m7
// Building a full subtractor from a reversible decoder follows the design;
// the gate-level structure is this implementation's choice.
// Combinational, no clock.
module dec_full_subtractor (
  input  logic a,
  input  logic b,
  input  logic bin,
  output logic diff,
  output logic bout
);
  logic [7:0] m;

  rev_decoder #(.N(3)) u_dec (.a({a, b, bin}), .y(m));
  line_or #(.L(8), .MASK(8'b1001_0110)) u_diff (.line(m), .y(diff));
  line_or #(.L(8), .MASK(8'b1000_1110)) u_bout (.line(m), .y(bout));
endmodule
