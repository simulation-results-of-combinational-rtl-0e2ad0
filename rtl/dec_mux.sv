// 2:1 multiplexer built from a reversible 3-to-8 decoder.
// y = sel ? d1 : d0. The decoder turns {sel, d1, d0} into its minterm lines
// m0..m7, and a Feynman-gate chain ORs the minterms where the selected input
// is 1: y = m1 | m3 | m6 | m7.
// Building a multiplexer from a reversible decoder follows the design; its
// size (2:1) and the gate-level structure are this implementation's choice.
// Combinational, no clock.
module dec_mux (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic y
);
  logic [7:0] m;

  rev_decoder #(.N(3)) u_dec (.a({sel, d1, d0}), .y(m));
  line_or #(.L(8), .MASK(8'b1100_1010)) u_y (.line(m), .y(y));
endmodule
