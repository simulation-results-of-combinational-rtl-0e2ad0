// 2:1 multiplexer cell of the 4:2 compressor, made of one Fredkin gate.
// y = sel ? d1 : d0. The Fredkin gate is driven with A = sel, B = d0, C = d1,
// so its Q output is the selected input; P (sel) and R (the other input) are
// garbage outputs. Combinational, no clock. The cell's name comes from the
// design; building it from a Fredkin gate is this implementation's choice.
module smux (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic y
);
  logic g_p, g_r;  // garbage outputs

  rev_fredkin u_frg (.a(sel), .b(d0), .c(d1), .p(g_p), .q(y), .r(g_r));
endmodule
