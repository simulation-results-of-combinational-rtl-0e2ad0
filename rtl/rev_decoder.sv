// Reversible N-to-2^N decoder (4-to-16 by default).
// y[v] = 1 exactly when a == v.
// The decoder is built one input bit at a time, most significant bit first:
//  - a Feynman gate with its target tied to 1 turns a[N-1] into the two
//    lines ~a[N-1] (value 0) and a[N-1] (value 1);
//  - each further bit b splits every line L into ~b & L and b & L with one
//    Fredkin gate (control b, inputs L and 0). The control output of each
//    Fredkin gate is passed on as the control of the next one, so the bit
//    is never fanned out.
// This uses one Feynman gate and 2^N - 2 Fredkin gates and no garbage
// outputs apart from the control bits that leave the last gate of each
// level. The decoder is the building block of the design's combinational
// circuits; its gate-level structure is this implementation's choice.
// Combinational, no clock.
module rev_decoder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]    a,
  output logic [2**N-1:0] y
);
  // lines[l] holds the 2^(l+1) lines after the top l+1 input bits are decoded
  logic [2**N-1:0] lines [N];

  // level 0: one Feynman gate
  logic msb_copy;
  rev_feynman u_fg (.a(a[N-1]), .b(1'b1), .p(msb_copy), .q(lines[0][0]));
  assign lines[0][1] = msb_copy;
  if (N > 1) begin : g_pad0
    assign lines[0][2**N-1:2] = '0;
  end

  // levels 1..N-1: one Fredkin gate per line
  for (genvar l = 1; l < N; l++) begin : g_lvl
    localparam int unsigned NL = 2 ** l;  // lines entering this level
    logic [NL:0] ctl;                     // control passed from gate to gate

    assign ctl[0] = a[N-1-l];
    for (genvar v = 0; v < NL; v++) begin : g_split
      rev_fredkin u_frg (.a(ctl[v]), .b(lines[l-1][v]), .c(1'b0),
                         .p(ctl[v+1]), .q(lines[l][2*v]), .r(lines[l][2*v+1]));
    end
    if (2 * NL < 2 ** N) begin : g_pad
      assign lines[l][2**N-1:2*NL] = '0;
    end
  end

  assign y = lines[N-1];
endmodule
