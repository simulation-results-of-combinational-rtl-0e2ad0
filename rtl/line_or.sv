// OR of selected one-hot decoder lines, made of a chain of Feynman gates.
// y = OR of line[i] over every i with MASK[i] = 1.
// Because at most one decoder line is 1 at a time, the OR equals the XOR of
// the selected lines, which a chain of Feynman gates computes reversibly: the
// target starts at 0 and each selected line is XORed into it. The control
// outputs of the gates are copies of the lines and are garbage.
// Combinational, no clock.
module line_or #(
  parameter int unsigned   L    = 8,
  parameter logic [L-1:0]  MASK = '0
) (
  input  logic [L-1:0] line,
  output logic         y
);
  logic [L:0] acc;

  assign acc[0] = 1'b0;
  for (genvar i = 0; i < L; i++) begin : g_line
    if (MASK[i]) begin : g_fg
      logic g_p;  // garbage output
      rev_feynman u_fg (.a(line[i]), .b(acc[i]), .p(g_p), .q(acc[i+1]));
    end else begin : g_skip
      assign acc[i+1] = acc[i];
    end
  end
  assign y = acc[L];
endmodule
