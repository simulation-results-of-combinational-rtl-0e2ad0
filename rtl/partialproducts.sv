// Partial-product generator of an N x N multiplier.
// p[i*N + j] = x[j] & y[i]: bit j of row i, with weight 2^(i+j). Each bit is
// made by one Toffoli gate whose target input is tied to 0, so R = x[j] & y[i];
// the gate's P and Q outputs (copies of the operands) are garbage.
// With SIGNED = 1 (two's-complement operands, Baugh-Wooley form) the bits
// that pair a sign bit with a non-sign bit (exactly one of i, j equal to
// N-1) are inverted by tying that Toffoli gate's target to 1 instead.
// For the default N = 8 this is the 64-bit partial-product vector p[63:0].
// Combinational, no clock. The bit order inside p is this implementation's
// choice.
module partialproducts #(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b0
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [N*N-1:0] p
);
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      localparam bit INV = SIGNED && ((i == N - 1) != (j == N - 1));
      logic g_p, g_q;  // garbage outputs
      rev_toffoli u_tg (.a(x[j]), .b(y[i]), .c(INV),
                        .p(g_p), .q(g_q), .r(p[i*N + j]));
    end
  end
endmodule
