// Ripple-carry adder with a constant carry-in, one block of the carry-select
// adder. With CIN = 0 the lowest bit is a half adder (Peres gate) and the
// rest are full adders (HNG gates); with CIN = 1 every bit is a full adder.
// sum = a + b + CIN, cout the carry out of the top bit. Combinational.
module ripple_adder #(
  parameter int unsigned W   = 4,
  parameter bit          CIN = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  if (CIN == 1'b0) begin : g_ha
    ha u_b0 (.a(a[0]), .b(b[0]), .sum(sum[0]), .carry(c[1]));
  end else begin : g_fa
    fa u_b0 (.a(a[0]), .b(b[0]), .cin(1'b1), .sum(sum[0]), .cout(c[1]));
  end
  assign c[0] = CIN;

  for (genvar i = 1; i < W; i++) begin : g_bit
    fa u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[W];
endmodule
