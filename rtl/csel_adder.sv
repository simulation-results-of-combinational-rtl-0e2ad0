// Carry-select adder: the final adder of the multiplier, adding the two rows
// left by the reduction tree.
// The W-bit operands are cut into W/BLK blocks of BLK bits. Block 0 is a plain
// ripple adder with carry-in 0. Every higher block holds two ripple adders,
// one computing the block's sum for an incoming carry of 0 and one for 1;
// when the real carry arrives, a row of smux cells (Fredkin gates) picks
// the right sum and carry-out. The carry therefore crosses each block through
// one multiplexer instead of BLK full adders.
// blk_carry[k] is the carry into block k (blk_carry[0] = 0); cout is the
// carry out of the top block. W must be a multiple of BLK.
// Using carry-select follows the design; the block size BLK = 4 is this
// implementation's choice. Combinational, no clock.
module csel_adder #(
  parameter int unsigned W   = 16,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NB = W / BLK;

  if (W % BLK != 0) begin : g_bad_size
    $error("csel_adder: W must be a multiple of BLK");
  end

  logic [NB:0] blk_carry;

  assign blk_carry[0] = 1'b0;

  ripple_adder #(.W(BLK), .CIN(1'b0)) u_blk0 (
    .a(a[BLK-1:0]), .b(b[BLK-1:0]), .sum(sum[BLK-1:0]), .cout(blk_carry[1]));

  for (genvar k = 1; k < NB; k++) begin : g_blk
    logic [BLK-1:0] s0, s1;
    logic           c0, c1;

    ripple_adder #(.W(BLK), .CIN(1'b0)) u_r0 (
      .a(a[k*BLK +: BLK]), .b(b[k*BLK +: BLK]), .sum(s0), .cout(c0));
    ripple_adder #(.W(BLK), .CIN(1'b1)) u_r1 (
      .a(a[k*BLK +: BLK]), .b(b[k*BLK +: BLK]), .sum(s1), .cout(c1));

    for (genvar i = 0; i < BLK; i++) begin : g_sel
      smux u_mx (.sel(blk_carry[k]), .d0(s0[i]), .d1(s1[i]), .y(sum[k*BLK + i]));
    end
    smux u_cmx (.sel(blk_carry[k]), .d0(c0), .d1(c1), .y(blk_carry[k+1]));
  end

  assign cout = blk_carry[NB];
endmodule
