// Top level: the reversible-logic circuits side by side.
// The design holds two independent parts, each with its own ports:
//  - the 8 x 8 Wallace tree multiplier (wallace_tree): mul = x * y,
//    unsigned by default, two's complement with SIGNED = 1;
//  - the circuits built from the reversible decoder: a stand-alone 4-to-16
//    decoder, a full adder, a full subtractor, a 2:1 multiplexer and a 2-bit
//    comparator.
// Nothing is shared between the parts and everything is combinational: an
// output follows its inputs after the gate delays, with no clock or reset.
module rev_circuits_top #(
  parameter int unsigned N      = 8,    // multiplier operand width
  parameter bit          SIGNED = 1'b0  // 1: two's-complement multiplier
) (
  // Wallace tree multiplier
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] mul,
  // 4-to-16 reversible decoder
  input  logic [3:0]     dec_a,
  output logic [15:0]    dec_y,
  // full adder
  input  logic           fa_a,
  input  logic           fa_b,
  input  logic           fa_cin,
  output logic           fa_sum,
  output logic           fa_cout,
  // full subtractor
  input  logic           fs_a,
  input  logic           fs_b,
  input  logic           fs_bin,
  output logic           fs_diff,
  output logic           fs_bout,
  // 2:1 multiplexer
  input  logic           mux_sel,
  input  logic           mux_d0,
  input  logic           mux_d1,
  output logic           mux_y,
  // 2-bit comparator
  input  logic [1:0]     cmp_a,
  input  logic [1:0]     cmp_b,
  output logic           cmp_lt,
  output logic           cmp_eq,
  output logic           cmp_gt
);
  wallace_tree #(.N(N), .SIGNED(SIGNED)) u_mul (.x(x), .y(y), .mul(mul));

  rev_decoder #(.N(4)) u_dec (.a(dec_a), .y(dec_y));

  dec_full_adder u_fa (.a(fa_a), .b(fa_b), .cin(fa_cin),
                       .sum(fa_sum), .cout(fa_cout));

  dec_full_subtractor u_fs (.a(fs_a), .b(fs_b), .bin(fs_bin),
                            .diff(fs_diff), .bout(fs_bout));

  dec_mux u_mux (.sel(mux_sel), .d0(mux_d0), .d1(mux_d1), .y(mux_y));

  dec_comparator u_cmp (.a(cmp_a), .b(cmp_b), .lt(cmp_lt), .eq(cmp_eq), .gt(cmp_gt));
endmodule
