// 4:2 compressor: adds five bits of one column of the partial-product array.
// Inputs x1..x4 and cin all have the column's weight; the outputs satisfy
//   x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout).
// cout does not depend on cin, so a row of compressors chained cout -> cin
// along the columns has no rippling carry. Structure (XOR-XNOR and
// multiplexer form):
//   x12   = x1 ^ x2              (special cell inst0)
//   x34   = x3 ^ x4              (special cell inst1)
//   x1234 = x12 ? ~x34 : x34     (smux inst2)
//   cout  = x12 ? x3 : x1        (smux inst3)
//   carry = x1234 ? cin : x4     (smux inst4)
//   sum   = x1234 ^ cin          (special cell inst5)
// The split into "special" cells and "smux" cells follows the design's
// hierarchy; the equations are this implementation's choice.
// Combinational, no clock.
module cmprsr4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic x12, xn12, x34, xn34, x1234, sum_n;

  special inst0 (.a(x1), .b(x2), .x(x12), .xn(xn12));
  special inst1 (.a(x3), .b(x4), .x(x34), .xn(xn34));
  smux    inst2 (.sel(x12),   .d0(x34), .d1(xn34), .y(x1234));
  smux    inst3 (.sel(x12),   .d0(x1),  .d1(x3),   .y(cout));
  smux    inst4 (.sel(x1234), .d0(x4),  .d1(cin),  .y(carry));
  special inst5 (.a(x1234), .b(cin), .x(sum), .xn(sum_n));
endmodule
