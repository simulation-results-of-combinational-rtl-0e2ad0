// 2-bit binary magnitude comparator built from a reversible 4-to-16 decoder.
// lt = (a < b), eq = (a == b), gt = (a > b), unsigned; exactly one is 1.
// The decoder turns {a, b} into sixteen minterm lines; line i stands for
// a = i[3:2], b = i[1:0]. Each output is a Feynman-gate chain ORing the lines
// whose (a, b) pair satisfies its relation; the masks are computed at
// elaboration from that rule.
// Building a comparator from a reversible decoder, and the 4-to-16 decoder,
// follow the design; the 2-bit operand width and the gate-level structure are
// this implementation's choice. Combinational, no clock.
module dec_comparator (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic       lt,
  output logic       eq,
  output logic       gt
);
  // rel: 0 = less than, 1 = equal, 2 = greater than
  function automatic logic [15:0] rel_mask(int rel);
    logic [15:0] m;
    m = '0;
    for (int i = 0; i < 16; i++) begin
      if      (rel == 0) m[i] = (i / 4) <  (i % 4);
      else if (rel == 1) m[i] = (i / 4) == (i % 4);
      else               m[i] = (i / 4) >  (i % 4);
    end
    return m;
  endfunction

  localparam logic [15:0] MASK_LT = rel_mask(0);
  localparam logic [15:0] MASK_EQ = rel_mask(1);
  localparam logic [15:0] MASK_GT = rel_mask(2);

  logic [15:0] m;

  rev_decoder #(.N(4)) u_dec (.a({a, b}), .y(m));
  line_or #(.L(16), .MASK(MASK_LT)) u_lt (.line(m), .y(lt));
  line_or #(.L(16), .MASK(MASK_EQ)) u_eq (.line(m), .y(eq));
  line_or #(.L(16), .MASK(MASK_GT)) u_gt (.line(m), .y(gt));
endmodule
