// N x N Wallace tree multiplier built from reversible-gate cells.
// mul = x * y, a 2N-bit product (x[7:0], y[7:0], mul[15:0] by default).
// With SIGNED = 0 (the default) the operands are unsigned; with SIGNED = 1
// they are two's complement and the product is the signed product, using
// the Baugh-Wooley form: the partial products that pair a sign bit with a
// non-sign bit are inverted, and 1s are added at weights 2^N and 2^(2N-1).
// The two constant 1s ride in row 0, whose bits end at weight 2^(N-1).
//
// The multiplier works in four steps, all combinational:
//  1. Partial products. partialproducts forms the N*N bits x[j] & y[i] with
//     Toffoli gates; row i is (x & {N{y[i]}}) shifted left by i.
//  2. First stage, 4:2 compressors. The rows are taken four at a time
//     (rows 4g..4g+3). For each group a row of cmprsr4_2 cells, one per
//     column, reduces the four rows to a sum row and a carry row; the cout of
//     each column feeds cin of the next column. N = 8 gives four rows.
//  3. Second stage, full adders. The rows left by the compressors are
//     reduced to two by carry-save rows of fa cells (HNG gates): the first
//     three rows enter one carry-save row, every further row enters another.
//     N = 8 needs two such rows.
//  4. Final adder. csel_adder (carry-select, blocks of BLK bits) adds the
//     last two rows.
// Each intermediate row is kept 2N bits wide and carries out of the top
// column are dropped, so every stage keeps the row total modulo 2^(2N),
// which is all a 2N-bit product needs (for an unsigned product they are 0).
// The three-step structure (partial products, compressor stage, full-adder
// stage, final adder) follows the design; the grouping of rows and the
// carry-save ordering of the second stage are this implementation's choice.
// The design calls the multiplier signed but its example result is the
// unsigned product; the default follows the example.
// N must be a multiple of 4, and 2N a multiple of BLK.
module wallace_tree #(
  parameter int unsigned N      = 8,
  parameter int unsigned BLK    = 4,
  parameter bit          SIGNED = 1'b0
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] mul
);
  localparam int unsigned W  = 2 * N;   // product width
  localparam int unsigned NG = N / 4;   // compressor groups
  localparam int unsigned NR = 2 * NG;  // rows after the compressor stage

  if (N % 4 != 0 || N < 4) begin : g_bad_size
    $error("wallace_tree: N must be a positive multiple of 4");
  end

  // ---------------- partial products ----------------
  logic [N*N-1:0] p;
  logic [W-1:0]   pp_row [N];

  partialproducts #(.N(N), .SIGNED(SIGNED)) pp (.x(x), .y(y), .p(p));

  // Baugh-Wooley correction constants, placed in row 0's empty columns
  localparam logic [W-1:0] BW_CONST = SIGNED ? ((W'(1) << N) | (W'(1) << (W - 1))) : '0;

  for (genvar i = 0; i < N; i++) begin : g_rows
    if (i == 0) begin : g_first
      assign pp_row[i] = W'(p[i*N +: N]) | BW_CONST;
    end else begin : g_other
      assign pp_row[i] = W'(p[i*N +: N]) << i;
    end
  end

  // ---------------- first stage: 4:2 compressors ----------------
  logic [W-1:0] st1_row [NR];  // st1_row[2g] = sum row, st1_row[2g+1] = carry row

  for (genvar g = 0; g < NG; g++) begin : g_cmp
    logic [W:0] chain;   // cout -> cin chain along the columns
    logic [W:0] carry;   // carry row, bit k has weight 2^k

    assign chain[0] = 1'b0;
    assign carry[0] = 1'b0;
    for (genvar k = 0; k < W; k++) begin : g_col
      cmprsr4_2 x_0 (
        .x1(pp_row[4*g][k]), .x2(pp_row[4*g+1][k]),
        .x3(pp_row[4*g+2][k]), .x4(pp_row[4*g+3][k]),
        .cin(chain[k]),
        .sum(st1_row[2*g][k]), .carry(carry[k+1]), .cout(chain[k+1]));
    end
    assign st1_row[2*g+1] = carry[W-1:0];
  end

  // ---------------- second stage: carry-save full-adder rows ----------------
  logic [W-1:0] acc_s [NR-1];
  logic [W-1:0] acc_c [NR-1];

  assign acc_s[0] = st1_row[0];
  assign acc_c[0] = st1_row[1];

  for (genvar r = 2; r < NR; r++) begin : g_csa
    logic [W:0] c;
    assign c[0] = 1'b0;
    for (genvar k = 0; k < W; k++) begin : g_col
      fa f1 (.a(acc_s[r-2][k]), .b(acc_c[r-2][k]), .cin(st1_row[r][k]),
             .sum(acc_s[r-1][k]), .cout(c[k+1]));
    end
    assign acc_c[r-1] = c[W-1:0];
  end

  // ---------------- final carry-select adder ----------------
  logic cout_unused;  // weight 2^(2N): outside the product

  csel_adder #(.W(W), .BLK(BLK)) u_final (
    .a(acc_s[NR-2]), .b(acc_c[NR-2]), .sum(mul), .cout(cout_unused));
endmodule
