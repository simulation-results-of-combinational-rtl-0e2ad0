// End-to-end testbench for rev_circuits_top at its default parameters.
// Multiplier: all 65,536 pairs of 8-bit operands, each product compared with
// the integer product. Decoder circuits: every input combination of the
// 4-to-16 decoder, full adder, full subtractor, multiplexer and comparator,
// driven together with the multiplier operands.
// It also counts how often each mechanism of the design was exercised and
// fails if one never was:
//   - a 4:2 compressor passing a carry to the next column (cout = 1),
//   - a 4:2 compressor producing a carry-row bit,
//   - a full adder of the carry-save stage producing a carry,
//   - the upper carry-select blocks selecting their carry-in-1 sums,
//   - every decoder line, both multiplexer inputs, all three comparator
//     results, an adder carry and a subtractor borrow.
module rev_circuits_top_tb;
  int checks = 0, failures = 0;

  logic [7:0]  x, y;
  logic [15:0] mul;
  logic [3:0]  dec_a;
  logic [15:0] dec_y;
  logic fa_a, fa_b, fa_cin, fa_sum, fa_cout;
  logic fs_a, fs_b, fs_bin, fs_diff, fs_bout;
  logic mux_sel, mux_d0, mux_d1, mux_y;
  logic [1:0] cmp_a, cmp_b;
  logic cmp_lt, cmp_eq, cmp_gt;

  rev_circuits_top dut (.*);

  int n_cmp_cout, n_cmp_carry, n_csa_carry, n_fa_carry, n_fs_borrow;
  int n_csel [4];
  int n_line [16];
  int n_mux [2];
  int n_rel [3];

  initial begin
    #10000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic seen(input string what, input int count);
    $display("%-40s %0d", what, count);
    expect_true({what, " never happened"}, count > 0);
  endtask

  initial begin
    n_cmp_cout = 0; n_cmp_carry = 0; n_csa_carry = 0; n_fa_carry = 0; n_fs_borrow = 0;
    foreach (n_csel[k]) n_csel[k] = 0;
    foreach (n_line[k]) n_line[k] = 0;
    foreach (n_mux[k])  n_mux[k]  = 0;
    foreach (n_rel[k])  n_rel[k]  = 0;

    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        int s, d;
        x = 8'(a); y = 8'(b);
        dec_a = 4'(b);
        {fa_a, fa_b, fa_cin} = 3'(b);
        {fs_a, fs_b, fs_bin} = 3'(b >> 3);
        {mux_sel, mux_d0, mux_d1} = 3'(b >> 5);
        {cmp_a, cmp_b} = 4'(b >> 4);
        #1;
        // multiplier
        expect_true($sformatf("%0d*%0d gave %0d", a, b, mul), int'(mul) == a * b);
        // decoder
        expect_true($sformatf("decoder %0d gave %b", dec_a, dec_y), dec_y == 16'(1) << dec_a);
        n_line[dec_a]++;
        // full adder
        s = int'(fa_a) + int'(fa_b) + int'(fa_cin);
        expect_true("full adder", {fa_cout, fa_sum} == 2'(s));
        if (fa_cout) n_fa_carry++;
        // full subtractor
        d = int'(fs_a) - int'(fs_b) - int'(fs_bin);
        expect_true("full subtractor", int'(fs_diff) - 2 * int'(fs_bout) == d);
        if (fs_bout) n_fs_borrow++;
        // multiplexer
        expect_true("multiplexer", mux_y == (mux_sel ? mux_d1 : mux_d0));
        n_mux[mux_sel]++;
        // comparator
        expect_true("comparator", {cmp_lt, cmp_eq, cmp_gt} ==
                    {cmp_a < cmp_b, cmp_a == cmp_b, cmp_a > cmp_b});
        if (cmp_a < cmp_b) n_rel[0]++; else if (cmp_a == cmp_b) n_rel[1]++; else n_rel[2]++;
        // internal mechanisms of the multiplier
        if (dut.u_mul.g_cmp[0].chain != 0 || dut.u_mul.g_cmp[1].chain != 0) n_cmp_cout++;
        if (dut.u_mul.g_cmp[0].carry != 0 || dut.u_mul.g_cmp[1].carry != 0) n_cmp_carry++;
        if (dut.u_mul.g_csa[2].c != 0 || dut.u_mul.g_csa[3].c != 0) n_csa_carry++;
        for (int k = 1; k < 4; k++)
          if (dut.u_mul.u_final.blk_carry[k]) n_csel[k]++;
      end
    end

    // the waveform example: 10101010 x 10101010 = 0111000011100100
    x = 8'b1010_1010; y = 8'b1010_1010; #1;
    expect_true("170*170", mul == 16'b0111_0000_1110_0100);

    seen("compressor carry to next column", n_cmp_cout);
    seen("compressor carry-row bit", n_cmp_carry);
    seen("carry-save full-adder carry", n_csa_carry);
    // In the 8 x 8 tree the two rows reaching the final adder never both
    // have a 1 in bits 0..3, so block 1 never gets a carry; it is reported
    // only. Blocks 2 and 3 must select their carry-in-1 sums.
    $display("%-40s %0d", "carry-select block 1 took carry-in 1", n_csel[1]);
    for (int k = 2; k < 4; k++) seen($sformatf("carry-select block %0d took carry-in 1", k), n_csel[k]);
    for (int k = 0; k < 16; k++) seen($sformatf("decoder line %0d", k), n_line[k]);
    seen("full adder carry out", n_fa_carry);
    seen("full subtractor borrow", n_fs_borrow);
    seen("multiplexer selects d0", n_mux[0]);
    seen("multiplexer selects d1", n_mux[1]);
    seen("comparator a < b", n_rel[0]);
    seen("comparator a == b", n_rel[1]);
    seen("comparator a > b", n_rel[2]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
