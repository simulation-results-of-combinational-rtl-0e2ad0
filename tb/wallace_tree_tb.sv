// Self-checking testbench for wallace_tree.
// The default 8 x 8 multiplier is run over all 65,536 operand pairs and every
// product is compared with the integer product. The pair x = y = 8'b10101010
// (170 * 170 = 28,900 = 16'b0111000011100100) is also checked on its own.
// A second instance with N = 12 is run on random operands to exercise the
// width parameter (three compressor groups, four carry-save rows).
// A third instance with SIGNED = 1 is run over all 65,536 pairs of 8-bit
// two's-complement operands and compared with the signed product.
module wallace_tree_tb;
  int checks = 0, failures = 0;

  logic [7:0]  x8, y8;
  logic [15:0] mul8;
  logic [11:0] x12, y12;
  logic [23:0] mul12;

  wallace_tree              dut8  (.x(x8),  .y(y8),  .mul(mul8));
  wallace_tree #(.N(12))    dut12 (.x(x12), .y(y12), .mul(mul12));

  logic [7:0]  xs, ys;
  logic [15:0] muls;
  wallace_tree #(.SIGNED(1'b1)) duts (.x(xs), .y(ys), .mul(muls));

  initial begin
    #10000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // waveform example: 10101010 x 10101010
    x8 = 8'b1010_1010; y8 = 8'b1010_1010; #1;
    checks++;
    if (mul8 !== 16'b0111_0000_1110_0100) begin
      failures++;
      $display("FAIL 170*170 = %b", mul8);
    end

    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a); y8 = 8'(b); #1;
        checks++;
        if (int'(mul8) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d", a, b, mul8);
        end
      end
    end

    for (int n = 0; n < 20000; n++) begin
      int unsigned a, b;
      a = (n < 4) ? ((n & 1) ? 4095 : 0) : ($urandom & 12'hFFF);
      b = (n < 4) ? ((n & 2) ? 4095 : 0) : ($urandom & 12'hFFF);
      x12 = 12'(a); y12 = 12'(b); #1;
      checks++;
      if (mul12 !== 24'(a * b)) begin
        failures++;
        if (failures < 10) $display("FAIL N=12 %0d*%0d = %0d", a, b, mul12);
      end
    end

    for (int a = -128; a < 128; a++) begin
      for (int b = -128; b < 128; b++) begin
        xs = 8'(a); ys = 8'(b); #1;
        checks++;
        if ($signed(muls) != 16'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL signed %0d*%0d = %0d", a, b, $signed(muls));
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
