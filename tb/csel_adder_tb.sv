// Self-checking testbench for csel_adder at its default 16-bit width with
// 4-bit blocks. Adds corner operands and random ones and compares sum and
// cout with the integer sum. It also counts how often each block received
// an incoming carry of 1 (the upper ripple adder's result was selected) and
// fails if some block never did.
module csel_adder_tb;
  localparam int W = 16, BLK = 4, NB = W / BLK;
  int checks = 0, failures = 0;
  int sel_hi [NB];
  logic [W-1:0] a, b, sum;
  logic         cout;

  csel_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb);
    logic [W:0] exp;
    a = va; b = vb; #1;
    exp = {1'b0, va} + {1'b0, vb};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, expected %h", va, vb, {cout, sum}, exp);
    end
    // carry into block k computed from the operands alone
    for (int k = 1; k < NB; k++) begin
      logic [W:0] low;
      low = {1'b0, va & W'((1 << (k*BLK)) - 1)} + {1'b0, vb & W'((1 << (k*BLK)) - 1)};
      if (low[k*BLK]) sel_hi[k]++;
    end
  endtask

  initial begin
    foreach (sel_hi[k]) sel_hi[k] = 0;
    apply('0, '0);
    apply('1, '0);
    apply('1, 16'd1);
    apply('1, '1);
    apply(16'h0FFF, 16'h0001);
    apply(16'h00FF, 16'h0001);
    apply(16'h000F, 16'h0001);
    apply(16'h8000, 16'h8000);
    for (int n = 0; n < 200000; n++) apply(W'($urandom), W'($urandom));
    for (int k = 1; k < NB; k++) begin
      checks++;
      if (sel_hi[k] == 0) begin
        failures++;
        $display("FAIL block %0d never received a carry", k);
      end
      $display("block %0d: carry-in 1 selected %0d times", k, sel_hi[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
