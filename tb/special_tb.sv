// Self-checking testbench for special: drives every input combination and
// compares each output with the gate's truth function written out here.
module special_tb;
  int checks = 0, failures = 0;
  logic a, b, x, xn;
  special dut (.a(a), .b(b), .x(x), .xn(xn));
  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v); #1;
      check("x", x, v == 1 || v == 2);
      check("xn", xn, v == 0 || v == 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
