// Self-checking testbench for smux: drives every input combination and
// compares each output with the gate's truth function written out here.
module smux_tb;
  int checks = 0, failures = 0;
  logic sel, d0, d1, y;
  smux dut (.sel(sel), .d0(d0), .d1(d1), .y(y));
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
    for (int v = 0; v < 8; v++) begin
      {sel, d1, d0} = 3'(v); #1;
      check("y", y, v inside {1, 3, 6, 7});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
