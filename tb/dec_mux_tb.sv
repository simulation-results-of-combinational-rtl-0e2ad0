// Self-checking testbench for dec_mux: drives every input combination and
// compares the outputs with arithmetic worked out in the testbench.
module dec_mux_tb;
  int checks = 0, failures = 0;
  logic sel, d0, d1, y;
  dec_mux dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

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
      if (sel) check("y (sel=1)", y, d1);
      else     check("y (sel=0)", y, d0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
