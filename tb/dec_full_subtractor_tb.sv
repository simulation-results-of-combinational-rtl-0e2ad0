// Self-checking testbench for dec_full_subtractor: drives every input combination and
// compares the outputs with arithmetic worked out in the testbench.
module dec_full_subtractor_tb;
  int checks = 0, failures = 0;
  logic a, b, bin, diff, bout;
  dec_full_subtractor dut (.a(a), .b(b), .bin(bin), .diff(diff), .bout(bout));

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
      int n;
      {a, b, bin} = 3'(v); #1;
      n = int'(a) - int'(b) - int'(bin);
      check("diff", diff, (n & 1) == 1);
      check("bout", bout, n < 0);
      check("identity", 1'(int'(diff) - 2 * int'(bout) == n), 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
