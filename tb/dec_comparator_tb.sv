// Self-checking testbench for dec_comparator: drives every input combination and
// compares the outputs with arithmetic worked out in the testbench.
module dec_comparator_tb;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic lt, eq, gt;
  dec_comparator dut (.a(a), .b(b), .lt(lt), .eq(eq), .gt(gt));

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
    for (int va = 0; va < 4; va++) begin
      for (int vb = 0; vb < 4; vb++) begin
        a = 2'(va); b = 2'(vb); #1;
        check("lt", lt, va < vb);
        check("eq", eq, va == vb);
        check("gt", gt, va > vb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
