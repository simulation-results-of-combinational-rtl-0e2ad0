// Self-checking testbench for rev_feynman: drives every input combination and
// compares each output with the gate's truth function written out here.
module rev_feynman_tb;
  int checks = 0, failures = 0;
  logic a, b, p, q;
  rev_feynman dut (.a(a), .b(b), .p(p), .q(q));
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
      check("p", p, a);
      check("q", q, a != b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
