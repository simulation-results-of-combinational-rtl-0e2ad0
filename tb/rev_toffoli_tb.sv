// Self-checking testbench for rev_toffoli: drives every input combination and
// compares each output with the gate's truth function written out here.
module rev_toffoli_tb;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  rev_toffoli dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
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
      {a, b, c} = 3'(v); #1;
      check("p", p, a);
      check("q", q, b);
      check("r", r, (v == 6) || (v < 6 && c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
