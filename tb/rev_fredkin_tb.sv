// Self-checking testbench for rev_fredkin: drives every input combination and
// compares each output with the gate's truth function written out here.
module rev_fredkin_tb;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  rev_fredkin dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
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
      // the control selects straight (a=0) or swapped (a=1) routing
      check("q", q, (v inside {2, 3, 5, 7}));
      check("r", r, (v inside {1, 3, 6, 7}));
      // the number of ones is conserved
      check("conserve", 1'($countones({p, q, r}) == $countones({a, b, c})), 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
