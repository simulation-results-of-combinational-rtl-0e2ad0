// Self-checking testbench for rev_hng: drives every input combination and
// compares each output with the gate's truth function written out here.
module rev_hng_tb;
  int checks = 0, failures = 0;
  logic a, b, c, d, p, q, r, s;
  rev_hng dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));
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
    for (int v = 0; v < 16; v++) begin
      int n;
      {a, b, c, d} = 4'(v); #1;
      n = int'(a) + int'(b) + int'(c);
      check("p", p, a);
      check("q", q, b);
      check("r", r, n % 2 == 1);
      check("s", s, (n >= 2) != d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
