// Self-checking testbench for dec_full_adder: drives every input combination and
// compares the outputs with arithmetic worked out in the testbench.
module dec_full_adder_tb;
  int checks = 0, failures = 0;
  logic a, b, cin, sum, cout;
  dec_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

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
      {a, b, cin} = 3'(v); #1;
      n = int'(a) + int'(b) + int'(cin);
      check("sum", sum, n[0]);
      check("cout", cout, n[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
