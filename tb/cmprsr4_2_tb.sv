// Self-checking testbench for cmprsr4_2: drives every input combination and
// compares each output with the gate's truth function written out here.
module cmprsr4_2_tb;
  int checks = 0, failures = 0;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  cmprsr4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                 .sum(sum), .carry(carry), .cout(cout));
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
    for (int v = 0; v < 32; v++) begin
      int n, got;
      {x1, x2, x3, x4, cin} = 5'(v); #1;
      n = $countones(v);
      got = int'(sum) + 2 * (int'(carry) + int'(cout));
      check("weighted sum", 1'(got == n), 1'b1);
      check("sum", sum, n[0]);
      // cout must not depend on cin: compare with cin flipped
      begin
        logic cout0;
        cout0 = cout;
        cin = ~cin; #1;
        check("cout independent of cin", cout, cout0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
