// Self-checking testbench for rev_decoder: the default 4-to-16 decoder and a
// 3-to-8 instance. For every input value exactly the matching output line
// must be 1.
module rev_decoder_tb;
  int checks = 0, failures = 0;
  logic [3:0]  a4;
  logic [15:0] y4;
  logic [2:0]  a3;
  logic [7:0]  y3;

  rev_decoder           dut4 (.a(a4), .y(y4));
  rev_decoder #(.N(3))  dut3 (.a(a3), .y(y3));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      a4 = 4'(v); #1;
      checks++;
      if (y4 !== 16'(1) << v) begin
        failures++;
        $display("FAIL 4-to-16: a=%0d y=%b", v, y4);
      end
    end
    for (int v = 0; v < 8; v++) begin
      a3 = 3'(v); #1;
      checks++;
      if (y3 !== 8'(1) << v) begin
        failures++;
        $display("FAIL 3-to-8: a=%0d y=%b", v, y3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
