// Self-checking testbench for partialproducts: for every pair of 8-bit
// operands, each partial-product bit p[i*N + j] must equal x[j] & y[i].
// A SIGNED = 1 instance must give the same bits, inverted where exactly one
// of i and j is the sign position 7.
module partialproducts_tb;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic [N-1:0]   x, y;
  logic [N*N-1:0] p, exp_p;

  partialproducts #(.N(N)) dut (.x(x), .y(y), .p(p));

  logic [N*N-1:0] ps, exp_ps;
  partialproducts #(.N(N), .SIGNED(1'b1)) duts (.x(x), .y(y), .p(ps));

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x = N'(a); y = N'(b); #1;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            exp_p[i*N + j] = ((a >> j) & (b >> i) & 1) == 1;
        exp_ps = exp_p;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            if ((i == N - 1) != (j == N - 1)) exp_ps[i*N + j] = ~exp_p[i*N + j];
        checks++;
        if (ps !== exp_ps) begin
          failures++;
          if (failures < 10) $display("FAIL signed x=%0d y=%0d p=%h expected %h", a, b, ps, exp_ps);
        end
        checks++;
        if (p !== exp_p) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d p=%h expected %h", a, b, p, exp_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
