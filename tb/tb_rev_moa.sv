// Self-checking test of the multi-operand adder. For all 256 operand pairs
// the testbench forms the partial products x_i.y_j itself and checks that
// the adder array returns the integer product x*y. Two garbage bits with a
// known value (the P outputs of the first Peres gates of the two upper rows,
// which pass x1y0 and x1y2 through) are checked as well.
module tb_rev_moa;
  logic [15:0] pp;
  logic [7:0]  p;
  logic [19:0] g;
  int checks = 0, failures = 0;

  rev_moa dut (.pp(pp), .p(p), .g(g));

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            pp[4*i+j] = x[i] & y[j];
        #1;
        checks++;
        if (int'(p) != x * y) begin
          failures++;
          $display("FAIL %0d*%0d gave %0d", x, y, p);
        end
        checks++;
        if (g[0] !== pp[4] || g[6] !== pp[6]) begin
          failures++;
          $display("FAIL garbage %0d*%0d g=%b", x, y, g);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
