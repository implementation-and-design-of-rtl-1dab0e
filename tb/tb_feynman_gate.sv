// Self-checking test of the Feynman gate: all four input combinations,
// outputs compared with P = A and Q = 1 when exactly one input is 1.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      #1;
      checks++;
      if (p !== a || q !== ((int'(a) + int'(b)) == 1)) begin
        failures++;
        $display("FAIL a=%0b b=%0b p=%0b q=%0b", a, b, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
