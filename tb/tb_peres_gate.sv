// Self-checking test of the Peres gate: all eight input combinations. The
// expected R is worked out arithmetically: AB xor C is 1 when A+B equals 2
// and C is 0, or when A+B is below 2 and C is 1. A bijection check confirms
// that the eight outputs are all different (the gate is reversible).
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit seen [8];

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic er;
      {a, b, c} = v[2:0];
      #1;
      er = ((int'(a) + int'(b)) == 2) != c;
      checks++;
      if (p !== a || q !== (a != b) || r !== er) begin
        failures++;
        $display("FAIL abc=%0b%0b%0b pqr=%0b%0b%0b", a, b, c, p, q, r);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %0b%0b%0b repeated", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
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
