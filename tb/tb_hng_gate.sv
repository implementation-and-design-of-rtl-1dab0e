// Self-checking test of the HNG gate: all sixteen input combinations. With
// D = 0 the outputs R and S must equal the sum and carry bits of the integer
// A + B + C; with D = 1 S is inverted. The sixteen outputs must all differ.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit seen [16];

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    for (int v = 0; v < 16; v++) begin
      int tot;
      {a, b, c, d} = v[3:0];
      #1;
      tot = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== b || r !== tot[0] || s !== (tot[1] ^ d)) begin
        failures++;
        $display("FAIL abcd=%0b%0b%0b%0b pqrs=%0b%0b%0b%0b", a, b, c, d, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %0b%0b%0b%0b repeated", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
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
