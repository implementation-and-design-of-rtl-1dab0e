// Self-checking test of the reversible 4x4 multiplier: all 256 operand pairs
// against the integer product, and the generator garbage of the example
// x = 0111, y = 0110 against its known value.
module tb_rev_mult4;
  logic [3:0]  x, y;
  logic [7:0]  p;
  logic [51:0] garbage;
  int checks = 0, failures = 0;

  rev_mult4 dut (.x(x), .y(y), .p(p), .garbage(garbage));

  initial begin
    for (int v = 0; v < 256; v++) begin
      {x, y} = v[7:0];
      #1;
      checks++;
      if (int'(p) != int'(x) * int'(y)) begin
        failures++;
        $display("FAIL %0d*%0d gave %0d", x, y, p);
      end
    end
    x = 4'd7;
    y = 4'd6;
    #1;
    checks++;
    if (p !== 8'd42 || garbage[51:20] !== 32'b00101000110101111101011111010111) begin
      failures++;
      $display("FAIL example p=%0d garbage=%b", p, garbage);
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
