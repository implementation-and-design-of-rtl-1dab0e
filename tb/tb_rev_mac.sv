// End-to-end test of the reversible 4x4 MAC unit at its default size.
//
// 1. The sequence a = 3, b = 2 held for five clocks after a clear must give
//    op = 6, 12, 18, 24, 30: one multiply-add per clock.
// 2. Eight consecutive multiply-adds of random operands, checked after
//    every clock, repeated many times with a clear before each group.
// 3. A long random run with occasional clears, checked against a reference
//    sum modulo 512.
// Mechanisms counted, each of which must occur at least once: a clear, a
// product reaching the top (ninth) bit of the sum, and a wrap past 511.
module tb_rev_mac;
  logic       clk = 1'b0;
  logic       rst;
  logic [3:0] a, b;
  logic [8:0] op;
  int checks = 0, failures = 0;
  int model = 0;
  int n_clear = 0, n_top = 0, n_wrap = 0;

  rev_mac dut (.clk(clk), .rst(rst), .a(a), .b(b), .op(op));

  always #5 clk = ~clk;

  task automatic step(input logic r, input logic [3:0] va, input logic [3:0] vb);
    int pr;
    rst = r;
    a   = va;
    b   = vb;
    pr  = int'(va) * int'(vb);
    @(posedge clk);
    if (r) begin
      model = 0;
      n_clear++;
    end else begin
      if (model < 256 && model + pr >= 256 && model + pr < 512) n_top++;
      if (model + pr >= 512) n_wrap++;
      model = (model + pr) % 512;
    end
    #1;
    checks++;
    if (int'(op) != model) begin
      failures++;
      $display("FAIL t=%0t rst=%0b a=%0d b=%0d op=%0d expected %0d", $time, r, va, vb, op, model);
    end
  endtask

  initial begin
    rst = 1'b1;
    a   = '0;
    b   = '0;
    // 1. the 3 x 2 example
    step(1'b1, 4'd0, 4'd0);
    step(1'b1, 4'd0, 4'd0);
    for (int k = 1; k <= 5; k++) begin
      step(1'b0, 4'd3, 4'd2);
      checks++;
      if (int'(op) != 6 * k) begin
        failures++;
        $display("FAIL 3x2 example step %0d op=%0d", k, op);
      end
    end
    // 2. groups of eight multiply-adds
    for (int grp = 0; grp < 200; grp++) begin
      step(1'b1, 4'($urandom), 4'($urandom));
      for (int k = 0; k < 8; k++) step(1'b0, 4'($urandom), 4'($urandom));
    end
    // 3. long random run
    for (int k = 0; k < 3000; k++)
      step(($urandom % 64) == 0, 4'($urandom), 4'($urandom));

    $display("clears=%0d top_bit_fills=%0d wraps=%0d", n_clear, n_top, n_wrap);
    if (n_clear == 0 || n_top == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL mechanism missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
