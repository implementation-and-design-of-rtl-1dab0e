// Self-checking test of the reversible accumulator (PW = 8, 9-bit sum).
// A reference sum kept in the testbench is compared with acc after every
// clock edge: acc must hold the sum of the products present at the edges
// since the last clear, modulo 512, one edge after each product (a latency
// of one clock). Random products, clears at random moments and long runs of
// large products drive the sum past 255 (the top bit fills) and past 511
// (wrap); the testbench counts both and fails if either never happened.
module tb_rev_accumulator;
  localparam int unsigned PW = 8;
  logic          clk = 1'b0;
  logic          rst;
  logic [PW-1:0] prod;
  logic [PW:0]   acc;
  int checks = 0, failures = 0;
  int model = 0;
  int n_clear = 0, n_top = 0, n_wrap = 0;

  rev_accumulator #(.PW(PW)) dut (.clk(clk), .rst(rst), .prod(prod), .acc(acc));

  always #5 clk = ~clk;

  task automatic step(input logic r, input logic [PW-1:0] v);
    rst  = r;
    prod = v;
    @(posedge clk);
    if (r) begin
      model = 0;
      n_clear++;
    end else begin
      if (model < 256 && model + int'(v) >= 256 && model + int'(v) < 512) n_top++;
      if (model + int'(v) >= 512) n_wrap++;
      model = (model + int'(v)) % 512;
    end
    #1;
    checks++;
    if (int'(acc) != model) begin
      failures++;
      $display("FAIL t=%0t rst=%0b prod=%0d acc=%0d expected %0d", $time, r, v, acc, model);
    end
  endtask

  initial begin
    rst  = 1'b1;
    prod = '0;
    step(1'b1, 8'd0);
    // products held while rst is high must not be added
    step(1'b1, 8'd99);
    // the run of the same product shows one addition per clock
    for (int k = 0; k < 5; k++) step(1'b0, 8'd6);
    for (int k = 0; k < 2000; k++) begin
      logic r;
      logic [PW-1:0] v;
      r = ($urandom % 40) == 0;
      v = (k % 200 < 50) ? 8'(200 + $urandom % 56) : 8'($urandom);
      step(r, v);
    end
    if (n_clear == 0 || n_top == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL mechanism missing: clears=%0d top=%0d wraps=%0d", n_clear, n_top, n_wrap);
    end
    $display("clears=%0d top_bit_fills=%0d wraps=%0d", n_clear, n_top, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
