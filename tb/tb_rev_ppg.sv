// Self-checking test of the partial-product generator. First the example
// x = 0111, y = 0110, whose partial products and garbage bits are known
// (pp = 0000011001100110, g = 00101000110101111101011111010111); then all
// 256 operand pairs against pp[4i+j] = x_i.y_j, g[2k] = x_i and
// g[2k+1] = x_i xor y_j, computed here bit by bit.
module tb_rev_ppg;
  localparam int unsigned N = 4;
  logic [N-1:0]     x, y;
  logic [N*N-1:0]   pp;
  logic [2*N*N-1:0] g;
  int checks = 0, failures = 0;

  rev_ppg #(.N(N)) dut (.x(x), .y(y), .pp(pp), .g(g));

  initial begin
    x = 4'b0111;
    y = 4'b0110;
    #1;
    checks++;
    if (pp !== 16'b0000011001100110 || g !== 32'b00101000110101111101011111010111) begin
      failures++;
      $display("FAIL example pp=%b g=%b", pp, g);
    end

    for (int v = 0; v < 256; v++) begin
      logic [N*N-1:0]   epp;
      logic [2*N*N-1:0] eg;
      {x, y} = v[7:0];
      #1;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          epp[N*i+j]       = (x[i] == 1'b1) && (y[j] == 1'b1);
          eg[2*(N*i+j)]    = x[i];
          eg[2*(N*i+j)+1]  = x[i] != y[j];
        end
      checks++;
      if (pp !== epp || g !== eg) begin
        failures++;
        $display("FAIL x=%b y=%b pp=%b exp %b g=%b exp %b", x, y, pp, epp, g, eg);
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
