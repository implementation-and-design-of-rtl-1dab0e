// Self-checking test of the Feynman fan-out chain: for both input values,
// every one of the COPIES outputs must equal the input.
module tb_fg_fanout;
  localparam int unsigned COPIES = 4;
  logic              bit_i;
  logic [COPIES-1:0] copies_o;
  int checks = 0, failures = 0;

  fg_fanout #(.COPIES(COPIES)) dut (.bit_i(bit_i), .copies_o(copies_o));

  initial begin
    for (int v = 0; v < 2; v++) begin
      bit_i = v[0];
      #1;
      for (int k = 0; k < COPIES; k++) begin
        checks++;
        if (copies_o[k] !== bit_i) begin
          failures++;
          $display("FAIL in=%0b copy %0d=%0b", bit_i, k, copies_o[k]);
        end
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
