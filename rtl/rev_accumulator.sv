// Accumulator of the reversible MAC unit: acc <= acc + prod every clock.
//
// The adder is a ripple chain of reversible gates, as in the design: a Peres
// half adder at bit 0 (C = 0: Q = sum, R = carry) and HNG full adders at bits
// 1..PW-1 (D = 0: R = sum, S = carry). Each bit of the held sum passes through
// a Feynman gate with B = 0, the buffer of the design: its Q copy drives the
// output acc and its P copy is fed back as the previous value into the adder.
//
// This design's own choices: the feedback loop is closed through a PW+1 bit
// register (one product added per rising clk edge), cleared to 0 by a
// synchronous active-high rst; the top bit, which the design fills with the
// carry of the last HNG, is kept as a running bit by adding that carry to it
// with one more Feynman gate (Q = carry xor bit), so the sum wraps modulo
// 2^(PW+1). acc shows the register, i.e. the sum of all products taken at
// the clock edges since the last clear. An assertion checks that rst always
// leaves a zero sum.
module rev_accumulator #(
  parameter int unsigned PW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [PW-1:0] prod,
  output logic [PW:0]   acc
);
  logic [PW:0]   acc_q;   // the accumulator register
  logic [PW:0]   prev;    // fed-back copy of the held sum
  logic [PW:0]   sum;     // adder result, next register value
  logic [PW-1:0] carry;
  logic [PW:0]   g_unused;

  // ---- output buffer: Feynman gates with B = 0 ----
  for (genvar k = 0; k <= PW; k++) begin : g_buf
    feynman_gate u_fg (.a(acc_q[k]), .b(1'b0), .p(prev[k]), .q(acc[k]));
  end

  // ---- ripple-carry adder ----
  peres_gate u_pg0 (.a(prev[0]), .b(prod[0]), .c(1'b0),
                    .p(g_unused[0]), .q(sum[0]), .r(carry[0]));

  for (genvar k = 1; k < PW; k++) begin : g_hng
    logic gq;
    hng_gate u_hng (.a(prev[k]), .b(prod[k]), .c(carry[k-1]), .d(1'b0),
                    .p(g_unused[k]), .q(gq), .r(sum[k]), .s(carry[k]));
  end

  feynman_gate u_top (.a(carry[PW-1]), .b(prev[PW]), .p(g_unused[PW]), .q(sum[PW]));

  // ---- register closing the loop ----
  always_ff @(posedge clk) begin
    if (rst) acc_q <= '0;
    else     acc_q <= sum;
  end

  // a clear leaves the sum at zero on the next edge
  a_clear: assert property (@(posedge clk) rst |=> acc == '0)
    else $error("accumulator not cleared after rst");
endmodule
