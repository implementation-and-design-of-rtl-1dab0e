// Reversible 4x4 unsigned multiplier: p = x * y.
//
// Two stages, both combinational: the partial-product generator (operand
// fan-out through Feynman gates, then 16 Peres gates forming x_i.y_j) and the
// multi-operand adder (8 HNG full adders and 4 Peres half adders). The garbage
// outputs of both stages are brought out on one bus, the 32 generator bits
// above the 20 adder bits, so that a reversible realisation can see them; a
// user of the product can leave them open.
module rev_mult4
  import rev_mac_pkg::*;
(
  input  logic [N-1:0]  x,
  input  logic [N-1:0]  y,
  output logic [PW-1:0] p,
  output logic [51:0]   garbage
);
  logic [N*N-1:0] pp;

  rev_ppg #(.N(N)) u_ppg (
    .x (x),
    .y (y),
    .pp(pp),
    .g (garbage[51:20])
  );

  rev_moa u_moa (
    .pp(pp),
    .p (p),
    .g (garbage[19:0])
  );
endmodule
