// Multi-operand adder of the reversible 4x4 multiplier.
//
// Sums the 16 partial products pp[4i+j] = x_i.y_j into the product P7..P0
// with 8 HNG full adders (D = 0: R = sum, S = carry) and 4 Peres half adders
// (C = 0: Q = sum, R = carry), arranged as in the design:
//
//   upper right row (ripple towards the left), weights 1..4:
//     PG (x1y0, x0y1)          -> P1
//     HNG(x0y2, x2y0, c)       -> s2
//     HNG(x0y3, x3y0, c)       -> s3a
//     PG (x1y3, c)             -> s4a, carry c5 into weight 5
//   upper left row, weights 3..5:
//     PG (x1y2, x2y1)          -> s3b
//     HNG(x3y1, x2y2, c)       -> s4b
//     HNG(x2y3, x3y2, c)       -> s5b, carry c6 into weight 6
//   lower row, weights 2..7:
//     PG (x1y1, s2)            -> P2
//     HNG(s3a, s3b, c)         -> P3
//     HNG(s4a, s4b, c)         -> P4
//     HNG(c5,  s5b, c)         -> P5
//     HNG(x3y3, c6, c)         -> P6, carry -> P7
//   P0 = x0y0 directly.
//
// The garbage outputs (P of each Peres gate, P and Q of each HNG) come out on
// g[19:0], numbered right to left along the upper rows and then the lower row.
// The gate arrangement is the design's; the order of the two data inputs of a
// gate and the garbage numbering inside a gate are this design's own choice.
// Combinational; the critical path is the upper-right ripple followed by the
// lower-row ripple.
module rev_moa (
  input  logic [15:0] pp,
  output logic [7:0]  p,
  output logic [19:0] g
);
  // partial product x_i.y_j
  function automatic logic xy(input logic [15:0] v, input int i, input int j);
    return v[4*i+j];
  endfunction

  logic c_r0, c_r1, c_r2, c5;      // upper right row carries
  logic c_l0, c_l1, c6;            // upper left row carries
  logic s2, s3a, s4a;              // upper right row sums
  logic s3b, s4b, s5b;             // upper left row sums
  logic cb0, cb1, cb2, cb3;        // lower row carries

  assign p[0] = xy(pp, 0, 0);

  // ---- upper right row ----
  peres_gate u_r0 (.a(xy(pp,1,0)), .b(xy(pp,0,1)), .c(1'b0),
                   .p(g[0]), .q(p[1]), .r(c_r0));
  hng_gate   u_r1 (.a(xy(pp,0,2)), .b(xy(pp,2,0)), .c(c_r0), .d(1'b0),
                   .p(g[1]), .q(g[2]), .r(s2), .s(c_r1));
  hng_gate   u_r2 (.a(xy(pp,0,3)), .b(xy(pp,3,0)), .c(c_r1), .d(1'b0),
                   .p(g[3]), .q(g[4]), .r(s3a), .s(c_r2));
  peres_gate u_r3 (.a(xy(pp,1,3)), .b(c_r2), .c(1'b0),
                   .p(g[5]), .q(s4a), .r(c5));

  // ---- upper left row ----
  peres_gate u_l0 (.a(xy(pp,1,2)), .b(xy(pp,2,1)), .c(1'b0),
                   .p(g[6]), .q(s3b), .r(c_l0));
  hng_gate   u_l1 (.a(xy(pp,3,1)), .b(xy(pp,2,2)), .c(c_l0), .d(1'b0),
                   .p(g[7]), .q(g[8]), .r(s4b), .s(c_l1));
  hng_gate   u_l2 (.a(xy(pp,2,3)), .b(xy(pp,3,2)), .c(c_l1), .d(1'b0),
                   .p(g[9]), .q(g[10]), .r(s5b), .s(c6));

  // ---- lower row ----
  peres_gate u_b0 (.a(xy(pp,1,1)), .b(s2), .c(1'b0),
                   .p(g[11]), .q(p[2]), .r(cb0));
  hng_gate   u_b1 (.a(s3a), .b(s3b), .c(cb0), .d(1'b0),
                   .p(g[12]), .q(g[13]), .r(p[3]), .s(cb1));
  hng_gate   u_b2 (.a(s4a), .b(s4b), .c(cb1), .d(1'b0),
                   .p(g[14]), .q(g[15]), .r(p[4]), .s(cb2));
  hng_gate   u_b3 (.a(c5), .b(s5b), .c(cb2), .d(1'b0),
                   .p(g[16]), .q(g[17]), .r(p[5]), .s(cb3));
  hng_gate   u_b4 (.a(xy(pp,3,3)), .b(c6), .c(cb3), .d(1'b0),
                   .p(g[18]), .q(g[19]), .r(p[6]), .s(p[7]));
endmodule
