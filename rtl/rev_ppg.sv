// Reversible partial-product generator of an N x N multiplier.
//
// N*N Peres gates with C = 0 work in parallel; gate k = N*i + j takes
// A = x_i and B = y_j and gives pp[k] = x_i.y_j on R. Its other two outputs are
// garbage: g[2k] = P = x_i and g[2k+1] = Q = x_i xor y_j. Every operand bit
// feeds N gates, so it is first copied N times by a Feynman fan-out chain
// (2N chains of N-1 gates: 24 gates for N = 4). The gate array, the pp and g
// numbering follow the design; the fan-out arrangement is this design's own.
// Combinational.
module rev_ppg #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]     x,
  input  logic [N-1:0]     y,
  output logic [N*N-1:0]   pp,
  output logic [2*N*N-1:0] g
);
  // xc[i][j]: copy of x_i for gate (i,j); yc[j][i]: copy of y_j for gate (i,j)
  logic [N-1:0] xc [N];
  logic [N-1:0] yc [N];

  for (genvar b = 0; b < N; b++) begin : g_fan
    fg_fanout #(.COPIES(N)) u_fx (.bit_i(x[b]), .copies_o(xc[b]));
    fg_fanout #(.COPIES(N)) u_fy (.bit_i(y[b]), .copies_o(yc[b]));
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      peres_gate u_pg (
        .a(xc[i][j]),
        .b(yc[j][i]),
        .c(1'b0),
        .p(g[2*(N*i+j)]),
        .q(g[2*(N*i+j)+1]),
        .r(pp[N*i+j])
      );
    end
  end
endmodule
