// Reversible 4x4 multiply-accumulate unit: op = sum of a_i * b_i.
//
// Every clock the unsigned 4-bit operands a and b are multiplied by the
// reversible multiplier (Peres-gate partial products, HNG/Peres adder array)
// and the 8-bit product is added to the 9-bit running sum in the reversible
// accumulator. rst (synchronous, active high) clears the sum. op is the
// registered sum: after a clear, the k-th rising edge with rst low makes op
// the sum of the k products present at those edges, modulo 512. The whole
// multiply-add is one combinational path between two clock edges.
//
// The port names and the multiplier/accumulator structure follow the design;
// the 9-bit width of op follows its stated output width. Garbage outputs of
// the reversible gates stay inside.
module rev_mac
  import rev_mac_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [AW-1:0] op
);
  logic [PW-1:0] prod;
  logic [51:0]   garbage;

  rev_mult4 u_mult (
    .x      (a),
    .y      (b),
    .p      (prod),
    .garbage(garbage)
  );

  rev_accumulator #(.PW(PW)) u_acc (
    .clk (clk),
    .rst (rst),
    .prod(prod),
    .acc (op)
  );
endmodule
