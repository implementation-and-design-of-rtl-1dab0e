// Reversible fan-out: COPIES copies of one bit from a chain of Feynman gates.
//
// Reversible logic forbids a wire driving several gate inputs, so each copy is
// made by a Feynman gate whose B input is 0 (P = A passes on along the chain,
// Q = A is the copy). COPIES-1 gates give COPIES copies and no garbage. For the
// 4x4 multiplier every operand bit needs 4 copies, so 8 bits take 24 gates,
// the count the design calls for; the chain arrangement is this design's own.
// Combinational.
module fg_fanout #(
  parameter int unsigned COPIES = 4
) (
  input  logic              bit_i,
  output logic [COPIES-1:0] copies_o
);
  logic [COPIES-1:0] chain;

  assign chain[0] = bit_i;

  for (genvar k = 0; k < COPIES - 1; k++) begin : g_fg
    feynman_gate u_fg (
      .a(chain[k]),
      .b(1'b0),
      .p(chain[k+1]),
      .q(copies_o[k])
    );
  end

  assign copies_o[COPIES-1] = chain[COPIES-1];
endmodule
