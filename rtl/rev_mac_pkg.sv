// Shared sizes of the reversible 4x4 multiply-accumulate unit.
//
// The unit multiplies two N-bit unsigned operands into a 2N-bit product and
// adds it to a running sum held in a (2N+1)-bit accumulator, the extra bit
// catching the carry of the addition. N = 4 is the size the design is laid
// out for; the multi-operand adder of the multiplier is drawn for 4x4 only.
package rev_mac_pkg;
  localparam int unsigned N  = 4;        // operand width
  localparam int unsigned PW = 2 * N;    // product width (8)
  localparam int unsigned AW = PW + 1;   // accumulator / output width (9)
endpackage
