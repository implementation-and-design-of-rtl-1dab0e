# Reversible 4x4 multiply-accumulate unit

This is a 4-bit by 4-bit multiply-accumulate (MAC) unit: on every clock edge it
computes `op <= op + a*b`, and `rst` clears the sum. Every piece of arithmetic
in it is built from *reversible* gates. A reversible gate maps its inputs to
its outputs one-to-one, so no information is lost. The price is that a gate has
as many outputs as inputs. The outputs nobody needs are called *garbage*, and
some inputs are tied to constants. Reversible logic also forbids fan-out: one
wire may not drive two gate inputs, so signals are copied with gates.

The RTL describes each reversible gate as its Boolean mapping. It simulates and
synthesises like ordinary logic, and the netlist keeps the reversible gate
structure visible: gate counts, constant inputs and garbage outputs.

## The three gates

| gate | inputs | outputs | role here |
|---|---|---|---|
| Feynman (FG, CNOT) | A, B | P = A, Q = A ^ B | copying a bit (B = 0); accumulator output buffer; top accumulator bit |
| Peres (PG) | A, B, C | P = A, Q = A ^ B, R = AB ^ C | AND for partial products (C = 0); half adder (Q = sum, R = carry) |
| HNG | A, B, C, D | P = A, Q = B, R = A ^ B ^ C, S = (A ^ B)C ^ AB ^ D | full adder with D = 0 (R = sum, S = carry) |

Modules: `feynman_gate`, `peres_gate`, `hng_gate`.

## Datapath

```
 a[3:0] --+                                   +--------------------------+
          |--> fan-out --> 16 Peres  --pp-->  | adder array              |--prod[7:0]--+
 b[3:0] --+    (24 FG)     (x_i.y_j)          | 8 HNG + 4 Peres          |             |
                                              +--------------------------+             v
                                      +-------------------------------------------------------+
                                      | accumulator: PG + 7 HNG ripple adder, FG on bit 8,    |
                                      | 9-bit register, FG buffer per bit --> op[8:0]          |
                                      +-------------------------------------------------------+
```

Everything between the register output and the register input is one
combinational path. There is one multiply-add per clock and no pipeline.

### Partial products (`rev_ppg`, `fg_fanout`)

Gate k = 4i + j is a Peres gate with A = x_i, B = y_j and C = 0. It gives
`pp[k] = x_i & y_j`, plus two garbage bits: `g[2k] = x_i` and
`g[2k+1] = x_i ^ y_j`. Each operand bit feeds four gates, so it is first copied
four times by a chain of three Feynman gates with B = 0. Eight operand bits
therefore take 24 copying gates. A known example: x = 0111 and y = 0110 give
`pp = 0000011001100110` and `g = 00101000110101111101011111010111`.
`rev_ppg` takes the operand width `N` as a parameter.

### Adding the partial products (`rev_moa`)

This is the least obvious part. Sixteen partial-product bits are spread over
column weights 0 to 6. Weight 3 alone holds four of them. The array reduces
them in two ripple rows. Two short rows on top each make one sum bit per
column. A lower row adds those sums into the final product bits.

| row | gate | inputs | outputs |
|---|---|---|---|
| upper right | PG | x1y0, x0y1 | **P1**, carry |
| | HNG | x0y2, x2y0, carry | s2, carry |
| | HNG | x0y3, x3y0, carry | s3a, carry |
| | PG | x1y3, carry | s4a, c5 (into weight 5) |
| upper left | PG | x1y2, x2y1 | s3b, carry |
| | HNG | x3y1, x2y2, carry | s4b, carry |
| | HNG | x2y3, x3y2, carry | s5b, c6 (into weight 6) |
| lower | PG | x1y1, s2 | **P2**, carry |
| | HNG | s3a, s3b, carry | **P3**, carry |
| | HNG | s4a, s4b, carry | **P4**, carry |
| | HNG | c5, s5b, carry | **P5**, carry |
| | HNG | x3y3, c6, carry | **P6**, **P7** |

P0 is x0y0 directly. That makes 8 full adders and 4 half adders. Add the 16
Peres gates of the partial products and the multiplier has 28 reversible gates,
not counting the fan-out copies. The 20 garbage bits come out on `g[19:0]`. The
array is laid out for 4x4 only, so `rev_moa` has no size parameter.
`rev_mult4` combines the generator and the array into a multiplier with all 52
garbage bits brought out.

### Accumulator (`rev_accumulator`)

- **Adder.** A Peres half adder sits at bit 0. HNG full adders handle bits 1 to 7.
- **Ninth bit.** Bit 8 is kept by one more Feynman gate: Q = carry ^ bit8. The
  sum therefore wraps modulo 512.
- **Register and buffer.** A 9-bit register holds the sum. Each register bit
  passes through a Feynman gate with B = 0. Its Q copy drives `op` and its P
  copy is fed back into the adder as the previous value.
- **Clear.** `rst` clears the register synchronously.
- **Parameter.** `PW`, the product width (default 8), sets the sum width to PW+1.

### Top (`rev_mac`)

| port | width | meaning |
|---|---|---|
| `clk` | 1 | clock |
| `rst` | 1 | synchronous clear, active high |
| `a`, `b` | 4 | unsigned operands |
| `op` | 9 | the registered sum |

After a clear, the k-th rising edge with `rst` low leaves in `op` the sum of
the k products present at those edges, modulo 512. Example: holding a = 3 and
b = 2 gives 6, 12, 18, 24, 30 on successive clocks. The sizes are in
`rev_mac_pkg`: N = 4, PW = 8, AW = 9. The garbage outputs are not brought out
of the top.

## Choices this RTL makes, and limits

- **The register is an addition.** The reversible accumulator feeds its buffered
  sum straight back into the adder. That is a combinational loop, so the loop is
  closed through a clocked register. The reset is synchronous and active high.
- **Bit 8 keeps running.** The reversible accumulator uses only the carry of bit
  7 as its ninth output bit. Here that carry is added into a stored bit 8, so the
  9-bit sum keeps accumulating.
- **Capacity.** A 9-bit sum holds 511. Eight products of 15 x 15 add up to 1800.
  So eight accumulations fit only when their total is at most 511, for example
  when every product is at most 63. Larger totals wrap, and there is no overflow
  flag.
- **Output width.** `op` is 9 bits, the unit's stated output width. A wider
  sum would need more half-adder cells above bit 8.
- **Assumed details.**
  - Operands are unsigned.
  - Which input of a gate gets which data bit was chosen freely where it does
    not change the result.
  - Garbage numbering inside a gate is this RTL's own choice.
  - The fan-out gates are arranged as chains.
- **Not modelled.** Quantum cost, the V/V+ decompositions of the gates and any
  physical reversibility. The NOT and Toffoli gates belong to the same gate
  family but the MAC does not use them.

## Simulating

Every module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. Example, for the whole unit:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rev_mac_pkg.sv tb/tb_rev_mac.sv \
          --top-module tb_rev_mac -Mdir obj_mac && ./obj_mac/Vtb_rev_mac
```

For another module, replace `tb_rev_mac` with `tb_<module>`. What the tests
cover:

- **Gates.** Exhaustive truth tables, plus a check that no two input patterns
  give the same output pattern (reversibility).
- **Generator and multiplier.** All 256 operand pairs, plus the 0111 x 0110
  example, garbage bits included.
- **Accumulator and top.** Compared clock by clock against a reference sum.
  The run includes the 3 x 2 example, groups of eight accumulations and long
  random runs with clears. The testbench counts clears, fills of the ninth bit
  and wraps past 511, and fails if any of them never happens.
- **Full size.** `tb_rev_mac` runs the top at its default size.
