// ppa_pkg: shared constants of the 16-bit delay-optimized sparse-4
// Kogge-Stone adder.
//
// WIDTH is the operand width and SPARSITY the spacing of the carries that the
// prefix tree produces (every fourth carry); both are the values of the adder
// as published. The tree in ds4_carry_tree is hand-placed for exactly these
// two values, so they are constants rather than free parameters.
package ppa_pkg;
  localparam int unsigned WIDTH    = 16;
  localparam int unsigned SPARSITY = 4;
  // Bits handled by the shared generate/propagate stage: all but the MSB,
  // whose propagate is formed next to its own sum (msb_sum_cell).
  localparam int unsigned PG_BITS  = WIDTH - 1;
endpackage
