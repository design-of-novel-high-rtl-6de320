// msb_sum_cell: direct sum of the most significant bit.
//
// The last sum bit would otherwise wait at the end of both the prefix tree and
// a ripple chain. The delay-optimized sparse-4 adder instead forms the carry
// into the MSB with a dedicated grey cell (GC4) and uses this cell to finish
// the bit: it computes the MSB propagate p = a XOR b locally and the sum
// s = p XOR c, where c is the carry G15:cin into the MSB. That follows the
// published adder; there is no carry out of the MSB.
//
// Interface: a, b (the MSBs of the operands), c in; s out.
// Timing: purely combinational, one XOR from c to s.
module msb_sum_cell (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s
);
  logic p;

  always_comb begin
    p = a ^ b;
    s = p ^ c;
  end
endmodule
