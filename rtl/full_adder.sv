// full_adder: one-bit full adder, the FA box of the ripple chains.
//
// s = a XOR b XOR ci; co = majority(a, b, ci), written as
// (a AND b) OR (ci AND (a XOR b)). The published adder names this cell but
// does not give its gates; these are the textbook equations.
//
// Interface: a, b, ci in; s, co out. Timing: purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;

  always_comb begin
    p  = a ^ b;
    s  = p ^ ci;
    co = (a & b) | (ci & p);
  end
endmodule
