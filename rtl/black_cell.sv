// black_cell: wide prefix operator producing group generate and propagate.
//
// Combines FANIN adjacent (generate, propagate) pairs, operand 0 being the
// least significant, into the group pair of the whole span in one flat
// sum-of-products level instead of a tree of two-input cells:
//   G = g[n-1] + p[n-1].g[n-2] + ... + p[n-1]...p[1].g[0]
//   P = p[n-1] . p[n-2] . ... . p[0]
// With FANIN = 4 this is the black cell of the delay-optimized sparse-4
// Kogge-Stone adder, e.g. G4:1 and P4:1 from bits 1..4; FANIN = 2 gives the
// classic two-input dot operator. The flat form is how the published adder
// removes a tree level; the loop form below is this design's way of writing
// it for any fan-in.
//
// Interface: g, p in (FANIN bits each); g_grp, p_grp out.
// Timing: purely combinational.
module black_cell #(
  parameter int unsigned FANIN = 4
) (
  input  logic [FANIN-1:0] g,
  input  logic [FANIN-1:0] p,
  output logic             g_grp,
  output logic             p_grp
);
  logic term;

  always_comb begin
    g_grp = 1'b0;
    for (int unsigned i = 0; i < FANIN; i++) begin
      // product term: g[i] carried through every more significant propagate
      term = g[i];
      for (int unsigned j = i + 1; j < FANIN; j++) term = term & p[j];
      g_grp = g_grp | term;
    end
    p_grp = &p;
  end
endmodule
