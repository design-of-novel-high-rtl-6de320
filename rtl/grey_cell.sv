// grey_cell: wide prefix operator producing a carry (generate only).
//
// A grey cell is a black cell whose least significant operand already spans
// down to the adder's carry in, so only the group generate is needed: that
// generate is the carry out of the span. Operand 0 is that incoming carry
// (Cin or a lower G_{x:cin}); operands 1..FANIN-1 are (generate, propagate)
// pairs of single bits or of groups. All product terms are formed in one flat
// sum-of-products level:
//   G = g[n-1] + p[n-1].g[n-2] + ... + p[n-1]...p[1].g[0]
// The delay-optimized sparse-4 adder uses fan-ins 2 (GC1, GC2), 3 (GC3) and
// 4 (GC4, which jumps the carry from bit 12 straight to bit 15). Writing all
// four as one parameterized cell is this design's choice.
//
// Interface: g[FANIN-1:0] and p[FANIN-1:1] in; g_grp out.
// Timing: purely combinational.
module grey_cell #(
  parameter int unsigned FANIN = 4
) (
  input  logic [FANIN-1:0] g,
  input  logic [FANIN-1:1] p,
  output logic             g_grp
);
  logic term;

  always_comb begin
    g_grp = 1'b0;
    for (int unsigned i = 0; i < FANIN; i++) begin
      term = g[i];
      for (int unsigned j = i + 1; j < FANIN; j++) term = term & p[j];
      g_grp = g_grp | term;
    end
  end

  initial assert (FANIN >= 2) else $error("grey_cell needs FANIN >= 2");
endmodule
