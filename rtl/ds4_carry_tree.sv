// ds4_carry_tree: carry generation stage of the 16-bit delay-optimized
// sparse-4 Kogge-Stone adder.
//
// A sparse-4 tree computes only the carries into bits 5, 9 and 13 (every
// fourth bit); ripple chains fill in the rest. This tree reaches them in
// fewer levels than the classic sparse-4 Kogge-Stone tree by using wide
// cells (figure bit numbering 1..16, Cin below bit 1; RTL index = bit - 1):
//   level 1  BC1, BC2, BC3   fan-in-4 black cells: (G,P)4:1, 8:5, 12:9
//   level 2  GC1             G4:cin  = G4:1 + P4:1.Cin
//   level 3  GC2             G8:cin  = G8:5 + P8:5.G4:cin
//            GC3             G12:cin = G12:9 + P12:9.G8:5 + P12:9.P8:5.G4:cin
//   level 4  GC4             G15:cin = G15 + P15.G14 + P15.P14.G13
//                                      + P15.P14.P13.G12:cin
// GC3 uses the block pair (G,P)8:5 rather than waiting for GC2, and GC4
// produces the carry into the MSB directly so that the MSB sum need not ripple
// through bits 13-15. The cell structure and wiring follow the published
// adder; only the fan-in parameterization of the cells is this design's.
//
// Interface: g, p (15 bits, bit generates/propagates of bits 1..15), cin in;
// c4, c8, c12, c15 out (carries into figure bits 5, 9, 13, 16).
// Timing: purely combinational, four cell levels from g/p to c15.
module ds4_carry_tree
  import ppa_pkg::*;
(
  input  logic [PG_BITS-1:0] g,
  input  logic [PG_BITS-1:0] p,
  input  logic               cin,
  output logic               c4,
  output logic               c8,
  output logic               c12,
  output logic               c15
);
  // group (G,P) of each four-bit block: index 0 = bits 4:1, 1 = 8:5, 2 = 12:9
  logic [2:0] gb;
  logic [2:0] pb;

  for (genvar k = 0; k < 3; k++) begin : g_bc
    black_cell #(.FANIN(SPARSITY)) u_bc (
      .g    (g[SPARSITY*k +: SPARSITY]),
      .p    (p[SPARSITY*k +: SPARSITY]),
      .g_grp(gb[k]),
      .p_grp(pb[k])
    );
  end

  // GC1: carry into bit 5
  grey_cell #(.FANIN(2)) u_gc1 (
    .g    ({gb[0], cin}),
    .p    (pb[0]),
    .g_grp(c4)
  );

  // GC2: carry into bit 9
  grey_cell #(.FANIN(2)) u_gc2 (
    .g    ({gb[1], c4}),
    .p    (pb[1]),
    .g_grp(c8)
  );

  // GC3: carry into bit 13, from BC3, BC2 and GC1
  grey_cell #(.FANIN(3)) u_gc3 (
    .g    ({gb[2], gb[1], c4}),
    .p    ({pb[2], pb[1]}),
    .g_grp(c12)
  );

  // GC4: carry into bit 16, from bits 15, 14, 13 and GC3
  grey_cell #(.FANIN(4)) u_gc4 (
    .g    ({g[14], g[13], g[12], c12}),
    .p    ({p[14], p[13], p[12]}),
    .g_grp(c15)
  );
endmodule
