// ds4_ksa16: 16-bit delay-optimized sparse-4 Kogge-Stone parallel prefix
// adder, s = a + b + cin (mod 2^16).
//
// Three stages as in any parallel prefix adder:
//   1. pg_preprocess forms bit generate/propagate for bits 0..14.
//   2. ds4_carry_tree forms only the carries into bits 4, 8, 12 and 15
//      (figure bits 5, 9, 13, 16) with fan-in-4 black cells and grey cells,
//      four cell levels deep.
//   3. Ripple chains of full adders produce sums 0-3 (from cin), 4-7, 8-11
//      and 12-14 (from the tree's carries); msb_sum_cell produces sum 15
//      from its own propagate and the tree's carry into bit 15, so the MSB
//      does not wait for the last ripple chain.
// The structure follows the published adder. There is no carry out, as in
// the published adder; the chains' own carry outs are left open because
// every chain after the first takes its carry from the tree instead.
//
// Interface: a, b (16 bits), cin in; s (16 bits) out.
// Timing: purely combinational, no clock.
module ds4_ksa16
  import ppa_pkg::*;
(
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s
);
  logic [PG_BITS-1:0] g;
  logic [PG_BITS-1:0] p;
  logic               c4, c8, c12, c15;

  pg_preprocess #(.WIDTH(PG_BITS)) u_pre (
    .a(a[PG_BITS-1:0]),
    .b(b[PG_BITS-1:0]),
    .g(g),
    .p(p)
  );

  ds4_carry_tree u_tree (
    .g  (g),
    .p  (p),
    .cin(cin),
    .c4 (c4),
    .c8 (c8),
    .c12(c12),
    .c15(c15)
  );

  ripple_carry_adder #(.WIDTH(SPARSITY)) u_rca0 (
    .a(a[3:0]), .b(b[3:0]), .ci(cin), .s(s[3:0]), .co()
  );
  ripple_carry_adder #(.WIDTH(SPARSITY)) u_rca1 (
    .a(a[7:4]), .b(b[7:4]), .ci(c4), .s(s[7:4]), .co()
  );
  ripple_carry_adder #(.WIDTH(SPARSITY)) u_rca2 (
    .a(a[11:8]), .b(b[11:8]), .ci(c8), .s(s[11:8]), .co()
  );
  ripple_carry_adder #(.WIDTH(SPARSITY - 1)) u_rca3 (
    .a(a[14:12]), .b(b[14:12]), .ci(c12), .s(s[14:12]), .co()
  );

  msb_sum_cell u_msb (
    .a(a[WIDTH-1]),
    .b(b[WIDTH-1]),
    .c(c15),
    .s(s[WIDTH-1])
  );
endmodule
