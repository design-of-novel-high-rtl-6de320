// pg_preprocess: pre-processing stage of a parallel prefix adder.
//
// For every bit position it forms the bit generate G = A AND B (a carry is
// created here) and the bit propagate P = A XOR B (an incoming carry passes
// through). These are the standard prefix-adder definitions. The default width
// of 15 is the span of the shared generate/propagate stage in the 16-bit
// delay-optimized sparse-4 Kogge-Stone adder; its sixteenth propagate is
// formed separately in msb_sum_cell.
//
// Interface: a, b in; g, p out, same width, bit 0 least significant.
// Timing: purely combinational, one gate level.
module pg_preprocess #(
  parameter int unsigned WIDTH = 15
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] g,
  output logic [WIDTH-1:0] p
);
  always_comb begin
    g = a & b;
    p = a ^ b;
  end
endmodule
