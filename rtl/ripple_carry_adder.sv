// ripple_carry_adder: chain of full adders, the final computation stage of a
// sparse prefix adder.
//
// In a sparse-4 adder the prefix tree delivers only every fourth carry; each
// such carry enters a short chain of WIDTH full adders that ripples it through
// the next bits and produces their sums. The default WIDTH of 4 is the
// published chain length (the most significant chain of the 16-bit adder has
// 3 bits). The chain's own carry out is brought out as co; in the 16-bit adder
// it is left unused, because the next chain takes its carry from the tree.
//
// Interface: a, b (WIDTH bits), ci in; s (WIDTH bits), co out.
// Timing: purely combinational, WIDTH full-adder carry delays from ci to co.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign co = c[WIDTH];
endmodule
