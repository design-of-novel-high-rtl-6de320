// tb_ds4_carry_tree: self-checking test of the sparse-4 carry tree.
//
// Draws operand pairs a, b (15 bits) and a carry in, forms the bit generates
// and propagates in the testbench (g = a & b, p = a ^ b) and drives them into
// ds4_carry_tree. The expected carry into bit k (RTL index) is bit k of the
// integer sum of the low k bits of a and b plus cin, computed with plain
// arithmetic, for k = 4, 8, 12 and 15. Vectors: corners, long propagate runs
// and random pairs. A watchdog ends the run with a failure after 10 ms.
module tb_ds4_carry_tree;
  logic [14:0] a, b, g, p;
  logic        cin, c4, c8, c12, c15;
  int checks = 0, failures = 0;

  ds4_carry_tree dut (
    .g(g), .p(p), .cin(cin), .c4(c4), .c8(c8), .c12(c12), .c15(c15)
  );

  function automatic logic carry_into(input int k);
    logic [16:0] lo_a, lo_b, sum;
    lo_a = 17'(a) & ((17'd1 << k) - 17'd1);
    lo_b = 17'(b) & ((17'd1 << k) - 17'd1);
    sum  = lo_a + lo_b + 17'(cin);
    return sum[k];
  endfunction

  task automatic apply(input logic [14:0] va, input logic [14:0] vb, input logic vc);
    a = va;
    b = vb;
    cin = vc;
    g = a & b;
    p = a ^ b;
    #1;
    checks += 4;
    if (c4  != carry_into(4))  failures++;
    if (c8  != carry_into(8))  failures++;
    if (c12 != carry_into(12)) failures++;
    if (c15 != carry_into(15)) failures++;
    if ({c4, c8, c12, c15} != {carry_into(4), carry_into(8), carry_into(12), carry_into(15)}
        && failures < 10)
      $display("FAIL a=%h b=%h cin=%b got c4,c8,c12,c15=%b%b%b%b", a, b, cin, c4, c8, c12, c15);
  endtask

  initial begin
    for (int vc = 0; vc < 2; vc++) begin
      apply('0, '0, 1'(vc));
      apply('1, '0, 1'(vc));
      apply('1, '1, 1'(vc));
      // a propagate run of every length starting at bit 0, generate above it
      for (int k = 0; k <= 15; k++) apply(15'((1 << k) - 1), 15'(1 << k), 1'(vc));
      // a single generate at each position, propagate above it
      for (int k = 0; k < 15; k++) apply(15'h7fff, 15'(1 << k), 1'(vc));
    end
    for (int n = 0; n < 20000; n++) apply(15'($urandom), 15'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
