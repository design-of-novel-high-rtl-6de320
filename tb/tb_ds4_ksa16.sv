// tb_ds4_ksa16: end-to-end self-checking test of the 16-bit delay-optimized
// sparse-4 Kogge-Stone adder, at its only (full) size.
//
// Every vector is applied to the combinational adder and its sum is checked
// 1 ns later against the integer sum a + b + cin taken modulo 2^16; the
// adder has no clock, so no cycle count applies. The vectors are the
// published simulation examples (32768 + 28672 = 61440, 513 + 770 = 1283,
// 12448 + 9376 = 21824, 801 + 258 = 1059), corners, directed
// carry patterns and 200,000 random pairs.
//
// The test also counts how often each mechanism of the adder was exercised,
// working out the internal carries from the operands (the carry into bit k
// is bit k of the sum of the low k bits), and fails any that never occurred:
//   - each tree carry (into bits 4, 8, 12, 15) asserted,
//   - the carry in propagated through a whole 4-bit black-cell group into
//     bit 4 (GC1 passing Cin),
//   - GC3 taking its carry from GC1 through both blocks 4-7 and 8-11,
//   - GC4 jumping a carry from bit 12 over all of bits 12-14 to bit 15,
//   - a carry rippling through a whole 4-bit chain from its carry in,
//   - the sum wrapping past 2^16 (no carry out is produced).
// A watchdog ends the run with a failure after 100 ms of simulated time.
module tb_ds4_ksa16;
  logic [15:0] a, b, s;
  logic        cin;
  int checks = 0, failures = 0;

  int n_c4 = 0, n_c8 = 0, n_c12 = 0, n_c15 = 0;
  int n_gc1_pass = 0, n_gc3_far = 0, n_gc4_jump = 0, n_ripple = 0, n_wrap = 0;

  ds4_ksa16 dut (.a(a), .b(b), .cin(cin), .s(s));

  task automatic apply(input logic [15:0] va, input logic [15:0] vb, input logic vc);
    logic [16:0] ref_sum;
    logic [15:0] p;
    logic [15:0] c;  // c[k]: carry into bit k
    a = va;
    b = vb;
    cin = vc;
    #1;
    ref_sum = 17'(a) + 17'(b) + 17'(cin);
    p = a ^ b;
    for (int k = 0; k < 16; k++) begin
      logic [16:0] lo;
      lo = (17'(a) & ((17'd1 << k) - 1)) + (17'(b) & ((17'd1 << k) - 1)) + 17'(cin);
      c[k] = lo[k];
    end
    checks++;
    if (s != ref_sum[15:0]) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d + %0d -> %0d, expected %0d", a, b, cin, s, ref_sum[15:0]);
    end
    // mechanism coverage
    if (c[4])  n_c4++;
    if (c[8])  n_c8++;
    if (c[12]) n_c12++;
    if (c[15]) n_c15++;
    if (cin && &p[3:0] && c[4]) n_gc1_pass++;
    if (c[4] && &p[11:4] && c[12]) n_gc3_far++;
    if (c[12] && &p[14:12] && c[15]) n_gc4_jump++;
    if (c[4] && &p[7:4]) n_ripple++;
    if (ref_sum[16]) n_wrap++;
  endtask

  task automatic need(input string name, input int count);
    checks++;
    $display("mechanism %-28s seen %0d times", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never exercised", name);
    end
  endtask

  initial begin
    // published simulation example
    apply(16'd32768, 16'd28672, 1'b0);
    checks++;
    if (s != 16'd61440) begin
      failures++;
      $display("FAIL example: 32768 + 28672 gave %0d", s);
    end
    // further published 16-bit examples: 513 + 770, 12448 + 9376, 801 + 258
    apply(16'd513, 16'd770, 1'b0);
    checks++;
    if (s != 16'd1283) begin failures++; $display("FAIL example: 513 + 770 gave %0d", s); end
    apply(16'd12448, 16'd9376, 1'b0);
    checks++;
    if (s != 16'd21824) begin failures++; $display("FAIL example: 12448 + 9376 gave %0d", s); end
    apply(16'd801, 16'd258, 1'b0);
    checks++;
    if (s != 16'd1059) begin failures++; $display("FAIL example: 801 + 258 gave %0d", s); end
    for (int vc = 0; vc < 2; vc++) begin
      apply('0, '0, 1'(vc));
      apply('1, '0, 1'(vc));
      apply('1, '1, 1'(vc));
      apply(16'h8000, 16'h8000, 1'(vc));
      for (int k = 0; k < 16; k++) begin
        apply(16'((1 << k) - 1), 16'(1 << k), 1'(vc));  // propagate run, then generate
        apply(16'hffff, 16'(1 << k), 1'(vc));           // single generate, propagate above
        apply(16'(1 << k), 16'(1 << k), 1'(vc));        // single generate, kill above
      end
    end
    for (int n = 0; n < 200000; n++) apply(16'($urandom), 16'($urandom), 1'($urandom));

    need("carry into bit 4 (GC1)", n_c4);
    need("carry into bit 8 (GC2)", n_c8);
    need("carry into bit 12 (GC3)", n_c12);
    need("carry into bit 15 (GC4)", n_c15);
    need("cin through group 0-3", n_gc1_pass);
    need("GC3 carry through bits 4-11", n_gc3_far);
    need("GC4 jump over bits 12-14", n_gc4_jump);
    need("ripple through chain 4-7", n_ripple);
    need("sum wraps past 2^16", n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
