// tb_pg_preprocess: self-checking test of the generate/propagate stage.
//
// Drives random and corner operand pairs into pg_preprocess at its default
// width and compares every bit of g and p with a per-bit model (g set when
// both bits are one, p set when exactly one is). Purely combinational: each
// vector is applied, then checked 1 ns later. A watchdog ends the run with a
// failure if it has not finished after 1 ms of simulated time.
module tb_pg_preprocess;
  localparam int unsigned W = 15;

  logic [W-1:0] a, b, g, p;
  int checks = 0, failures = 0;

  pg_preprocess dut (.a(a), .b(b), .g(g), .p(p));

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb);
    a = va;
    b = vb;
    #1;
    for (int i = 0; i < W; i++) begin
      checks++;
      if (g[i] != (a[i] && b[i]) || p[i] != (a[i] != b[i])) begin
        failures++;
        if (failures < 10)
          $display("FAIL bit %0d a=%h b=%h g=%h p=%h", i, a, b, g, p);
      end
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('0, '1);
    apply('1, '1);
    apply(15'h5555, 15'h2aaa);
    for (int n = 0; n < 2000; n++) apply(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
