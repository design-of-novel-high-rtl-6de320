// tb_grey_cell: exhaustive self-checking test of the wide grey cell.
//
// Instantiates grey_cell with fan-ins 4 (default, as GC4), 3 (as GC3) and
// 2 (as GC1/GC2). The operands are taken to be single bits of an addition
// whose incoming carry is g[0]: the expected output is then the carry out of
// the integer sum of those bits, computed with plain arithmetic. Each
// (generate, propagate) pair is drawn from the three legal bit cases
// kill (0,0), propagate (0,1) and generate (1,0) and every combination is
// applied; the illegal pair (1,1) is also applied and checked against the
// prefix equations. A watchdog ends the run with a failure after 1 ms.
module tb_grey_cell;
  logic [3:0] g4;  logic [3:1] p4;  logic gg4;
  logic [2:0] g3;  logic [2:1] p3;  logic gg3;
  logic [1:0] g2;  logic [1:1] p2;  logic gg2;
  int checks = 0, failures = 0;

  grey_cell dut4 (.g(g4), .p(p4), .g_grp(gg4));
  grey_cell #(.FANIN(3)) dut3 (.g(g3), .p(p3), .g_grp(gg3));
  grey_cell #(.FANIN(2)) dut2 (.g(g2), .p(p2), .g_grp(gg2));

  task automatic check(input string name, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s g=%b p=%b got %b expected %b", name, g4, p4, got, exp);
    end
  endtask

  initial begin
    // arithmetic reference: operand i is a bit pair (x_i, y_i) with
    // g = x & y, p = x ^ y; carry out of x + y + cin
    for (int cin = 0; cin < 2; cin++)
      for (int x = 0; x < 8; x++)
        for (int y = 0; y < 8; y++) begin
          logic [3:0] sum4;
          g4[0] = 1'(cin);
          for (int i = 1; i < 4; i++) begin
            g4[i] = x[i-1] & y[i-1];
            p4[i] = x[i-1] ^ y[i-1];
          end
          g3 = g4[2:0]; p3 = p4[2:1];
          g2 = g4[1:0]; p2 = p4[1:1];
          #1;
          sum4 = 4'(x) + 4'(y) + 4'(cin);
          check("fanin4", gg4, sum4[3]);
          check("fanin3", gg3, (((x & 3) + (y & 3) + cin) >> 2) != 0);
          check("fanin2", gg2, (((x & 1) + (y & 1) + cin) >> 1) != 0);
        end
    // any input pattern, including (1,1) pairs, against the two-input fold
    for (int v = 0; v < 128; v++) begin
      logic r;
      {g4, p4} = 7'(v);
      g3 = g4[2:0]; p3 = p4[2:1];
      g2 = g4[1:0]; p2 = p4[1:1];
      #1;
      r = g4[0];
      for (int i = 1; i < 4; i++) begin
        r = g4[i] | (p4[i] & r);
        if (i == 1) check("fold2", gg2, r);
        if (i == 2) check("fold3", gg3, r);
      end
      check("fold4", gg4, r);
    end
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
