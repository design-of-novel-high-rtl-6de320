// tb_black_cell: exhaustive self-checking test of the wide black cell.
//
// Instantiates black_cell with its default fan-in of 4 and, to cover the
// other widths of the same operator, with fan-ins 2 and 3. Every input
// combination is applied; the reference folds the operands from the least
// significant upward with the two-input prefix operator
// (G,P) = (Gx + Px&Gy, Px&Py), which is independent of the flat
// sum-of-products form inside the cell. A watchdog ends the run with a
// failure after 1 ms of simulated time.
module tb_black_cell;
  logic [3:0] g4, p4;
  logic [2:0] g3, p3;
  logic [1:0] g2, p2;
  logic       gg4, pg4, gg3, pg3, gg2, pg2;
  int checks = 0, failures = 0;

  black_cell dut4 (.g(g4), .p(p4), .g_grp(gg4), .p_grp(pg4));
  black_cell #(.FANIN(3)) dut3 (.g(g3), .p(p3), .g_grp(gg3), .p_grp(pg3));
  black_cell #(.FANIN(2)) dut2 (.g(g2), .p(p2), .g_grp(gg2), .p_grp(pg2));

  // two-input prefix operator folded from bit 0 up
  function automatic logic [1:0] fold(input logic [3:0] g, input logic [3:0] p, input int n);
    logic gr, pr;
    gr = g[0];
    pr = p[0];
    for (int i = 1; i < n; i++) begin
      gr = g[i] | (p[i] & gr);
      pr = p[i] & pr;
    end
    return {gr, pr};
  endfunction

  task automatic check(input string name, input logic [1:0] got, input logic [1:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got G,P=%b expected %b", name, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      {g4, p4} = 8'(v);
      g3 = g4[2:0]; p3 = p4[2:0];
      g2 = g4[1:0]; p2 = p4[1:0];
      #1;
      check("fanin4", {gg4, pg4}, fold(g4, p4, 4));
      check("fanin3", {gg3, pg3}, fold(g4, p4, 3));
      check("fanin2", {gg2, pg2}, fold(g4, p4, 2));
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
