// tb_msb_sum_cell: exhaustive self-checking test of the MSB sum cell.
//
// Applies all eight combinations of the operand MSBs and the incoming carry
// and compares s with the low bit of their integer sum. A watchdog ends the
// run with a failure after 1 ms.
module tb_msb_sum_cell;
  logic a, b, c, s;
  int checks = 0, failures = 0;

  msb_sum_cell dut (.a(a), .b(b), .c(c), .s(s));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (s != 1'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> s=%b", a, b, c, s);
      end
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
