// tb_full_adder: exhaustive self-checking test of the one-bit full adder.
//
// Applies all eight input combinations and compares {co, s} with the integer
// sum a + b + ci. A watchdog ends the run with a failure after 1 ms.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b -> co=%b s=%b", a, b, ci, co, s);
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
