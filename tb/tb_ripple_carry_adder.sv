// tb_ripple_carry_adder: exhaustive self-checking test of the ripple chain.
//
// Tests the default 4-bit chain and the 3-bit chain used for the top bits of
// the 16-bit adder over every operand and carry-in combination, comparing
// {co, s} with the integer sum a + b + ci. A watchdog ends the run with a
// failure after 1 ms.
module tb_ripple_carry_adder;
  logic [3:0] a4, b4, s4;
  logic [2:0] a3, b3, s3;
  logic       ci, co4, co3;
  int checks = 0, failures = 0;

  ripple_carry_adder dut4 (.a(a4), .b(b4), .ci(ci), .s(s4), .co(co4));
  ripple_carry_adder #(.WIDTH(3)) dut3 (.a(a3), .b(b3), .ci(ci), .s(s3), .co(co3));

  initial begin
    for (int v = 0; v < 512; v++) begin
      {ci, a4, b4} = 9'(v);
      a3 = a4[2:0];
      b3 = b4[2:0];
      #1;
      checks++;
      if ({co4, s4} != 5'(int'(a4) + int'(b4) + int'(ci))) begin
        failures++;
        if (failures < 10) $display("FAIL w4 %h+%h+%b -> %b %h", a4, b4, ci, co4, s4);
      end
      checks++;
      if ({co3, s3} != 4'(int'(a3) + int'(b3) + int'(ci))) begin
        failures++;
        if (failures < 10) $display("FAIL w3 %h+%h+%b -> %b %h", a3, b3, ci, co3, s3);
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
