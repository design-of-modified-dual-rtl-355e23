// tb_full_adder: exhaustive self-check of the one-bit full adder.
// All eight input combinations are applied; the expected sum and carry are
// the two bits of the integer a + b + ci.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a, .b, .ci, .s, .co);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, ci} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(ci);
      checks++;
      if ({co, s} != 2'(total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> co=%0b s=%0b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
