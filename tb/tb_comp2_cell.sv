// tb_comp2_cell: exhaustive self-check of the 2-bit magnitude comparator.
// Each of the 16 operand pairs is compared against the integer relations
// A > B and A < B.
module tb_comp2_cell;
  logic a1, a0, b1, b0, a_big, b_big;
  int checks = 0, failures = 0;

  comp2_cell dut (.a1, .a0, .b1, .b0, .a_big, .b_big);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 4; va++) begin
      for (int vb = 0; vb < 4; vb++) begin
        {a1, a0} = 2'(va);
        {b1, b0} = 2'(vb);
        #1;
        checks++;
        if (a_big != (va > vb) || b_big != (va < vb)) begin
          failures++;
          $display("FAIL A=%0d B=%0d -> a_big=%0b b_big=%0b", va, vb, a_big, b_big);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
