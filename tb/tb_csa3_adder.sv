// tb_csa3_adder: self-check of the three-operand modulo-2^N adder.
// The 8-bit instance (the default width) is driven with every combination
// of two operands against a set of third operands covering all-zeros,
// all-ones, single bits and random values; a 3-bit instance is checked
// exhaustively. The reference is the integer sum a + b + c reduced
// modulo 2^N.
module tb_csa3_adder;
  logic [7:0] a8, b8, c8, s8;
  logic [2:0] a3, b3, c3, s3;
  int checks = 0, failures = 0;

  csa3_adder dut8 (.a(a8), .b(b8), .c(c8), .s(s8));
  csa3_adder #(.N(3)) dut3 (.a(a3), .b(b3), .c(c3), .s(s3));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cvals [12];
    cvals = '{0, 255, 1, 128, 85, 170, 0, 0, 0, 0, 0, 0};
    for (int k = 6; k < 12; k++) cvals[k] = int'($urandom_range(255));

    for (int ci = 0; ci < 12; ci++) begin
      for (int va = 0; va < 256; va++) begin
        for (int vb = 0; vb < 256; vb++) begin
          a8 = 8'(va); b8 = 8'(vb); c8 = 8'(cvals[ci]);
          #1;
          checks++;
          if (s8 != 8'((va + vb + cvals[ci]) % 256)) begin
            failures++;
            if (failures < 10) $display("FAIL N=8 %0d+%0d+%0d -> %0d", va, vb, cvals[ci], s8);
          end
        end
      end
    end

    for (int v = 0; v < 512; v++) begin
      {a3, b3, c3} = 9'(v);
      #1;
      checks++;
      if (s3 != 3'((int'(a3) + int'(b3) + int'(c3)) % 8)) begin
        failures++;
        if (failures < 10) $display("FAIL N=3 %0d+%0d+%0d -> %0d", a3, b3, c3, s3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
