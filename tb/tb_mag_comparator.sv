// tb_mag_comparator: self-check of the tree magnitude comparator.
// The 8-bit instance (default width) is checked on all 65536 operand pairs,
// a 3-bit instance (zero-extended to 4 bits inside) on all 64 pairs, and a
// 16-bit instance on random pairs, including pairs that differ only in one
// low bit. The reference is integer comparison.
module tb_mag_comparator;
  logic [7:0]  a8, b8;
  logic [2:0]  a3, b3;
  logic [15:0] a16, b16;
  logic gt8, lt8, gt3, lt3, gt16, lt16;
  int checks = 0, failures = 0;

  mag_comparator               dut8  (.a(a8),  .b(b8),  .a_gt_b(gt8),  .a_lt_b(lt8));
  mag_comparator #(.N(3))      dut3  (.a(a3),  .b(b3),  .a_gt_b(gt3),  .a_lt_b(lt3));
  mag_comparator #(.N(16))     dut16 (.a(a16), .b(b16), .a_gt_b(gt16), .a_lt_b(lt16));

  task automatic check(string tag, int va, int vb, logic gt, logic lt);
    checks++;
    if (gt != (va > vb) || lt != (va < vb)) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d -> gt=%0b lt=%0b", tag, va, vb, gt, lt);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 256; va++)
      for (int vb = 0; vb < 256; vb++) begin
        a8 = 8'(va); b8 = 8'(vb);
        #1 check("N=8", va, vb, gt8, lt8);
      end
    for (int va = 0; va < 8; va++)
      for (int vb = 0; vb < 8; vb++) begin
        a3 = 3'(va); b3 = 3'(vb);
        #1 check("N=3", va, vb, gt3, lt3);
      end
    for (int k = 0; k < 20000; k++) begin
      int va, vb;
      va = int'($urandom_range(65535));
      vb = (k % 2 == 0) ? int'($urandom_range(65535)) : (va ^ (1 << (k % 16)));
      a16 = 16'(va); b16 = 16'(vb);
      #1 check("N=16", va, vb, gt16, lt16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
