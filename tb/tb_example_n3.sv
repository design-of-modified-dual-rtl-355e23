// tb_example_n3: the 3-bit worked example of the modified dual-CLCG.
// Constants a1..a4 = 5, b1..b4 = 5, 3, 1, 7, modulus 8, seeds
// (x0, y0, p0, q0) = (2, 7, 3, 4). Expected, for i = 0..7:
//   B = 1 0 1 1 1 0 0 0,  C = 0 0 1 1 0 1 1 0,  Z = B xor C = 1 0 0 0 1 1 1 0
// The generator is run for three periods (24 clocks) and must repeat the
// 8-bit pattern, one bit per clock, starting one clock after the seeds.
module tb_example_n3;
  logic       clk = 1'b0;
  logic       start;
  logic [2:0] x0, y0, p0, q0;
  logic       zi;
  always #5 clk = ~clk;

  modified_dual_clcg #(.N(3)) dut (.clk, .start, .x0, .y0, .p0, .q0, .zi);

  int checks = 0, failures = 0;

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] eb, ec, ez;   // element i at bit 7-i
    eb = 8'b1011_1000;
    ec = 8'b0011_0110;
    ez = 8'b1000_1110;
    @(negedge clk);
    start = 1'b0;
    x0 = 3'd2; y0 = 3'd7; p0 = 3'd3; q0 = 3'd4;
    @(negedge clk);
    start = 1'b1;
    for (int i = 0; i < 24; i++) begin
      checks += 3;
      if (dut.b_i != eb[7 - i % 8]) begin
        failures++; $display("FAIL B%0d=%0b", i, dut.b_i);
      end
      if (dut.c_i != ec[7 - i % 8]) begin
        failures++; $display("FAIL C%0d=%0b", i, dut.c_i);
      end
      if (zi != ez[7 - i % 8]) begin
        failures++; $display("FAIL Z%0d=%0b", i, zi);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
