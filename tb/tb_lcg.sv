// tb_lcg: self-check of the shift-and-add linear congruential generator.
//  * Four 3-bit instances with a = 5 and b = 5, 3, 1, 7, seeded 2, 7, 3, 4,
//    must reproduce the worked-example sequences
//    x: 7 0 5 6 3 4 1 2, y: 6 1 0 3 2 5 4 7, p: 0 1 6 7 4 5 2 3,
//    q: 3 6 5 0 7 2 1 4, and repeat them (period 8 = 2^3).
//  * An 8-bit instance with default constants (a = 5, b = 5) and one with
//    a = 9, b = 43 are compared every clock with x' = (a*x + b) mod 256
//    computed by multiplication, and each must return to its first value
//    after exactly 256 steps (full period).
//  * Latency: the first value appears one clock after the seed is applied
//    with start low; start low in mid-run restarts from a new seed.
module tb_lcg;
  logic clk = 1'b0;
  logic start;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // worked example, N = 3
  logic [2:0] sx, sy, sp, sq, x3, y3, p3, q3;
  lcg #(.N(3), .R(2), .B(3'd5)) u_x3 (.clk, .start, .seed(sx), .x(x3));
  lcg #(.N(3), .R(2), .B(3'd3)) u_y3 (.clk, .start, .seed(sy), .x(y3));
  lcg #(.N(3), .R(2), .B(3'd1)) u_p3 (.clk, .start, .seed(sp), .x(p3));
  lcg #(.N(3), .R(2), .B(3'd7)) u_q3 (.clk, .start, .seed(sq), .x(q3));

  // 8-bit instances
  logic [7:0] s8a, s8b, x8a, x8b;
  lcg                                u_8a (.clk, .start, .seed(s8a), .x(x8a));
  lcg #(.N(8), .R(3), .B(8'd43))     u_8b (.clk, .start, .seed(s8b), .x(x8b));

  function automatic int step(int a, int b, int x, int m);
    return (a * x + b) % m;
  endfunction

  task automatic expect_eq(string tag, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d expected %0d at %0t", tag, got, exp, $time);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex [8], ey [8], ep [8], eq [8];
    int ra, rb, first_a, first_b, per_a, per_b;
    ex = '{7, 0, 5, 6, 3, 4, 1, 2};
    ey = '{6, 1, 0, 3, 2, 5, 4, 7};
    ep = '{0, 1, 6, 7, 4, 5, 2, 3};
    eq = '{3, 6, 5, 0, 7, 2, 1, 4};

    // load seeds with start low; one clock later the first values appear
    @(negedge clk);
    start = 1'b0;
    sx = 3'd2; sy = 3'd7; sp = 3'd3; sq = 3'd4;
    s8a = 8'd200; s8b = 8'd17;
    @(negedge clk);
    start = 1'b1;
    ra = step(5, 5, 200, 256);
    rb = step(9, 43, 17, 256);
    first_a = ra; first_b = rb;
    per_a = 0; per_b = 0;

    // two full periods of the 3-bit example, 520 steps of the 8-bit ones
    for (int i = 0; i < 520; i++) begin
      if (i < 16) begin
        expect_eq("x3", int'(x3), ex[i % 8]);
        expect_eq("y3", int'(y3), ey[i % 8]);
        expect_eq("p3", int'(p3), ep[i % 8]);
        expect_eq("q3", int'(q3), eq[i % 8]);
      end
      expect_eq("x8a", int'(x8a), ra);
      expect_eq("x8b", int'(x8b), rb);
      if (i > 0 && per_a == 0 && int'(x8a) == first_a) per_a = i;
      if (i > 0 && per_b == 0 && int'(x8b) == first_b) per_b = i;
      ra = step(5, 5, ra, 256);
      rb = step(9, 43, rb, 256);
      @(negedge clk);
    end
    expect_eq("period a", per_a, 256);
    expect_eq("period b", per_b, 256);

    // restart from a new seed in mid-run: one clock with start low
    start = 1'b0;
    s8a = 8'd77;
    @(negedge clk);
    expect_eq("restart latency", int'(x8a), step(5, 5, 77, 256));
    start = 1'b1;
    @(negedge clk);
    expect_eq("restart step", int'(x8a), step(5, 5, step(5, 5, 77, 256), 256));
    // holding start low keeps the register at f(seed)
    start = 1'b0;
    @(negedge clk);
    @(negedge clk);
    expect_eq("hold", int'(x8a), step(5, 5, 77, 256));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
