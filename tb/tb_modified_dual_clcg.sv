// tb_modified_dual_clcg: end-to-end self-check of the bit generator at its
// default size (N = 8, example constants), against a reference model that
// steps x, y, p, q with integer multiplication, a*v + b mod 256, and forms
// Z = (x > y) xor (p > q).
//
// For each of several seed sets (the worked example's seeds among them):
//  * seed load: seeds applied with start low; Z0 must be on zi after exactly
//    one clock (initial latency of one clock);
//  * run: start high for two full periods (512 clocks); zi must match the
//    model on every clock (one bit per clock, none skipped), and the output
//    must repeat with period 256 = 2^N;
//  * hold: start kept low for several clocks keeps zi at Z0;
//  * restart: start dropped low in mid-run with new seeds restarts the
//    sequence.
// The four combinations of (B, C) entering the XOR are counted from the
// model. Every mechanism must occur at least once.
module tb_modified_dual_clcg;
  localparam int M = 256;

  logic       clk = 1'b0;
  logic       start;
  logic [7:0] x0, y0, p0, q0;
  logic       zi;
  always #5 clk = ~clk;

  modified_dual_clcg dut (.clk, .start, .x0, .y0, .p0, .q0, .zi);

  int checks = 0, failures = 0;
  int n_load = 0, n_run = 0, n_hold = 0, n_restart = 0, n_full_period = 0;
  int n_bc [4] = '{0, 0, 0, 0};

  // reference state, holds x(i+1), y(i+1), p(i+1), q(i+1)
  int rx, ry, rp, rq;

  function automatic int nxt(int a, int b, int v);
    return (a * v + b) % M;
  endfunction

  function automatic logic model_z();
    return logic'(rx > ry) ^ logic'(rp > rq);
  endfunction

  task automatic model_load(int sx, int sy, int sp, int sq);
    rx = nxt(5, 5, sx); ry = nxt(5, 3, sy); rp = nxt(5, 1, sp); rq = nxt(5, 7, sq);
  endtask

  task automatic model_step();
    rx = nxt(5, 5, rx); ry = nxt(5, 3, ry); rp = nxt(5, 1, rp); rq = nxt(5, 7, rq);
  endtask

  task automatic expect_z(string tag);
    checks++;
    n_bc[{logic'(rx > ry), logic'(rp > rq)}]++;
    if (zi != model_z()) begin
      failures++;
      if (failures < 20) $display("FAIL %s zi=%0b expected %0b at %0t", tag, zi, model_z(), $time);
    end
  endtask

  task automatic expect_true(string tag, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", tag, $time);
    end
  endtask

  // seed load: one clock with start low, then Z0 must be visible
  task automatic load(int sx, int sy, int sp, int sq);
    start = 1'b0;
    x0 = 8'(sx); y0 = 8'(sy); p0 = 8'(sp); q0 = 8'(sq);
    model_load(sx, sy, sp, sq);
    @(negedge clk);
    expect_z("Z0 after one clock");
    n_load++;
  endtask

  // run `steps` clocks with start high, recording the output bits
  task automatic run(int steps, ref logic bits [], input string tag);
    bits = new[steps + 1];
    bits[0] = zi;
    start = 1'b1;
    for (int i = 1; i <= steps; i++) begin
      @(negedge clk);
      model_step();
      expect_z(tag);
      bits[i] = zi;
      n_run++;
    end
  endtask

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic bits [];
    int seeds [5][4];
    seeds[0] = '{2, 7, 3, 4};
    seeds[1] = '{0, 0, 0, 0};
    seeds[2] = '{255, 1, 128, 77};
    for (int s = 3; s < 5; s++)
      for (int k = 0; k < 4; k++) seeds[s][k] = int'($urandom_range(255));

    start = 1'b0;
    x0 = '0; y0 = '0; p0 = '0; q0 = '0;
    @(negedge clk);

    for (int s = 0; s < 5; s++) begin
      bit repeats, shorter;
      load(seeds[s][0], seeds[s][1], seeds[s][2], seeds[s][3]);

      // hold: start stays low, zi stays at Z0
      if (s == 0) begin
        repeat (3) begin
          @(negedge clk);
          expect_z("hold");
          n_hold++;
        end
      end

      run(2 * M, bits, "run");
      repeats = 1'b1;
      shorter = 1'b1;
      for (int i = 0; i < M; i++) begin
        if (bits[i] != bits[i + M]) repeats = 1'b0;
        if (bits[i] != bits[i + M / 2]) shorter = 1'b0;
      end
      expect_true("output repeats after 2^N bits", repeats);
      if (repeats && !shorter) n_full_period++;
      $display("seeds %0d %0d %0d %0d: output period is 2^N: %0b", seeds[s][0], seeds[s][1],
               seeds[s][2], seeds[s][3], repeats && !shorter);
    end

    // restart in mid-run with new seeds
    start = 1'b1;
    repeat (37) begin
      @(negedge clk);
      model_step();
      expect_z("pre-restart");
    end
    load(19, 230, 64, 101);
    n_restart++;
    run(40, bits, "after restart");

    expect_true("seed load happened", n_load > 0);
    expect_true("run happened", n_run > 0);
    expect_true("hold happened", n_hold > 0);
    expect_true("restart happened", n_restart > 0);
    expect_true("a full 2^N period was seen", n_full_period > 0);
    for (int k = 0; k < 4; k++) expect_true("every (B,C) combination seen", n_bc[k] > 0);
    $display("loads=%0d run clocks=%0d holds=%0d restarts=%0d full periods=%0d",
             n_load, n_run, n_hold, n_restart, n_full_period);
    $display("(B,C) = 00:%0d 01:%0d 10:%0d 11:%0d", n_bc[0], n_bc[1], n_bc[2], n_bc[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
