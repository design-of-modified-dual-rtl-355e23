// modified_dual_clcg: pseudorandom bit generator producing one bit per clock
// from two coupled pairs of linear congruential generators.
//
// Four LCGs run in lock-step:
//   x(i+1) = (a1 x(i) + b1) mod 2^N      y(i+1) = (a2 y(i) + b2) mod 2^N
//   p(i+1) = (a3 p(i) + b3) mod 2^N      q(i+1) = (a4 q(i) + b4) mod 2^N
// with ak = 2^Rk + 1. Comparator 1 gives B = (x(i+1) > y(i+1)), comparator 2
// gives C = (p(i+1) > q(i+1)), and the output is their modulo-2 sum,
//   zi = B xor C.
// Unlike the original dual-CLCG, which keeps B only when C = 0 and so needs
// a buffer and a control unit to smooth the output rate, no bit is dropped:
// one output bit is produced on every clock, with one clock of initial
// latency and no memory besides the four N-bit state registers.
//
// Interface (as in the 8-bit design: clk, start, four 8-bit seeds, zi):
//   start low  - every LCG loads f(seed); zi shows Z0 one clock after the
//                seeds are presented.
//   start high - every clock advances all four LCGs; zi shows Z1, Z2, ...
// zi is combinational from the state registers (comparators and one XOR).
//
// The default width N = 8 is the size the design is presented at. The
// constants default to the values of the worked example (all ak = 5, i.e.
// Rk = 2; b1..b4 = 5, 3, 1, 7), which meet the full-period conditions for
// every N; they are parameters so other constants can be chosen. The start
// polarity and the lack of a reset are this design's choices.
module modified_dual_clcg #(
  parameter int unsigned  N  = 8,       // word width, modulus 2^N
  parameter int unsigned  R1 = 2,       // a1 = 2^R1 + 1
  parameter int unsigned  R2 = 2,       // a2 = 2^R2 + 1
  parameter int unsigned  R3 = 2,       // a3 = 2^R3 + 1
  parameter int unsigned  R4 = 2,       // a4 = 2^R4 + 1
  parameter logic [N-1:0] B1 = N'(5),
  parameter logic [N-1:0] B2 = N'(3),
  parameter logic [N-1:0] B3 = N'(1),
  parameter logic [N-1:0] B4 = N'(7)
) (
  input  logic         clk,
  input  logic         start,
  input  logic [N-1:0] x0,
  input  logic [N-1:0] y0,
  input  logic [N-1:0] p0,
  input  logic [N-1:0] q0,
  output logic         zi
);
  logic [N-1:0] x, y, p, q;          // x(i+1), y(i+1), p(i+1), q(i+1)
  logic         b_i, c_i;            // comparator outputs B_i and C_i
  logic         x_lt_y, p_lt_q;      // A < B outputs, not needed for zi

  // Controlled pair: x, y -> B_i
  lcg #(.N(N), .R(R1), .B(B1)) u_lcg_x (.clk, .start, .seed(x0), .x(x));
  lcg #(.N(N), .R(R2), .B(B2)) u_lcg_y (.clk, .start, .seed(y0), .x(y));
  mag_comparator #(.N(N)) u_comp1 (.a(x), .b(y), .a_gt_b(b_i), .a_lt_b(x_lt_y));

  // Controller pair: p, q -> C_i
  lcg #(.N(N), .R(R3), .B(B3)) u_lcg_p (.clk, .start, .seed(p0), .x(p));
  lcg #(.N(N), .R(R4), .B(B4)) u_lcg_q (.clk, .start, .seed(q0), .x(q));
  mag_comparator #(.N(N)) u_comp2 (.a(p), .b(q), .a_gt_b(c_i), .a_lt_b(p_lt_q));

  // Modulo-2 addition of the two coupled-LCG bits
  assign zi = b_i ^ c_i;
endmodule
