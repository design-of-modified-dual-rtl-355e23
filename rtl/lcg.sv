// lcg: shift-and-add linear congruential generator,
//   x(i+1) = (a * x(i) + b) mod 2^N  with  a = 2^R + 1.
//
// Because the multiplier is 2^R + 1, a * x is x shifted left by R plus x
// itself, so the multiply becomes a fixed shift (wiring) and the update is
// one three-operand modulo-2^N addition of (x << R), x and the constant b,
// done by the carry-save adder. A 2:1 multiplexer in front of the adder
// chooses what is iterated: the seed while start is low, the register's
// own output while start is high.
//
// Timing: the register loads on every rising clk edge. With start low it
// loads f(seed), the first sequence value x1, one clock after the seed is
// presented; from then on, with start high, each clock advances it by one
// step. x is the register output, x(i+1) in the document's notation.
// Holding start low again reloads from the seed (restart).
//
// The structure (mux, shifter, three-operand adder, register) follows the
// documented LCG. The polarity of start and the absence of a separate
// reset are this design's choices. For a full period of 2^N, b must be odd
// and a - 1 = 2^R divisible by 4 (R >= 2).
module lcg #(
  parameter int unsigned N = 8,           // word width, modulus 2^N
  parameter int unsigned R = 2,           // shift amount, a = 2^R + 1
  parameter logic [N-1:0] B = N'(5)       // additive constant b
) (
  input  logic         clk,
  input  logic         start,   // 0: iterate from seed, 1: run
  input  logic [N-1:0] seed,    // initial value x0
  output logic [N-1:0] x        // register: x(i+1)
);
  logic [N-1:0] xi;        // multiplexer output, x(i)
  logic [N-1:0] xi_sh;     // 2^R * x(i) mod 2^N
  logic [N-1:0] x_next;    // adder output

  assign xi    = start ? x : seed;
  assign xi_sh = xi << R;

  csa3_adder #(.N(N)) u_add (.a(xi_sh), .b(xi), .c(B), .s(x_next));

  always_ff @(posedge clk) x <= x_next;
endmodule
