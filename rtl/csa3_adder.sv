// csa3_adder: three-operand modulo-2^N adder built as a carry-save adder.
//
// Computes s = (a + b + c) mod 2^N with 2N-1 full adders in two rows:
//  * carry-save row: N full adders, one per bit position i, reduce
//    a[i], b[i], c[i] to a partial-sum bit ps[i] and a carry bit pc[i]
//    of weight 2^(i+1);
//  * ripple row: N-1 full adders add ps[i] and pc[i-1] for i = 1..N-1,
//    with the ripple carry into bit 1 tied to 0.
// Bit 0 of the result is ps[0] directly. The carry out of bit N-1 in both
// rows is dropped, which is the modulo-2^N reduction. The two-row structure
// and the 2N-1 adder count follow the carry-save adder the design is built
// around; the critical path is one full adder plus the N-1 stage ripple.
// Combinational, no clock. N >= 2.
module csa3_adder #(
  parameter int unsigned N = 8    // operand and result width
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s          // (a + b + c) mod 2^N
);
  logic [N-1:0] ps;   // carry-save row: partial sums
  logic [N-1:0] pc;   // carry-save row: carries (pc[i] has weight 2^(i+1))
  logic [N-1:1] rc;   // ripple row: carry into bit i (rc[1] = 0)

  // pc[N-1] and the ripple carry out of bit N-1 are the bits beyond 2^N; they are
  // discarded by construction (modulo-2^N), so they stay unread.

  for (genvar i = 0; i < N; i++) begin : g_csrow
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(ps[i]), .co(pc[i]));
  end

  assign rc[1] = 1'b0;
  assign s[0]  = ps[0];

  for (genvar i = 1; i < N; i++) begin : g_ripple
    logic co;
    full_adder u_fa (.a(ps[i]), .b(pc[i-1]), .ci(rc[i]), .s(s[i]), .co(co));
    if (i < N - 1) begin : g_link
      assign rc[i+1] = co;
    end
  end
endmodule
