// comp2_cell: 2-bit magnitude comparator, the building cell of the n-bit
// comparator tree.
//
// Compares A = {a1, a0} with B = {b1, b0} and raises a_big when A > B and
// b_big when A < B; both are low when A == B, and they are never high
// together. The upper bit decides unless it is equal, in which case the
// lower bit decides:
//   a_big = a1 & ~b1 | (a1 ~^ b1) & a0 & ~b0
//   b_big = b1 & ~a1 | (a1 ~^ b1) & b0 & ~a0
// Because (a_big, b_big) of a compared field is itself a valid "2-bit"
// encoding of its ordering, the same cell also merges two sub-results in
// the upper levels of the tree. Combinational, no clock.
module comp2_cell (
  input  logic a1, a0,    // operand A, bit 1 and bit 0
  input  logic b1, b0,    // operand B, bit 1 and bit 0
  output logic a_big,     // A > B
  output logic b_big      // A < B
);
  logic hi_eq;
  always_comb begin
    hi_eq = ~(a1 ^ b1);
    a_big = (a1 & ~b1) | (hi_eq & a0 & ~b0);
    b_big = (b1 & ~a1) | (hi_eq & b0 & ~a0);
  end
endmodule
