// full_adder: one-bit full adder, the cell from which the three-operand
// carry-save adder is built.
//
// Adds three one-bit inputs and returns their two-bit total as a sum bit
// (weight 1) and a carry bit (weight 2). Purely combinational; no clock.
// The cell is a plain full adder as used throughout carry-save arithmetic;
// its gate-level form (two XORs for the sum, majority for the carry) is the
// usual one and is left to synthesis.
module full_adder (
  input  logic a,     // operand bit
  input  logic b,     // operand bit
  input  logic ci,    // third operand bit / carry in
  output logic s,     // sum bit, a ^ b ^ ci
  output logic co     // carry bit, majority(a, b, ci)
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
