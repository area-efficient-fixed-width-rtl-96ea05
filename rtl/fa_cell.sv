// fa_cell: one-bit full adder, the FA cell of the multiplier array.
// s = a ^ b ^ ci, co = majority(a, b, ci). Purely combinational; it is the
// adder inside every AFA, NFA, A-A and ND-ND cell and in the final
// carry-propagate row.
module fa_cell (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
