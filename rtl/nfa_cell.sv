// nfa_cell: NFA cell of the Baugh-Wooley array, a NAND gate forming the
// complemented partial product ~(x&y) followed by a full adder:
// {c, s} = ~(x & y) + sin + cin. It sits where a sign bit meets a magnitude
// bit (x_{n-1}y_j or x_i y_{n-1}, i,j < n-1), whose terms Baugh-Wooley adds
// in complemented form. Combinational. Cell name and role follow the
// multiplier description; the gate-level form is this design's reading.
module nfa_cell (
  input  logic x,
  input  logic y,
  input  logic sin,
  input  logic cin,
  output logic s,
  output logic c
);
  logic pp;
  assign pp = ~(x & y);
  fa_cell u_fa (.a(pp), .b(sin), .ci(cin), .s(s), .co(c));
endmodule
