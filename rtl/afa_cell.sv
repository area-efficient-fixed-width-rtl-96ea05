// afa_cell: AFA cell of the Baugh-Wooley array, an AND gate forming the
// partial product x&y followed by a full adder that adds it to the sum from
// the row above (sin) and the carry from the row above one column lower
// (cin). {c, s} = (x & y) + sin + cin. Combinational, one gate plus one
// full-adder delay. The cell name and its role (uncomplemented partial
// products) follow the multiplier description; the gate-level form is the
// plain AND-into-full-adder reading of that name.
module afa_cell (
  input  logic x,
  input  logic y,
  input  logic sin,
  input  logic cin,
  output logic s,
  output logic c
);
  logic pp;
  assign pp = x & y;
  fa_cell u_fa (.a(pp), .b(sin), .ci(cin), .s(s), .co(c));
endmodule
