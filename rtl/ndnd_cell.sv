// ndnd_cell: ND-ND cell of the error-compensation column. It forms the two
// complemented partial products of column n-1, ~(x_{n-1}&y_0) and
// ~(x_0&y_{n-1}), and adds them to the chained column sum:
// {c, s} = ~(x0 & y0) + ~(x1 & y1) + sin. Carry c (weight 2^n) goes to the
// most-significant part, s to the next compensation cell. Combinational.
// The complemented terms are those of the exact compensation term; the
// inner circuit (two NAND gates into a full adder) is this design's reading
// of the cell name.
module ndnd_cell (
  input  logic x0,
  input  logic y0,
  input  logic x1,
  input  logic y1,
  input  logic sin,
  output logic s,
  output logic c
);
  logic pp0, pp1;
  assign pp0 = ~(x0 & y0);
  assign pp1 = ~(x1 & y1);
  fa_cell u_fa (.a(pp0), .b(pp1), .ci(sin), .s(s), .co(c));
endmodule
