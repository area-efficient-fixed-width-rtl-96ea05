// aa_cell: A-A cell of the error-compensation column. It forms two
// uncomplemented partial products of column n-1 (weight 2^(n-1)), x0&y0 and
// x1&y1, and adds them to the sum chained down the column:
// {c, s} = (x0 & y0) + (x1 & y1) + sin. The carry c has weight 2^n and
// enters the most-significant part of the array; s is passed to the next
// compensation cell. Combinational. The cell name comes from the proposed
// multiplier; its inner circuit (two AND gates into a full adder) and the
// symmetric pairing x_{n-1-k}y_k / x_k y_{n-1-k} are this design's reading.
module aa_cell (
  input  logic x0,
  input  logic y0,
  input  logic x1,
  input  logic y1,
  input  logic sin,
  output logic s,
  output logic c
);
  logic pp0, pp1;
  assign pp0 = x0 & y0;
  assign pp1 = x1 & y1;
  fa_cell u_fa (.a(pp0), .b(pp1), .ci(sin), .s(s), .co(c));
endmodule
