// fw_multiplier: lower-error fixed-width two's-complement multiplier.
//
// Takes two N-bit two's-complement operands and returns an N-bit product
// that approximates the upper half (bits 2N-1..N) of the exact 2N-bit
// product, at roughly half the cells of a full array multiplier.
//
// How it works. The exact product is written in Baugh-Wooley form: every
// partial product x_i*y_j sits in column i+j; the ones that pair one sign
// bit with one magnitude bit are added complemented (NAND), and constants
// 2^N and 2^(2N-1) fix up the sign. The columns split into the
// most-significant part MP (columns N..2N-1, which are the result) and
// the least-significant part LP (columns 0..N-1, which are dropped).
//   * MP is built as a carry-save array of AFA / NFA cells. Row j (1..N-1)
//     holds cells for columns N..N-1+j; a sum goes down to the same column
//     of the next row, a carry to the next column of the next row.
//   * Column N-1, the heaviest LP column, is not dropped. Its N partial
//     products are paired and summed by a chain of compensation cells: one
//     ND-ND cell for the two complemented terms ~(x_{N-1}y_0), ~(x_0y_{N-1}),
//     then A-A cells for x_{N-1-k}y_k with x_k y_{N-1-k}. For odd N the
//     middle term x_m*y_m starts the chain. Each cell's carry (weight 2^N)
//     enters MP at column N; the chain's last sum (weight 2^(N-1)) is
//     dropped, so the carries add exactly floor(column_{N-1} / 2).
//   * Columns 0..N-2 are replaced by a constant of BIAS units of 2^N. With
//     BIAS = 1 and N = 8 the error against the exact product, taken over
//     all 2^16 operand pairs, has zero mean, mean square 0.27 LSB^2 and a
//     maximum of 2.5 LSB (LSB = 2^N).
//   * The column-N inputs of the array that have no carry from a lower
//     column take the compensation carries, the Baugh-Wooley constant and
//     the bias. A ripple-carry row of full adders then resolves MP.
// So p = floor((sum of columns N-1..2N-1 + 2^N + 2^(2N-1) + BIAS*2^N)
// / 2^N) mod 2^N.
//
// The fixed-width principle, the Baugh-Wooley array, the AFA/NFA/A-A/ND-ND
// cell set and the 8x8 size follow the multiplier this RTL implements.
// Its own choices: the exact bias rule (column N-1 kept, constant BIAS for
// the rest), the inner form of the A-A and ND-ND cells, their pairing and
// the ripple-carry final row.
//
// Interface: a, b (N bits, two's complement), p (N bits). Purely
// combinational, no clock; the longest path runs through the compensation
// chain, the array diagonal and the ripple row.
module fw_multiplier #(
  parameter int unsigned N    = 8,  // operand and product width
  parameter int unsigned BIAS = 1   // constant compensation, units of 2^N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p
);
  localparam int unsigned K    = N / 2;        // compensation cells
  localparam int unsigned TOPC = 2 * N - 2;    // highest array column

  if (N < 2) begin : g_bad_n
    $error("fw_multiplier: N must be at least 2");
  end
  if (K + 1 + BIAS > N + 1) begin : g_bad_bias
    $error("fw_multiplier: BIAS too large for the free column-N inputs");
  end

  // ---------------------------------------------------------------------
  // Compensation column (column N-1)
  // ---------------------------------------------------------------------
  logic [K-1:0] comp_s;   // chained sums
  logic [K-1:0] comp_c;   // carries into column N
  logic         comp_s0;  // first chained sum: middle term for odd N

  if (N % 2 == 1) begin : g_mid
    assign comp_s0 = a[(N-1)/2] & b[(N-1)/2];
  end else begin : g_nomid
    assign comp_s0 = 1'b0;
  end

  ndnd_cell u_ndnd (
    .x0(a[N-1]), .y0(b[0]), .x1(a[0]), .y1(b[N-1]),
    .sin(comp_s0), .s(comp_s[0]), .c(comp_c[0])
  );

  for (genvar k = 1; k < K; k++) begin : g_aa
    aa_cell u_aa (
      .x0(a[N-1-k]), .y0(b[k]), .x1(a[k]), .y1(b[N-1-k]),
      .sin(comp_s[k-1]), .s(comp_s[k]), .c(comp_c[k])
    );
  end

  // comp_s[K-1], the last chained sum, has weight 2^(N-1): it lies below
  // the output and is left unconnected.

  // ---------------------------------------------------------------------
  // Column-N injection slots: slot 0 is row 1's sum input, slot j
  // (1..N-1) is row j's carry input, slot N the final row's carry input.
  // ---------------------------------------------------------------------
  logic [N:0] inj;
  always_comb begin
    inj = '0;
    inj[K-1:0] = comp_c;
    inj[K]     = 1'b1;                 // Baugh-Wooley constant 2^N
    for (int unsigned t = 0; t < BIAS; t++) begin
      inj[K+1+t] = 1'b1;               // compensation bias
    end
  end

  // ---------------------------------------------------------------------
  // Carry-save array over columns N..2N-2, rows 1..N-1
  // ---------------------------------------------------------------------
  logic [TOPC:N] row_s [N];  // row_s[j][c]: sum of row j, column c
  logic [TOPC:N] row_c [N];  // row_c[j][c]: carry of row j, column c

  assign row_s[0] = '0;  // no row 0 inside MP
  assign row_c[0] = '0;

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar c = N; c <= TOPC; c++) begin : g_col
      if (c <= N - 1 + j) begin : g_cell
        localparam int unsigned I = c - j;
        logic sin, cin;
        if (j == 1) begin : g_sin_inj
          assign sin = inj[0];
        end else if (c <= N - 2 + j) begin : g_sin_up
          assign sin = row_s[j-1][c];
        end else begin : g_sin_top
          assign sin = 1'b0;
        end
        if (c == N) begin : g_cin_inj
          assign cin = inj[j];
        end else begin : g_cin_up
          assign cin = row_c[j-1][c-1];
        end
        // Exactly one sign index (I or j equal to N-1): complemented term.
        if ((I == N - 1) != (j == N - 1)) begin : g_nfa
          nfa_cell u_cell (.x(a[I]), .y(b[j]), .sin(sin), .cin(cin),
                           .s(row_s[j][c]), .c(row_c[j][c]));
        end else begin : g_afa
          afa_cell u_cell (.x(a[I]), .y(b[j]), .sin(sin), .cin(cin),
                           .s(row_s[j][c]), .c(row_c[j][c]));
        end
      end else begin : g_empty
        assign row_s[j][c] = 1'b0;
        assign row_c[j][c] = 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------------
  // Final ripple-carry row over columns N..2N-1
  // ---------------------------------------------------------------------
  logic [2*N-1:N] rc;   // ripple carry out of each column
  logic [2*N-1:N] fsum;

  fa_cell u_cpa_lo (.a(row_s[N-1][N]), .b(inj[N]), .ci(1'b0),
                    .s(fsum[N]), .co(rc[N]));
  for (genvar c = N + 1; c <= TOPC; c++) begin : g_cpa
    fa_cell u_cpa (.a(row_s[N-1][c]), .b(row_c[N-1][c-1]), .ci(rc[c-1]),
                   .s(fsum[c]), .co(rc[c]));
  end
  // Column 2N-1: Baugh-Wooley constant 2^(2N-1); the carry out is dropped.
  fa_cell u_cpa_hi (.a(1'b1), .b(row_c[N-1][TOPC]), .ci(rc[TOPC]),
                    .s(fsum[2*N-1]), .co(rc[2*N-1]));

  assign p = fsum;
endmodule
