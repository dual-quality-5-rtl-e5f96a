// comp52_row: one reduction step built from dual-quality 5:2 compressors.
//
// Five aligned W-bit rows enter; column j feeds bit j of every row into the
// compressor of that column. Cout1/Cout2 of column j drive Cin1/Cin2 of
// column j+1 (column 0 receives zeros), so the step is
//   rows[0]+..+rows[4] = sum_row + carry_row   (mod 2^W, exact mode)
// where carry_row holds the Carry of column j at bit j+1. Carries that would
// leave column W-1 are dropped; in a multiplier whose result fits in W bits
// this loses nothing. The carries out of the top column therefore have no
// destination, and a lint note that those bits are unused is expected.
//
// Columns below APPROX_COLS follow the exact input; columns at or above it
// are always exact, so approximation is confined to the low-order product
// bits. The column chaining follows the compressor description; the
// APPROX_COLS split is this design's own choice. Combinational.
module comp52_row #(
  parameter int unsigned W           = 16,
  parameter int unsigned APPROX_COLS = 8
) (
  input  logic [W-1:0] rows [5],
  input  logic         exact,
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);
  logic [W:0]   c1_chain, c2_chain;   // c*_chain[j] = Cin of column j
  logic [W-1:0] carry_col;

  assign c1_chain[0] = 1'b0;
  assign c2_chain[0] = 1'b0;

  for (genvar j = 0; j < W; j++) begin : g_col
    logic col_exact;
    assign col_exact = (j < APPROX_COLS) ? exact : 1'b1;

    dq_compressor_5_2 u_cmp (
      .x     ({rows[4][j], rows[3][j], rows[2][j], rows[1][j], rows[0][j]}),
      .cin1  (c1_chain[j]),
      .cin2  (c2_chain[j]),
      .exact (col_exact),
      .sum   (sum_row[j]),
      .carry (carry_col[j]),
      .cout1 (c1_chain[j+1]),
      .cout2 (c2_chain[j+1])
    );
  end

  assign carry_row = {carry_col[W-2:0], 1'b0};
endmodule
