// dadda72_mult16: approximate unsigned N x N multiplier (N = 16) built on
// modified 7:2 compressors and a Dadda tree.
//   1. pp_generator forms the N rows of partial products (AND gates).
//   2. Partial-product rows are taken seven at a time: rows 0-6 and rows 7-13
//      each go through a compressor_7_2_row, which leaves a sum row and a
//      carry row. The remaining N mod 7 rows (rows 14 and 15) pass on as is.
//      For N = 16 this turns 16 rows into 2 + 2 + 2 = 6 rows, doing the work
//      of the first three Dadda stages (16 -> 13 -> 9 -> 6).
//   3. dadda_reducer reduces the six rows with full and half adders in the
//      Dadda stages 6 -> 4 -> 3 -> 2.
//   4. ripple_carry_adder adds the last two rows into the 2N-bit product.
// The 7:2 compressor is approximate: a column of a compressor row whose nine
// inputs hold four or more 1s loses some of its count, so y can be below
// a*b. Everything after the compressor rows is exact.
// Interface: a, b unsigned operands; y the 2N-bit product. Purely
// combinational, no clock: one product per evaluation.
// The grouping of rows into 7 + 7 + 2, the use of full-width compressor rows
// and the absence of an output register are this design's reading of the
// published flow; the compressor structure, the Dadda stages and the
// ripple-carry final adder follow it.
module dadda72_mult16 #(
  parameter int N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] y
);
  localparam int W      = 2 * N;
  localparam int NGRP   = N / 7;          // compressor rows
  localparam int NREST  = N - 7 * NGRP;   // rows passed on unchanged
  localparam int RROWS  = 2 * NGRP + NREST;

  // Which bits of the rows entering the Dadda tree can be non-zero.
  // Compressor group g starts at column 7g; its sum row covers columns 7g
  // and up, its carry row 7g+1 and up. Leftover partial-product row r covers
  // columns r .. r+N-1.
  function automatic logic [RROWS-1:0][W-1:0] tree_mask();
    logic [RROWS-1:0][W-1:0] mk;
    mk = '0;
    for (int g = 0; g < NGRP; g++)
      for (int c = 0; c < W; c++) begin
        mk[2*g][c]   = (c >= 7 * g);
        mk[2*g+1][c] = (c >= 7 * g + 1);
      end
    for (int q = 0; q < NREST; q++)
      for (int c = 0; c < W; c++)
        mk[2*NGRP+q][c] = (c >= 7 * NGRP + q) && (c < 7 * NGRP + q + N);
    return mk;
  endfunction

  localparam logic [RROWS-1:0][W-1:0] TREE_MASK = tree_mask();

  logic [N-1:0][N-1:0]     pp;
  logic [RROWS-1:0][W-1:0] tree_rows;
  logic [W-1:0]            fin_a, fin_b;

  pp_generator #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));

  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    logic [6:0][W-1:0] grp_rows;
    for (genvar r = 0; r < 7; r++) begin : g_r
      assign grp_rows[r] = W'({{N{1'b0}}, pp[7*g+r]}) << (7*g + r);
    end
    compressor_7_2_row #(.W(W)) u_row (
      .rows(grp_rows),
      .sum_row(tree_rows[2*g]),
      .carry_row(tree_rows[2*g+1])
    );
  end

  for (genvar q = 0; q < NREST; q++) begin : g_rest
    assign tree_rows[2*NGRP+q] = W'({{N{1'b0}}, pp[7*NGRP+q]}) << (7*NGRP + q);
  end

  dadda_reducer #(.W(W), .ROWS(RROWS), .ROW_MASK(TREE_MASK)) u_dadda (
    .rows(tree_rows), .row_a(fin_a), .row_b(fin_b)
  );

  ripple_carry_adder #(.W(W)) u_rca (.x(fin_a), .y(fin_b), .s(y));
endmodule
