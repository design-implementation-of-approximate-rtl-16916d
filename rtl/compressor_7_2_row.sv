// compressor_7_2_row: reduces seven operand rows to two with one modified
// 7:2 compressor per column.
// Column c's compressor takes bit c of the seven rows plus cin1/cin2 from the
// cout1/cout2 of column c-1 (0 into column 0). Its sum is bit c of sum_row,
// its carry is bit c+1 of carry_row. cout1/cout2 and carry of the top column
// are dropped: results are modulo 2^W. Since each compressor's cout1 depends
// on its carry inputs, the row contains a carry chain from column 0 upward.
// Because the compressor is approximate, sum_row + carry_row equals the sum
// of the rows only when no column sees more than three 1s. Purely
// combinational. One compressor per column follows the published flow
// (sum and carry per row, carries propagated); W is this design's choice.
module compressor_7_2_row #(
  parameter int W = 32
) (
  input  logic [6:0][W-1:0] rows,
  output logic [W-1:0]      sum_row,
  output logic [W-1:0]      carry_row
);
  logic [W:0] ch1, ch2;   // cin1/cin2 chains between columns
  logic [W:0] cy;         // carry outputs, cy[c+1] from column c

  assign ch1[0] = 1'b0;
  assign ch2[0] = 1'b0;
  assign cy[0]  = 1'b0;

  for (genvar c = 0; c < W; c++) begin : g_col
    logic [6:0] col;
    for (genvar r = 0; r < 7; r++) begin : g_row
      assign col[r] = rows[r][c];
    end
    compressor_7_2 u_c72 (
      .x(col), .cin1(ch1[c]), .cin2(ch2[c]),
      .sum(sum_row[c]), .carry(cy[c+1]),
      .cout1(ch1[c+1]), .cout2(ch2[c+1])
    );
  end

  assign carry_row = cy[W-1:0];
endmodule
