// dadda_reducer: Dadda reduction of a weighted bit matrix to two rows.
// Input: ROWS operand rows of W bits, each already placed at its column.
// ROW_MASK marks the row bits that can be non-zero; masked-off bits are left
// out so that no adder is spent on constant zeros (this is how the triangular
// or staircase shape of the matrix is described). Output: two rows whose sum
// equals the sum of the input rows modulo 2^W.
//
// Method (classic Dadda): the height limits are d1 = 2, d(k+1) = floor(1.5*dk)
// i.e. 2, 3, 4, 6, 9, 13, 19, ... One stage is built for every limit below
// the tallest input column, largest first. In a stage, each column c, with
// height h(c) and k(c) carries arriving from the column below, gets
// e = h(c)+k(c)-d excess bits removed by e/2 full adders and (e mod 2) half
// adders, or no adder if e <= 0. The counter counts and the wiring are
// computed at elaboration time by the constant function dadda_info().
// Order of the bits in a column after a stage: full-adder sums, half-adder
// sums, carries from the column below, then bits passed through unchanged.
// Carries out of column W-1 are dropped.
//
// Purely combinational. The staging rule follows the Dadda method of the
// design; the bit order inside a column and the mask are this design's own.
module dadda_reducer #(
  parameter int                        W        = 32,
  parameter int                        ROWS     = 6,
  parameter logic [ROWS-1:0][W-1:0]    ROW_MASK = '1
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           row_a,
  output logic [W-1:0]           row_b
);
  localparam int MAXH = (ROWS < 2) ? 2 : ROWS;

  // Height of column c of the input matrix.
  function automatic int col_height0(int c);
    int n = 0;
    for (int r = 0; r < ROWS; r++) n += int'(ROW_MASK[r][c]);
    return n;
  endfunction

  // Slot of row r inside column c of the input matrix.
  function automatic int slot0(int r, int c);
    int n = 0;
    for (int q = 0; q < r; q++) n += int'(ROW_MASK[q][c]);
    return n;
  endfunction

  // k-th Dadda height limit: 2, 3, 4, 6, 9, ...
  function automatic int dadda_limit(int k);
    int d = 2;
    for (int i = 0; i < k; i++) d = (d * 3) / 2;
    return d;
  endfunction

  function automatic int max_height();
    int m = 0;
    for (int c = 0; c < W; c++) if (col_height0(c) > m) m = col_height0(c);
    return m;
  endfunction

  // Number of reduction stages: how many limits lie below the tallest column.
  function automatic int num_stages();
    int n = 0;
    while (dadda_limit(n) < max_height()) n++;
    return n;
  endfunction

  localparam int NS = num_stages();

  // what = 0: height of column c entering stage s (s = NS gives the result)
  // what = 1: full adders of column c in stage s
  // what = 2: half adders of column c in stage s
  function automatic int dadda_info(int what, int s, int c);
    int h[W];
    int nf[W];
    int nh[W];
    int d, tot, ex, cin;
    for (int i = 0; i < W; i++) h[i] = col_height0(i);
    for (int st = 0; st <= s; st++) begin
      d = dadda_limit(NS - 1 - st);
      for (int i = 0; i < W; i++) begin
        cin = (i == 0) ? 0 : nf[i-1] + nh[i-1];
        tot = h[i] + cin;
        ex  = tot - d;
        if (st >= NS || ex <= 0) begin
          nf[i] = 0;
          nh[i] = 0;
        end else begin
          nf[i] = ex / 2;
          nh[i] = ex % 2;
        end
      end
      if (st == s) begin
        if (what == 0) return h[c];
        if (what == 1) return nf[c];
        return nh[c];
      end
      for (int i = 0; i < W; i++) begin
        cin = (i == 0) ? 0 : nf[i-1] + nh[i-1];
        h[i] = h[i] + cin - 2 * nf[i] - nh[i];
      end
    end
    return 0;
  endfunction

  // m[s][c][k]: bit k of column c entering stage s.
  wire [NS:0][W-1:0][MAXH-1:0] m;

  // Stage 0: compact the unmasked row bits of every column.
  for (genvar c = 0; c < W; c++) begin : g_in
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      if (ROW_MASK[r][c]) begin : g_used
        assign m[0][c][slot0(r, c)] = rows[r][c];
      end
    end
    for (genvar k = col_height0(c); k < MAXH; k++) begin : g_zero
      assign m[0][c][k] = 1'b0;
    end
  end

  for (genvar s = 0; s < NS; s++) begin : g_stage
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int H  = dadda_info(0, s, c);
      localparam int F  = dadda_info(1, s, c);
      localparam int HA = dadda_info(2, s, c);
      localparam int FP = (c == 0) ? 0 : dadda_info(1, s, c - 1);
      localparam int HP = (c == 0) ? 0 : dadda_info(2, s, c - 1);
      // where this column's carries land in column c+1
      localparam int CBASE = (c == W - 1) ? 0 :
                             dadda_info(1, s, c + 1) + dadda_info(2, s, c + 1);
      localparam int HNEXT = dadda_info(0, s + 1, c);

      for (genvar k = 0; k < F; k++) begin : g_fa
        logic cy;
        full_adder u_fa (
          .a(m[s][c][3*k]), .b(m[s][c][3*k+1]), .c(m[s][c][3*k+2]),
          .sum(m[s+1][c][k]), .carry(cy)
        );
        if (c < W - 1) begin : g_cy
          assign m[s+1][c+1][CBASE + k] = cy;
        end
      end

      for (genvar k = 0; k < HA; k++) begin : g_ha
        logic cy;
        half_adder u_ha (
          .a(m[s][c][3*F+2*k]), .b(m[s][c][3*F+2*k+1]),
          .sum(m[s+1][c][F+k]), .carry(cy)
        );
        if (c < W - 1) begin : g_cy
          assign m[s+1][c+1][CBASE + F + k] = cy;
        end
      end

      for (genvar k = 0; k < H - 3*F - 2*HA; k++) begin : g_pass
        assign m[s+1][c][F + HA + FP + HP + k] = m[s][c][3*F + 2*HA + k];
      end

      for (genvar k = HNEXT; k < MAXH; k++) begin : g_zero
        assign m[s+1][c][k] = 1'b0;
      end
    end
  end

  always_comb begin
    for (int c = 0; c < W; c++) begin
      row_a[c] = m[NS][c][0];
      row_b[c] = m[NS][c][1];
    end
  end
endmodule
