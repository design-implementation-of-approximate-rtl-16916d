// c72_model_pkg: reference models for the testbenches, written at the level
// of bit counts rather than gates.
//   c42_model : exact 4:2 compressor, the first three inputs are counted
//               first (their count's upper bit is cout), then the low bit of
//               that count plus A4 and cin give carry/sum.
//   c72_model : the modified 7:2 compressor, same wiring as the design.
//   row_model : one row of 7:2 compressors over W = 2N columns.
//   mult_model: the full approximate product (compressor rows, then the
//               leftover partial-product rows, summed exactly).
package c72_model_pkg;

  typedef struct packed {
    logic sum;
    logic carry;
    logic cout;
  } c42_t;

  typedef struct packed {
    logic sum;
    logic carry;
    logic cout1;
    logic cout2;
  } c72_t;

  function automatic c42_t c42_model(logic [3:0] a, logic cin);
    c42_t r;
    int t, u;
    t = int'(a[0]) + int'(a[1]) + int'(a[2]);
    r.cout  = t[1];
    u = int'(t[0]) + int'(a[3]) + int'(cin);
    r.carry = u[1];
    r.sum   = u[0];
    return r;
  endfunction

  function automatic c72_t c72_model(logic [6:0] x, logic cin1, logic cin2);
    c42_t l, rr;
    c72_t o;
    int ha, up, lo;
    l  = c42_model(x[3:0], cin1);
    rr = c42_model({1'b0, x[6:4]}, cin2);
    ha = int'(l.cout) + int'(rr.cout);
    o.cout2 = ha[0];
    up = int'(l.carry) + int'(rr.carry) + int'(ha[1]);
    o.cout1 = up[0];
    lo = int'(l.sum) + int'(rr.sum) + int'(up[1]);
    o.sum   = lo[0];
    o.carry = lo[1];
    return o;
  endfunction

  // Sum and carry rows of a 7:2 compressor row over 64 columns at most.
  function automatic void row_model(input logic [6:0][63:0] rows, input int w,
                                    output logic [63:0] s, output logic [63:0] cy);
    logic ci1, ci2;
    c72_t o;
    logic [6:0] col;
    ci1 = 1'b0;
    ci2 = 1'b0;
    s  = '0;
    cy = '0;
    for (int c = 0; c < w; c++) begin
      for (int r = 0; r < 7; r++) col[r] = rows[r][c];
      o = c72_model(col, ci1, ci2);
      s[c] = o.sum;
      if (c + 1 < w) cy[c+1] = o.carry;
      ci1 = o.cout1;
      ci2 = o.cout2;
    end
  endfunction

  // Approximate product of the multiplier, n <= 32.
  function automatic logic [63:0] mult_model(logic [31:0] a, logic [31:0] b, int n);
    logic [63:0] acc, s, cy, mask;
    logic [6:0][63:0] grp;
    int ngrp;
    mask = (n >= 32) ? '1 : ((64'd1 << (2 * n)) - 1);
    ngrp = n / 7;
    acc = '0;
    for (int g = 0; g < ngrp; g++) begin
      for (int r = 0; r < 7; r++)
        grp[r] = b[7*g+r] ? (64'(a) << (7*g + r)) : 64'd0;
      row_model(grp, 2 * n, s, cy);
      acc += s + cy;
    end
    for (int q = 7 * ngrp; q < n; q++)
      if (b[q]) acc += 64'(a) << q;
    return acc & mask;
  endfunction

endpackage
