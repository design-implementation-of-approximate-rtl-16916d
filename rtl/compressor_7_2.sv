// compressor_7_2: modified (approximate) 7:2 compressor.
// Built from two 4:2 compressors, one half adder and two full adders instead
// of the five cascaded full adders of an exact 7:2 compressor.
//   left 4:2  : x1..x4 and cin1          -> ls, lc, lo (sum, carry, cout)
//   right 4:2 : x5..x7 (A4 = 0) and cin2 -> rs, rc, ro
//   half adder: lo, ro        -> sum = cout2, carry feeds the upper FA
//   upper FA  : lc, rc, ha carry -> sum = cout1, carry feeds the lower FA
//   lower FA  : ls, rs, upper-FA carry -> sum, carry
// Interface weights: sum has weight 1; carry, cout1 and cout2 have weight 2.
// cout1/cout2 go to cin1/cin2 of the compressor one column up; carry goes to
// the next column as a row bit. Nine inputs cannot be counted exactly in
// 1+2+2+2, so the result x1+..+x7+cin1+cin2 = sum + 2*(carry+cout1+cout2) holds
// whenever at most three of the nine inputs are 1 and is approximate above
// that (186 of the 512 input patterns give a wrong count, worst error 5).
// The adder blocks and the wires between them follow the published block
// diagram; which output port each wire leaves from is not labelled there and
// is this design's choice (both 4:2 compressors wired alike, low error).
// Note cout1 depends on cin1/cin2, so a compressor row has a carry chain.
// Purely combinational.
module compressor_7_2 (
  input  logic [6:0] x,      // x1..x7, bit 0 = x1
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,    // weight 1
  output logic       carry,  // weight 2
  output logic       cout1,  // weight 2
  output logic       cout2   // weight 2
);
  logic ls, lc, lo;
  logic rs, rc, ro;
  logic ha_c, fa_up_c;

  compressor_4_2 u_c42_left (
    .a(x[3:0]), .cin(cin1),
    .sum(ls), .carry(lc), .cout(lo)
  );

  compressor_4_2 u_c42_right (
    .a({1'b0, x[6:4]}), .cin(cin2),
    .sum(rs), .carry(rc), .cout(ro)
  );

  half_adder u_ha (
    .a(lo), .b(ro),
    .sum(cout2), .carry(ha_c)
  );

  full_adder u_fa_upper (
    .a(lc), .b(rc), .c(ha_c),
    .sum(cout1), .carry(fa_up_c)
  );

  full_adder u_fa_lower (
    .a(ls), .b(rs), .c(fa_up_c),
    .sum(sum), .carry(carry)
  );
endmodule
