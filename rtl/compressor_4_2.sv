// compressor_4_2: exact 4:2 compressor made of two cascaded full adders.
// The first full adder adds a[0..2] (A1..A3); its carry leaves as cout, its
// sum is added to a[3] (A4) and cin by the second full adder, which gives sum
// and carry. Hence a[0]+a[1]+a[2]+a[3]+cin = sum + 2*(carry + cout), and cout
// does not depend on cin, so a row of these compressors does not ripple
// through cout. Structure as in the classic two-full-adder 4:2 compressor;
// taking cout from the first adder's carry is the weight-consistent reading.
// Purely combinational.
module compressor_4_2 (
  input  logic [3:0] a,      // A1..A4, bit 0 = A1
  input  logic       cin,
  output logic       sum,    // weight 1
  output logic       carry,  // weight 2
  output logic       cout    // weight 2
);
  logic s_first;

  full_adder u_fa_first (
    .a(a[0]), .b(a[1]), .c(a[2]),
    .sum(s_first), .carry(cout)
  );

  full_adder u_fa_second (
    .a(s_first), .b(a[3]), .c(cin),
    .sum(sum), .carry(carry)
  );
endmodule
