// ripple_carry_adder: W-bit carry-propagate adder, a chain of full adders.
// Adds the two rows left by the Dadda reduction: s = (x + y) mod 2^W. Bit k's
// full adder takes x[k], y[k] and the carry of bit k-1 (0 into bit 0); the
// top carry is dropped. Purely combinational, delay linear in W. The final
// adder being a ripple chain follows the published critical paths; the width
// is this design's choice (2N for an N-bit multiplier).
module ripple_carry_adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);
  logic [W:0] c;

  assign c[0] = 1'b0;

  for (genvar k = 0; k < W; k++) begin : g_bit
    full_adder u_fa (
      .a(x[k]), .b(y[k]), .c(c[k]),
      .sum(s[k]), .carry(c[k+1])
    );
  end
endmodule
