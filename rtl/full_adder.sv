// full_adder: one-bit full adder (3:2 counter).
// a + b + c = sum + 2*carry. It is the basic cell of the 4:2 and 7:2
// compressors, of the Dadda reduction stages and of the final ripple-carry
// adder. Purely combinational; the sum/majority equations are the usual ones,
// the gate-level form is this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b ^ c;
    carry = (a & b) | (a & c) | (b & c);
  end
endmodule
