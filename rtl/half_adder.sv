// half_adder: one-bit half adder (2:2 counter).
// a + b = sum + 2*carry. Used by the modified 7:2 compressor and by the Dadda
// stages where a column needs to lose exactly one bit. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
