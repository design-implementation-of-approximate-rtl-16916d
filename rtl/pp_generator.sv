// pp_generator: partial-product array of an N x N unsigned multiplier.
// pp[i][j] = a[j] & b[i], one AND gate per bit; row i carries weight 2^i and
// bit j of the row weight 2^(i+j). Purely combinational. N = 16 is the
// multiplier width of the design; gating rows by b is this design's choice.
module pp_generator #(
  parameter int N = 16
) (
  input  logic [N-1:0]            a,
  input  logic [N-1:0]            b,
  output logic [N-1:0][N-1:0]     pp   // pp[row i][bit j]
);
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        pp[i][j] = a[j] & b[i];
  end
endmodule
