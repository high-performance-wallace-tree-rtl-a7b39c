// pp_gen: partial-product generator of an N x N unsigned multiplier.
//
// Forms the N*N partial-product bits pp[i][j] = x[j] & y[i] (written XjYi in the
// dot diagrams), the first of the three steps of a Wallace multiplier. Bit
// pp[i][j] has weight 2^(i+j): row i is x shifted left by i and gated by y[i].
// AND gating of unsigned operands is this design's reading; the operands are
// treated as unsigned since no sign handling is described.
//
// Interface: x, y are N-bit operands; pp is an N x N packed array indexed
// [row i][column j]. Purely combinational.
module pp_gen #(
  parameter int N = 8
) (
  input  logic [N-1:0]         x,
  input  logic [N-1:0]         y,
  output logic [N-1:0][N-1:0]  pp
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = x & {N{y[i]}};
    end
  end

endmodule
