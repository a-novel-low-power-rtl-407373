// pp_gen: partial-product generator of an N x N unsigned multiplier.
//
// One AND gate per bit pair: pp[j][i] = x[i] & y[j], which carries weight
// 2^(i+j). Row j is the multiplicand x gated by multiplier bit y[j].
// Combinational; N*N AND gates. N defaults to 4 (the 4x4 multiplier).
module pp_gen #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]         x,   // multiplicand
  input  logic [N-1:0]         y,   // multiplier
  output logic [N-1:0][N-1:0]  pp   // pp[j][i] = x[i] & y[j]
);
  always_comb begin
    for (int unsigned j = 0; j < N; j++)
      pp[j] = x & {N{y[j]}};
  end
endmodule
