// pp_gen: partial-product generator of an N x N unsigned multiplier.
//
// One AND gate per bit pair: pp[i][j] = b[i] & a[j], with weight 2^(i+j).
// Row pp[i] is therefore the multiplicand a masked by multiplier bit b[i];
// column k of the partial-product matrix holds the bits with i + j == k.
// Forming every partial product with its own AND gate is as specified for
// the multiplier. Purely combinational. N defaults to 8, the main
// multiplier's width.
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp
);
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_bit
      assign pp[i][j] = b[i] & a[j];
    end
  end
endmodule
