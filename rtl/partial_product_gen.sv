// partial_product_gen -- N x N partial-product rows of an unsigned multiply.
//
// Row i is the multiplicand gated by multiplier bit i: pp[i][j] = a[j] & b[i].
// Row i has weight 2^i in the product. These are the rows C0..C7 that the
// hybrid multiplier's adder tree sums; one AND gate per bit, purely
// combinational.
// The rows are named in the published architecture but not defined; the
// AND-row form, with row i gated by b[i], is this design's reading.
//
// Ports: a, b (N bits); pp, N rows of N bits.
module partial_product_gen #(
  parameter int N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp
);

  for (genvar i = 0; i < N; i++) begin : g_row
    assign pp[i] = a & {N{b[i]}};
  end

endmodule
