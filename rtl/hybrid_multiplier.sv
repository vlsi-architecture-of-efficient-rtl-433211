// hybrid_multiplier -- 8 x 8 unsigned multiplier summed by hybrid adders.
//
// The eight partial-product rows C0..C7 (Ci = A gated by B[i]) are summed in
// a three-stage tree of hybrid adders, pairing neighbours at each stage:
//
//   stage 1  four 8-bit hybrid adders. Pair k adds C(2k+1) to C(2k) shifted
//            right by one, {0, C(2k)[7:1]}. C(2k)[0] needs no addition and is
//            appended below the 9-bit {carry, sum}, giving the 10-bit pair
//            value C(2k+1)*2 + C(2k).
//   stage 2  two 12-bit hybrid adders. Each adds the upper pair shifted left
//            by two, {pair, 00}, to the lower pair zero-extended, {00, pair}.
//            The 12-bit sum is C(4j+3..4j) weighted 8, 4, 2, 1; it never
//            exceeds 3825, so the 12-bit adder's carry-out is always 0.
//   stage 3  one 16-bit hybrid adder adds {upper quad, 0000} and
//            {0000, lower quad} with carry-in 0. Its sum is the product
//            P[15:0]; its carry-out is always 0 because 255 * 255 < 2^16.
//
// The two always-zero carry-outs are left unconnected on purpose: the
// operand alignment guarantees them to be zero. The tree, its adder widths
// and the operand alignment follow the published architecture; the unsigned
// operands, the orientation of the rows (a row is A gated by one bit of B)
// and the absence of registers are this design's reading of it.
// Purely combinational: P settles one adder-tree delay after A and B.
//
// Ports: a, b (8 bits, unsigned); p (16 bits), the product a * b.
module hybrid_multiplier (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  logic [7:0][7:0] c;        // partial-product rows C0..C7
  logic [3:0][9:0] pair;     // C(2k+1)*2 + C(2k)
  logic [1:0][11:0] quad;    // C(4j+3..4j) summed with weights 8,4,2,1
  logic [1:0]       quad_cout;
  logic             p_cout;

  partial_product_gen #(.N(8)) u_pp (
    .a (a),
    .b (b),
    .pp(c));

  // stage 1
  for (genvar k = 0; k < 4; k++) begin : g_stage1
    logic [7:0] s;
    logic       co;
    hybrid_adder8 u_add8 (
      .a   (c[2*k+1]),
      .b   ({1'b0, c[2*k][7:1]}),
      .sum (s),
      .cout(co));
    assign pair[k] = {co, s, c[2*k][0]};
  end

  // stage 2
  for (genvar j = 0; j < 2; j++) begin : g_stage2
    hybrid_adder12 u_add12 (
      .a   ({pair[2*j+1], 2'b00}),
      .b   ({2'b00, pair[2*j]}),
      .sum (quad[j]),
      .cout(quad_cout[j]));
  end

  // stage 3
  hybrid_adder16 u_add16 (
    .a   ({quad[1], 4'b0000}),
    .b   ({4'b0000, quad[0]}),
    .cin (1'b0),
    .sum (p),
    .cout(p_cout));

endmodule
