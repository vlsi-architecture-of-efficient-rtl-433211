// ling_adder -- W-bit Ling adder.
//
// Instead of the carry c[i+1] = g[i] | t[i]&c[i] (t = a|b) the adder forms
// the Ling pseudo-carry h[i] = g[i] | c[i], so that c[i+1] = t[i] & h[i].
// Because g[j] already implies t[j], the pseudo-carry expands into a flat
// sum of products with one transmit term fewer per product than the carry:
//   h[i] = g[i] | g[i-1] | t[i-1]g[i-2] | t[i-1]t[i-2]g[i-3] | ...
//          | t[i-1]...t[0]cin
// Every h[i] is computed directly from the inputs (two logic levels), and
// the true carry is recovered only where a sum bit needs it:
// sum[i] = (a[i]^b[i]) ^ t[i-1]&h[i-1], cout = t[W-1]&h[W-1].
// Purely combinational. The hybrid adders use it at W = 2, 4 and 5 with cin
// tied to 0.
// The Ling style for these groups is the published architecture's; the
// flat sum-of-products form of the pseudo-carries is this design's choice.
//
// Ports: a, b (W bits), cin; sum (W bits), cout.
module ling_adder #(
  parameter int W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g, t, p, h;
  logic [W:0]   c;

  assign g = a & b;
  assign t = a | b;
  assign p = a ^ b;

  // pseudo-carries, each as a flat sum of products
  always_comb begin
    for (int i = 0; i < W; i++) begin
      logic run;
      h[i] = g[i];
      run  = 1'b1;
      for (int j = i - 1; j >= 0; j--) begin
        h[i] = h[i] | (run & g[j]);
        run  = run & t[j];
      end
      h[i] = h[i] | (run & cin);
    end
  end

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_carry
    assign c[i+1] = t[i] & h[i];
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];

endmodule
