// weinberger_adder -- W-bit Weinberger carry-lookahead adder.
//
// The carries are not rippled: each is expanded from the Weinberger
// recurrence c[i+1] = g[i] | p[i]&c[i] into its full lookahead form
//   c[i+1] = g[i] | p[i]g[i-1] | p[i]p[i-1]g[i-2] | ... | p[i]...p[0]cin
// with g = a&b and p = a^b, so all carries are produced in parallel in two
// logic levels. sum[i] = p[i] ^ c[i]. Purely combinational. The hybrid
// adders use it at W = 2 and W = 3 with cin tied to 0, where the whole
// adder is a single lookahead group.
// The Weinberger style for these groups is the published architecture's;
// the single-group full-lookahead form is this design's choice.
//
// Ports: a, b (W bits), cin; sum (W bits), cout.
module weinberger_adder #(
  parameter int W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    c[0] = cin;
    for (int i = 0; i < W; i++) begin
      logic cc, run;
      cc  = g[i];
      run = p[i];
      for (int j = i - 1; j >= 0; j--) begin
        cc  = cc | (run & g[j]);
        run = run & p[j];
      end
      c[i+1] = cc | (run & cin);
    end
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];

endmodule
