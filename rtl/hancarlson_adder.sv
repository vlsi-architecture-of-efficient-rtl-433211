// hancarlson_adder -- W-bit Han-Carlson parallel-prefix adder.
//
// Bit generate g = a&b and propagate p = a^b are combined by the prefix
// operator (G,P) o (G',P') = (G | P&G', P&P') in three phases:
//   1. every odd bit i combines with bit i-1;
//   2. a Kogge-Stone tree over the odd bits only, distances 2, 4, 8, ...;
//   3. every even bit i >= 2 combines with the finished odd bit i-1.
// Afterwards each position i holds the group generate G[i:0], which is the
// carry into bit i+1. The carry-in is folded into bit 0 as g0 | p0&cin.
// sum[i] = p[i] ^ carry[i]; cout is G[W-1:0]. Purely combinational.
// The hybrid adders use it at W = 4 with cin tied to 0.
// The Han-Carlson style for these groups is the published architecture's;
// the exact prefix network is the standard one, chosen by this design.
//
// Ports: a, b (W bits), cin; sum (W bits), cout.
module hancarlson_adder #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  if (W < 2) begin : g_check
    $error("hancarlson_adder needs W >= 2");
  end

  logic [W-1:0] g, p;
  logic [W-1:0] gpre;   // G[i:0] after all prefix phases

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    logic [W-1:0] gl, pl, gn, pn;
    gl = g;
    pl = p;
    gl[0] = g[0] | (p[0] & cin);
    // phase 1: odd bits absorb their even neighbour
    gn = gl;
    pn = pl;
    for (int i = 1; i < W; i += 2) begin
      gn[i] = gl[i] | (pl[i] & gl[i-1]);
      pn[i] = pl[i] & pl[i-1];
    end
    gl = gn;
    pl = pn;
    // phase 2: Kogge-Stone over the odd bits
    for (int d = 2; d < W; d *= 2) begin
      gn = gl;
      pn = pl;
      for (int i = 1; i < W; i += 2) begin
        if (i - d >= 1) begin
          gn[i] = gl[i] | (pl[i] & gl[i-d]);
          pn[i] = pl[i] & pl[i-d];
        end
      end
      gl = gn;
      pl = pn;
    end
    // phase 3: even bits take the prefix of the odd bit below
    gn = gl;
    for (int i = 2; i < W; i += 2) begin
      gn[i] = gl[i] | (pl[i] & gl[i-1]);
    end
    gpre = gn;
  end

  assign sum  = p ^ {gpre[W-2:0], cin};
  assign cout = gpre[W-1];

endmodule
