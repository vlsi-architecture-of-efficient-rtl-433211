// ripple_carry_adder -- W-bit ripple-carry adder.
//
// A chain of full adders: bit i forms sum[i] = a[i] ^ b[i] ^ c[i] and passes
// c[i+1] = a[i]&b[i] | (a[i]^b[i])&c[i] to the next bit, with c[0] = cin.
// The 16-bit hybrid adder uses two 2-bit instances for its lowest groups,
// the first taking the adder's carry-in and the second the first's carry-out.
// Purely combinational.
// The 2-bit ripple groups are the published architecture's; the full-adder
// equations are the standard ones.
//
// Ports: a, b (W bits), cin; sum (W bits), cout.
module ripple_carry_adder #(
  parameter int W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  always_comb begin
    logic c;
    c = cin;
    for (int i = 0; i < W; i++) begin
      sum[i] = a[i] ^ b[i] ^ c;
      c      = (a[i] & b[i]) | ((a[i] ^ b[i]) & c);
    end
    cout = c;
  end

endmodule
