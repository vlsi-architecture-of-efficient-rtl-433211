// bec -- W-bit Binary to Excess-1 Converter.
//
// Produces din + 1 without an adder: bit 0 is inverted and every higher bit
// is flipped when all bits below it are 1,
//   dout[0] = ~din[0],  dout[i] = din[i] ^ (din[i-1] & ... & din[0]).
// In a carry-select group it turns the carry-in-0 result {cout, sum} into
// the carry-in-1 result, so W is the group width plus one. The count wraps
// at 2^W, which never happens in a group because a W-1 bit add with
// carry-in 1 always fits in W bits. Purely combinational.
// The BEC itself is the published architecture's; its width (group width
// plus one, so the carry is incremented too) is this design's choice.
//
// Ports: din (W bits); dout (W bits).
module bec #(
  parameter int W = 3
) (
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  always_comb begin
    logic all_ones;
    all_ones = 1'b1;
    for (int i = 0; i < W; i++) begin
      dout[i]  = din[i] ^ all_ones;
      all_ones = all_ones & din[i];
    end
  end

endmodule
