// csel_mux -- W-bit 2:1 multiplexer of a carry-select group.
//
// y = sel ? d1 : d0. In a group, d0 is the carry-in-0 result {cout, sum},
// d1 the BEC output (the carry-in-1 result) and sel the carry arriving from
// the lower group. Purely combinational.
// The MUX unit is the published architecture's; select polarity follows
// the carry-select rule.
//
// Ports: sel; d0, d1 (W bits); y (W bits).
module csel_mux #(
  parameter int W = 3
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);

  assign y = sel ? d1 : d0;

endmodule
