// hybrid_adder8 -- 8-bit hybrid adder.
//
// Two groups. Bits 0-5 are added by the 6-bit hybrid adder. Bits 6-7 form a
// carry-select group: a 2-bit Weinberger lookahead adder with carry-in 0, a
// BEC that adds one to its result, and a MUX that chooses between the two
// with the 6-bit adder's carry-out. The group structure and adder styles
// follow the published architecture; the adder has no carry-in because none
// is drawn for it. Purely combinational.
//
// Ports: a, b (8 bits); sum (8 bits); cout, carry out of bit 7.
module hybrid_adder8
  import hm_pkg::*;
(
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] sum,
  output logic       cout
);

  logic c6;

  hybrid_adder6 u_lo (
    .a(a[5:0]), .b(b[5:0]), .sum(sum[5:0]), .cout(c6));

  csel_group #(.W(2), .KIND(ADD_WEINBERGER)) u_hi (
    .a(a[7:6]), .b(b[7:6]), .cin(c6), .sum(sum[7:6]), .cout(cout));

endmodule
