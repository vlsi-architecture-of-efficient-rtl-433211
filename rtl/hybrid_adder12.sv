// hybrid_adder12 -- 12-bit hybrid adder.
//
// Two groups. Bits 0-7 are added by the 8-bit hybrid adder. Bits 8-11 form a
// carry-select group: a 4-bit Ling adder with carry-in 0, a BEC that adds
// one to its result, and a MUX that chooses between the two with the 8-bit
// adder's carry-out. The group structure and adder styles follow the
// published architecture; the adder has no carry-in because none is drawn
// for it. Purely combinational.
//
// Ports: a, b (12 bits); sum (12 bits); cout, carry out of bit 11.
module hybrid_adder12
  import hm_pkg::*;
(
  input  logic [11:0] a,
  input  logic [11:0] b,
  output logic [11:0] sum,
  output logic        cout
);

  logic c8;

  hybrid_adder8 u_lo (
    .a(a[7:0]), .b(b[7:0]), .sum(sum[7:0]), .cout(c8));

  csel_group #(.W(4), .KIND(ADD_LING)) u_hi (
    .a(a[11:8]), .b(b[11:8]), .cin(c8), .sum(sum[11:8]), .cout(cout));

endmodule
