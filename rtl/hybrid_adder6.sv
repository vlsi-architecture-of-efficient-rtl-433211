// hybrid_adder6 -- 6-bit hybrid adder.
//
// Two groups. Bits 0-3 are added by a 4-bit Han-Carlson prefix adder with no
// carry-in. Bits 4-5 form a carry-select group: a 2-bit Ling adder with
// carry-in 0, a BEC that adds one to its result, and a MUX that chooses
// between the two with the Han-Carlson carry-out. The group structure and
// adder styles follow the published architecture; the adder has no
// carry-in because none is drawn for it.
// Purely combinational.
//
// Ports: a, b (6 bits); sum (6 bits); cout, carry out of bit 5.
module hybrid_adder6
  import hm_pkg::*;
(
  input  logic [5:0] a,
  input  logic [5:0] b,
  output logic [5:0] sum,
  output logic       cout
);

  logic c4;

  hancarlson_adder #(.W(4)) u_lo (
    .a(a[3:0]), .b(b[3:0]), .cin(1'b0), .sum(sum[3:0]), .cout(c4));

  csel_group #(.W(2), .KIND(ADD_LING)) u_hi (
    .a(a[5:4]), .b(b[5:4]), .cin(c4), .sum(sum[5:4]), .cout(cout));

endmodule
