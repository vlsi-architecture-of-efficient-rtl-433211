// hybrid_adder16 -- 16-bit hybrid square-root carry-select adder.
//
// Five groups whose widths grow towards the top (2, 2, 3, 4, 5 bits), so
// that each carry-select group finishes its own addition at about the time
// the carry from below arrives:
//   bits 0-1    2-bit ripple-carry adder, carry-in cin
//   bits 2-3    2-bit ripple-carry adder, carry-in from bits 0-1
//   bits 4-6    3-bit Weinberger adder + BEC + MUX
//   bits 7-10   4-bit Han-Carlson adder + BEC + MUX
//   bits 11-15  5-bit Ling adder + BEC + MUX
// In each carry-select group the adder works with carry-in 0, the BEC adds
// one to its result and the MUX picks one with the carry from the group
// below. The groups and adder styles follow the published architecture.
// Purely combinational.
//
// Ports: a, b (16 bits); cin; sum (16 bits); cout, carry out of bit 15.
module hybrid_adder16
  import hm_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);

  logic c2, c4, c7, c11;

  ripple_carry_adder #(.W(2)) u_g0 (
    .a(a[1:0]), .b(b[1:0]), .cin(cin), .sum(sum[1:0]), .cout(c2));

  ripple_carry_adder #(.W(2)) u_g1 (
    .a(a[3:2]), .b(b[3:2]), .cin(c2), .sum(sum[3:2]), .cout(c4));

  csel_group #(.W(3), .KIND(ADD_WEINBERGER)) u_g2 (
    .a(a[6:4]), .b(b[6:4]), .cin(c4), .sum(sum[6:4]), .cout(c7));

  csel_group #(.W(4), .KIND(ADD_HANCARLSON)) u_g3 (
    .a(a[10:7]), .b(b[10:7]), .cin(c7), .sum(sum[10:7]), .cout(c11));

  csel_group #(.W(5), .KIND(ADD_LING)) u_g4 (
    .a(a[15:11]), .b(b[15:11]), .cin(c11), .sum(sum[15:11]), .cout(cout));

endmodule
