// csel_group -- one carry-select group of a hybrid adder.
//
// A W-bit adder of the style KIND adds the slice with its carry-in tied to
// 0, giving the (W+1)-bit result {cout0, sum0}. A BEC adds one to that
// result, which is what the same addition gives with carry-in 1. The MUX
// unit picks one of the two with the carry arriving from the lower group,
// so the slice's own addition runs in parallel with the lower groups and
// only the MUX sits on the carry path. Purely combinational.
// The adder/BEC/MUX structure is the published architecture's; wrapping it
// in one module chosen by an adder_kind_e parameter is this design's own.
//
// Ports: a, b (W bits); cin, the carry from the lower group (MUX select);
// sum (W bits); cout, the group's carry-out.
module csel_group
  import hm_pkg::*;
#(
  parameter int          W    = 2,
  parameter adder_kind_e KIND = ADD_LING
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] sum0;
  logic         cout0;
  logic [W:0]   inc;

  if (KIND == ADD_HANCARLSON) begin : g_add
    hancarlson_adder #(.W(W)) u_add (
      .a(a), .b(b), .cin(1'b0), .sum(sum0), .cout(cout0));
  end else if (KIND == ADD_LING) begin : g_add
    ling_adder #(.W(W)) u_add (
      .a(a), .b(b), .cin(1'b0), .sum(sum0), .cout(cout0));
  end else if (KIND == ADD_WEINBERGER) begin : g_add
    weinberger_adder #(.W(W)) u_add (
      .a(a), .b(b), .cin(1'b0), .sum(sum0), .cout(cout0));
  end else begin : g_add
    ripple_carry_adder #(.W(W)) u_add (
      .a(a), .b(b), .cin(1'b0), .sum(sum0), .cout(cout0));
  end

  bec #(.W(W+1)) u_bec (
    .din ({cout0, sum0}),
    .dout(inc));

  csel_mux #(.W(W+1)) u_mux (
    .sel(cin),
    .d0 ({cout0, sum0}),
    .d1 (inc),
    .y  ({cout, sum}));

endmodule
