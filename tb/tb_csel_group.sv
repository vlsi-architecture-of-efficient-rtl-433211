// tb_csel_group -- self-checking testbench of csel_group.
//
// One instance for each group configuration the hybrid adders use
// (Ling 2, Weinberger 2, Ling 4, Weinberger 3, Han-Carlson 4, Ling 5) plus
// a ripple-carry group. All see the low bits of one pair of 5-bit operands
// and one carry-in; every combination is applied and each {cout, sum} is
// compared with the integer sum of its slices and the carry-in. The test
// also counts how often each group took the BEC path (carry-in 1) and the
// direct path. One vector per clock; a watchdog ends the run with a failure
// after a fixed number of cycles.
module tb_csel_group;
  import hm_pkg::*;

  localparam int NG = 7;
  localparam int          WIDTHS [NG] = '{2, 2, 4, 3, 4, 5, 3};
  localparam adder_kind_e KINDS  [NG] = '{ADD_LING, ADD_WEINBERGER, ADD_LING,
                                          ADD_WEINBERGER, ADD_HANCARLSON,
                                          ADD_LING, ADD_RCA};
  localparam int MAX_CYCLES = 5000;

  logic       clk = 1'b0;
  logic [4:0] a, b;
  logic       cin;
  logic [5:0] res [NG];
  int checks = 0;
  int failures = 0;
  int bec_path = 0;
  int direct_path = 0;

  always #5 clk = ~clk;

  for (genvar k = 0; k < NG; k++) begin : g_dut
    localparam int W = WIDTHS[k];
    logic [W-1:0] s;
    logic         co;
    csel_group #(.W(W), .KIND(KINDS[k])) dut (
      .a(a[W-1:0]), .b(b[W-1:0]), .cin(cin), .sum(s), .cout(co));
    assign res[k] = 6'({co, s});
  end

  function automatic logic [5:0] expect_sum(int w, logic [4:0] x, logic [4:0] y, logic c);
    logic [5:0] mask;
    mask = 6'((1 << w) - 1);
    return {1'b0, x & mask[4:0]} + {1'b0, y & mask[4:0]} + 6'(c);
  endfunction

  initial begin
    for (int v = 0; v < (1 << 11); v++) begin
      @(negedge clk);
      {cin, a, b} = 11'(v);
      @(posedge clk);
      if (cin) bec_path++;
      else     direct_path++;
      for (int k = 0; k < NG; k++) begin
        checks++;
        if (res[k] !== expect_sum(WIDTHS[k], a, b, cin)) begin
          failures++;
          if (failures < 10)
            $display("FAIL group %0d a=%h b=%h cin=%b got=%h exp=%h", k, a, b, cin,
                     res[k], expect_sum(WIDTHS[k], a, b, cin));
        end
      end
    end
    $display("BEC path taken %0d times, direct path %0d times", bec_path, direct_path);
    if (bec_path == 0 || direct_path == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
