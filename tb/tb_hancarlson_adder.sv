// tb_hancarlson_adder -- self-checking testbench of hancarlson_adder.
//
// Five instances, at widths 2, 3, 4, 5 and 8 (the default width among them),
// see the low bits of one pair of 8-bit operands and one carry-in. Every
// combination of the 8-bit operands and the carry-in is applied, and each
// instance's {cout, sum} is compared with the integer sum of its slices.
// One vector per clock of a testbench-local clock; a watchdog ends the run
// with a failure if it has not finished after a fixed number of cycles.
module tb_hancarlson_adder;

  localparam int NW = 5;
  localparam int WIDTHS [NW] = '{2, 3, 4, 5, 8};
  localparam int MAX_CYCLES = 140000;

  logic       clk = 1'b0;
  logic [7:0] a, b;
  logic       cin;
  logic [8:0] res [NW];
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  for (genvar k = 0; k < NW; k++) begin : g_dut
    localparam int W = WIDTHS[k];
    logic [W-1:0] s;
    logic         co;
    hancarlson_adder #(.W(W)) dut (.a(a[W-1:0]), .b(b[W-1:0]), .cin(cin), .sum(s), .cout(co));
    assign res[k] = 9'({co, s});
  end

  function automatic logic [8:0] expect_sum(int w, logic [7:0] x, logic [7:0] y, logic c);
    logic [8:0] mask;
    mask = 9'((1 << w) - 1);
    return {1'b0, x & mask[7:0]} + {1'b0, y & mask[7:0]} + 9'(c);
  endfunction

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      @(negedge clk);
      {cin, a, b} = 17'(v);
      @(posedge clk);
      for (int k = 0; k < NW; k++) begin
        checks++;
        if (res[k] !== expect_sum(WIDTHS[k], a, b, cin)) begin
          failures++;
          if (failures < 10)
            $display("FAIL W=%0d a=%h b=%h cin=%b got=%h exp=%h", WIDTHS[k], a, b, cin,
                     res[k], expect_sum(WIDTHS[k], a, b, cin));
        end
      end
    end
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
