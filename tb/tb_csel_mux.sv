// tb_csel_mux -- self-checking testbench of csel_mux.
//
// The default 3-bit multiplexer gets every combination of select and both
// data inputs, and its output is compared with the selected input. One
// vector per clock; a watchdog ends the run with a failure after a fixed
// number of cycles.
module tb_csel_mux;

  localparam int MAX_CYCLES = 1000;

  logic       clk = 1'b0;
  logic       sel;
  logic [2:0] d0, d1, y;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  csel_mux dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin
    for (int v = 0; v < 128; v++) begin
      @(negedge clk);
      {sel, d1, d0} = 7'(v);
      @(posedge clk);
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b d0=%h d1=%h y=%h", sel, d0, d1, y);
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
