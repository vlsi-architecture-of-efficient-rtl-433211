// tb_bec -- self-checking testbench of bec.
//
// Instances at the default width 3 and at 6, the widest converter in the
// design, see the low bits of one 6-bit value. Every value is applied and
// each output is compared with the input plus one, modulo 2^W. One vector
// per clock; a watchdog ends the run with a failure after a fixed number of
// cycles.
module tb_bec;

  localparam int MAX_CYCLES = 1000;

  logic       clk = 1'b0;
  logic [5:0] din;
  logic [2:0] d3;
  logic [5:0] d6;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  bec dut3 (.din(din[2:0]), .dout(d3));
  bec #(.W(6)) dut6 (.din(din), .dout(d6));

  initial begin
    for (int v = 0; v < 64; v++) begin
      @(negedge clk);
      din = 6'(v);
      @(posedge clk);
      checks += 2;
      if (d3 !== 3'(din[2:0] + 3'd1)) begin
        failures++;
        $display("FAIL W=3 din=%h got=%h", din[2:0], d3);
      end
      if (d6 !== 6'(din + 6'd1)) begin
        failures++;
        $display("FAIL W=6 din=%h got=%h", din, d6);
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
