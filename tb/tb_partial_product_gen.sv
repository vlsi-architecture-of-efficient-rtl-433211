// tb_partial_product_gen -- self-checking testbench of partial_product_gen.
//
// The default 8 x 8 generator gets every pair of operands. Each row i is
// compared with a when b[i] is 1 and with zero otherwise, and the rows
// weighted by 2^i must add up to a * b. One vector per clock; a watchdog
// ends the run with a failure after a fixed number of cycles.
module tb_partial_product_gen;

  localparam int MAX_CYCLES = 70000;

  logic            clk = 1'b0;
  logic [7:0]      a, b;
  logic [7:0][7:0] pp;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  partial_product_gen dut (.a(a), .b(b), .pp(pp));

  initial begin
    for (int v = 0; v < (1 << 16); v++) begin
      int total;
      @(negedge clk);
      {a, b} = 16'(v);
      @(posedge clk);
      total = 0;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (pp[i] !== (b[i] ? a : 8'h00)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h row %0d = %h", a, b, i, pp[i]);
        end
        total += int'(pp[i]) << i;
      end
      checks++;
      if (total != int'(a) * int'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h rows sum to %0d", a, b, total);
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
