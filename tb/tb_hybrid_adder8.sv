// tb_hybrid_adder8 -- self-checking testbench of hybrid_adder8.
//
// Every pair of 8-bit operands is applied.
// Each {cout, sum} is compared with the integer sum of the operands. The
// test also works out, from the operands alone, the carry that enters each
// carry-select group (bits 4, 6) and counts how often each group took its
// BEC path; a group whose BEC path was never taken counts as a failure.
// One vector per clock; a watchdog ends the run with a failure after a
// fixed number of cycles.
module tb_hybrid_adder8;

  localparam int W = 8;
  localparam int NVEC = 65536;
  localparam int NB = 2;
  localparam int BOUNDS [NB] = '{4, 6};
  localparam int MAX_CYCLES = NVEC + 1000;

  logic         clk = 1'b0;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0;
  int failures = 0;
  int bec_taken [NB];

  always #5 clk = ~clk;

  hybrid_adder8 dut (.a(a), .b(b), .sum(sum), .cout(cout));

  function automatic logic carry_into(int k, logic [W-1:0] x, logic [W-1:0] y, logic c);
    longint mask;
    mask = (longint'(1) << k) - 1;
    return ((longint'(x) & mask) + (longint'(y) & mask) + longint'(c)) >> k != 0;
  endfunction

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y, logic c);
    longint expv;
    @(negedge clk);
    a = x;
    b = y;
    cin = c;
    @(posedge clk);
    expv = longint'(x) + longint'(y) + longint'(c);
    checks++;
    if ({cout, sum} !== (W+1)'(expv)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b got=%h exp=%h", x, y, c, {cout, sum}, expv);
    end
    for (int i = 0; i < NB; i++)
      if (carry_into(BOUNDS[i], x, y, c)) bec_taken[i]++;
  endtask

  initial begin
    for (int i = 0; i < NB; i++) bec_taken[i] = 0;
    cin = 1'b0;
    for (int v = 0; v < (1 << (2*W)); v++) apply(W'(v >> W), W'(v), 1'b0);
    for (int i = 0; i < NB; i++) begin
      $display("group at bit %0d: BEC path taken %0d times", BOUNDS[i], bec_taken[i]);
      if (bec_taken[i] == 0) failures++;
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
