// tb_hybrid_multiplier -- end-to-end testbench of the hybrid multiplier.
//
// Applies all 65536 pairs of 8-bit operands to the multiplier at its only
// configuration and compares the product with a * b.
//
// The carry-select mechanism is exercised in every adder of the tree: from
// the operands alone the test works out the operands each adder sees (the
// rows C_i = a gated by b[i], paired and aligned as the tree does) and the
// carry entering each of its carry-select groups. It counts how often each
// group position took its BEC path, and a position that never did counts as
// a failure. It also checks that the carry-outs of the 12-bit and 16-bit
// adders, which the operand alignment makes redundant, are never set.
// One vector per clock; a watchdog ends the run with a failure after a
// fixed number of cycles.
module tb_hybrid_multiplier;

  localparam int MAX_CYCLES = 70000;
  // carry-select group positions: 8-bit adders (bits 4, 6), 12-bit adders
  // (bits 4, 6, 8) and the 16-bit adder (bits 7, 11)
  localparam int NPOS = 7;

  logic        clk = 1'b0;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0;
  int failures = 0;
  int bec_taken [NPOS];
  int redundant_cout = 0;

  always #5 clk = ~clk;

  hybrid_multiplier dut (.a(a), .b(b), .p(p));

  function automatic bit carry_into(int k, longint x, longint y);
    longint mask;
    mask = (longint'(1) << k) - 1;
    return ((x & mask) + (y & mask)) >> k != 0;
  endfunction

  initial begin
    for (int i = 0; i < NPOS; i++) bec_taken[i] = 0;
    for (int v = 0; v < (1 << 16); v++) begin
      longint row [8];
      longint pr [4];
      longint qd [2];
      @(negedge clk);
      {a, b} = 16'(v);
      @(posedge clk);

      checks++;
      if (p !== 16'(int'(a) * int'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d", a, b, p);
      end
      checks++;
      if (dut.quad_cout != 2'b00 || dut.p_cout != 1'b0) begin
        failures++;
        redundant_cout++;
      end

      // operands of every adder of the tree, worked out from a and b
      for (int i = 0; i < 8; i++) row[i] = b[i] ? longint'(a) : 0;
      for (int k = 0; k < 4; k++) begin
        if (carry_into(4, row[2*k+1], row[2*k] >> 1)) bec_taken[0]++;
        if (carry_into(6, row[2*k+1], row[2*k] >> 1)) bec_taken[1]++;
        pr[k] = 2 * row[2*k+1] + row[2*k];
      end
      for (int j = 0; j < 2; j++) begin
        if (carry_into(4, pr[2*j+1] << 2, pr[2*j])) bec_taken[2]++;
        if (carry_into(6, pr[2*j+1] << 2, pr[2*j])) bec_taken[3]++;
        if (carry_into(8, pr[2*j+1] << 2, pr[2*j])) bec_taken[4]++;
        qd[j] = 4 * pr[2*j+1] + pr[2*j];
      end
      if (carry_into(7, qd[1] << 4, qd[0])) bec_taken[5]++;
      if (carry_into(11, qd[1] << 4, qd[0])) bec_taken[6]++;
    end
    $display("8-bit adders,  Weinberger group at bit 6 BEC path: %0d", bec_taken[1]);
    $display("8-bit adders,  Ling group at bit 4 BEC path:       %0d", bec_taken[0]);
    $display("12-bit adders, Ling group at bit 4 BEC path:       %0d", bec_taken[2]);
    $display("12-bit adders, Weinberger group at bit 6 BEC path: %0d", bec_taken[3]);
    $display("12-bit adders, Ling group at bit 8 BEC path:       %0d", bec_taken[4]);
    $display("16-bit adder,  Han-Carlson group at bit 7 BEC path: %0d", bec_taken[5]);
    $display("16-bit adder,  Ling group at bit 11 BEC path:      %0d", bec_taken[6]);
    $display("redundant carry-out set: %0d", redundant_cout);
    for (int i = 0; i < NPOS; i++)
      if (bec_taken[i] == 0) failures++;
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
