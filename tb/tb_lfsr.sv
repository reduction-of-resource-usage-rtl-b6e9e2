// tb_lfsr: checks the random number generator.
//
// A model written here computes the next state from the characteristic
// polynomial x^16 + x^14 + x^13 + x^11 + 1 (new bit = s15 ^ s13 ^ s12 ^ s10,
// shifted in at the bottom). The testbench checks the reset state, 2000 steps
// against the model, that the state holds while en is low, that a seed load
// works and that an all-zero seed becomes 1, and that the sequence from the
// seed returns to it after exactly 65535 steps and not before (maximal
// length).
`timescale 1ns/1ps
module tb_lfsr;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, seed_load = 1'b0;
  logic [15:0] seed = '0, q, m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr dut (.clk, .rst_n, .en, .seed_load, .seed, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [15:0] nxt(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  initial begin
    int period;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(q == 16'hACE1, "reset state is the seed");
    m = q;
    en = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      m = nxt(m);
      check(q == m, $sformatf("step %0d: %04h vs %04h", i, q, m));
    end
    en = 1'b0;
    repeat (5) @(negedge clk);
    check(q == m, "holds while en is low");
    seed_load = 1'b1; seed = 16'h1234;
    @(negedge clk);
    check(q == 16'h1234, "seed load");
    seed = 16'h0000;
    @(negedge clk);
    check(q == 16'h0001, "zero seed becomes 1");
    seed = 16'hBEEF;
    @(negedge clk);
    seed_load = 1'b0;
    en = 1'b1;
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (q != 16'hBEEF && period < 70000);
    check(period == 65535, $sformatf("period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
