// tb_sigmoid_unit: sweeps the activation unit over its whole input range.
//
// For every 7th input value (and the range ends) it checks y against the
// minimum of the four approximating lines evaluated in real arithmetic (within one
// least-significant bit), y against the true logistic function (within the
// approximation's known error of 0.02), dy against y(1-y) (within one
// least-significant bit), that y never decreases as x grows, and the exact
// values f(0) = 0.5, f(+-large) = 1 / 0.
`timescale 1ns/1ps
module tb_sigmoid_unit;
  localparam int W = 18, F = 12;
  localparam real S = 4096.0;

  logic signed [W-1:0] x, y, dy;
  int checks = 0, failures = 0;

  sigmoid_unit dut (.x, .y, .dy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic real plan(input real v);
    real a, p;
    a = (v < 0.0) ? -v : v;
    p = 0.25 * a + 0.5;
    if (0.125 * a + 0.625 < p)     p = 0.125 * a + 0.625;
    if (0.03125 * a + 0.84375 < p) p = 0.03125 * a + 0.84375;
    if (p > 1.0)                   p = 1.0;
    return (v < 0.0) ? 1.0 - p : p;
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    int prev;
    real xv, yv, dyv;
    prev = -1;
    for (int v = -131072; v <= 131071; v += 7) begin
      x = W'(v);
      #1;
      xv  = real'(v) / S;
      yv  = real'(y) / S;
      dyv = real'(dy) / S;
      check(absr(yv - plan(xv)) <= 1.0 / S, $sformatf("y(%f) = %f, segment model %f", xv, yv, plan(xv)));
      check(absr(yv - 1.0 / (1.0 + $exp(-xv))) <= 0.02, $sformatf("y(%f) = %f far from logistic", xv, yv));
      check(absr(dyv - yv * (1.0 - yv)) <= 1.0 / S, $sformatf("dy(%f) = %f", xv, dyv));
      check(int'(y) >= prev, $sformatf("monotonic at %f", xv));
      prev = int'(y);
    end
    x = '0; #1;
    check(y == 18'sd2048 && dy == 18'sd1024, "f(0) = 0.5, f'(0) = 0.25");
    x = 18'sd40000; #1;
    check(y == 18'sd4096 && dy == 18'sd0, "f(large) = 1");
    x = -18'sd131072; #1;
    check(y == 18'sd0 && dy == 18'sd0, "f(most negative) = 0");
    x = 18'sd4096; #1;
    check(y == 18'sd3072, "f(1) = 0.75");
    x = 18'sd9728; #1;
    check(y == 18'sd3760, "f(2.375) = 0.84375 + 2.375/32 (past the 7/3 crossing)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
