// tb_matlab_example: runs a small published worked example of one training
// pattern through the architecture block.
//
// Network 2-2-1, input x = (0, 1), target 1, learning rate 0.25 (so
// ALPHA_SHIFT = 2), initial weights
//   input->hidden  v = [0.7 -0.4; -0.2 0.3]  (row = input, column = hidden)
//   hidden biases  vb = [0.4 0.6]
//   hidden->output w = [0.5; 0.1], output bias 0 (not given, taken as 0).
// Three training iterations are run. After each, every weight is compared
// with a floating-point back-propagation step computed here with the exact
// logistic function (within 0.001, the gap the line approximation of the
// sigmoid leaves), and the direction of change is checked against the
// example's printed results: weights from input 1 (which is 0) stay put,
// weights from input 2 and the second hidden bias grow. The example's own
// numbers for the second row of v are printed alongside for comparison.
`timescale 1ns/1ps
module tb_matlab_example;
  localparam int W = 18, F = 12, NW = 9;
  localparam real S = 4096.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic w_init_we = 1'b0;
  logic [3:0] w_init_idx = '0;
  logic signed [W-1:0] w_init_val = '0;
  logic start = 1'b0, train = 1'b0;
  logic [1:0] x = '0;
  logic [0:0] t = '0;
  logic busy, s_train, s_error;
  logic signed [W-1:0] error;
  logic [0:0][W-1:0] y;
  logic [0:0] y_bit;
  logic [NW-1:0][W-1:0] wts;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  architecture_block #(.ALPHA_SHIFT(2)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  function automatic real logistic(input real v);
    return 1.0 / (1.0 + $exp(-v));
  endfunction
  function automatic real wr(input int n);
    return real'(signed'(wts[n])) / S;
  endfunction

  // weight order: v01 v11 v21 v02 v12 v22 w0 w1 w2
  real mw [NW] = '{0.4, 0.7, -0.2, 0.6, -0.4, 0.3, 0.0, 0.5, 0.1};
  real prev [NW];
  // the example's printed second row of v after iterations 1..3
  real fig_v21 [3] = '{-0.1961, -0.1915, -0.1871};
  real fig_v22 [3] = '{0.3008, 0.3016, 0.3023};

  task automatic model_step();
    real zin[2], z[2], yin, yy, dk, dj[2];
    real xi[2] = '{0.0, 1.0};
    for (int j = 0; j < 2; j++) begin
      zin[j] = mw[j*3] + xi[0] * mw[j*3 + 1] + xi[1] * mw[j*3 + 2];
      z[j]   = logistic(zin[j]);
    end
    yin = mw[6] + z[0] * mw[7] + z[1] * mw[8];
    yy  = logistic(yin);
    dk  = (1.0 - yy) * yy * (1.0 - yy);
    for (int j = 0; j < 2; j++) dj[j] = dk * mw[7 + j] * z[j] * (1.0 - z[j]);
    mw[6] += 0.25 * dk;
    for (int j = 0; j < 2; j++) mw[7 + j] += 0.25 * dk * z[j];
    for (int j = 0; j < 2; j++) begin
      mw[j*3] += 0.25 * dj[j];
      for (int i = 0; i < 2; i++) mw[j*3 + i + 1] += 0.25 * dj[j] * xi[i];
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NW; n++) begin
      @(negedge clk);
      w_init_we = 1'b1;
      w_init_idx = 4'(n);
      w_init_val = W'($rtoi(mw[n] * S + ((mw[n] < 0.0) ? -0.5 : 0.5)));
    end
    @(negedge clk);
    w_init_we = 1'b0;
    for (int n = 0; n < NW; n++) prev[n] = wr(n);

    for (int it = 0; it < 3; it++) begin
      @(negedge clk);
      x = 2'b10;            // x1 = 0 (bit 0), x2 = 1 (bit 1)
      t = 1'b1;
      train = 1'b1;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!s_train) @(negedge clk);
      @(negedge clk);
      model_step();
      for (int n = 0; n < NW; n++)
        check(absr(wr(n) - mw[n]) < 0.001,
              $sformatf("iteration %0d weight %0d: %f vs %f", it + 1, n, wr(n), mw[n]));
      check(wr(1) == prev[1] && wr(4) == prev[4], "weights from input 1 unchanged");
      check(wr(2) > prev[2] && wr(5) > prev[5] && wr(3) > prev[3], "weights from input 2 and bias 2 grow");
      $display("iteration %0d: v21 = %7.4f (example %7.4f)  v22 = %7.4f (example %7.4f)  vb = %7.4f %7.4f  w = %7.4f %7.4f",
               it + 1, wr(2), fig_v21[it], wr(5), fig_v22[it], wr(0), wr(3), wr(7), wr(8));
      for (int n = 0; n < NW; n++) prev[n] = wr(n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
