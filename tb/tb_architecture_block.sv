// tb_architecture_block: checks the 2-2-1 network against a reference model
// written here with 64-bit integer arithmetic (same number format: 18 bits,
// 12 fraction bits, products rounded to nearest, saturating sums,
// sigmoid as the minimum of four lines, alpha = 0.5).
//
// It first checks one training step worked out by hand (all weights zero,
// input 11, target 1), then loads random weights and runs a mix of random
// training and feed-forward passes, comparing outputs, error, hard-limited
// outputs and every weight after each pass, with a few passes on very large
// weights to exercise saturation. It checks the latency (s_error 2 clocks
// and s_train 4 clocks after the start edge), that start is ignored while
// busy, and that the network learns XOR within 5000 epochs.
`timescale 1ns/1ps
module tb_architecture_block;
  localparam int NI = 2, NH = 2, NO = 1, W = 18, F = 12;
  localparam int NW = NH * (NI + 1) + NO * (NH + 1);
  localparam longint ONE = 64'sd4096, MAXV = 64'sd131071, MINV = -64'sd131072;

  logic clk = 1'b0, rst_n = 1'b0;
  logic w_init_we = 1'b0;
  logic [3:0] w_init_idx = '0;
  logic signed [W-1:0] w_init_val = '0;
  logic start = 1'b0, train = 1'b0;
  logic [NI-1:0] x = '0;
  logic [NO-1:0] t = '0;
  logic busy, s_train, s_error;
  logic signed [W-1:0] error;
  logic [NO-1:0][W-1:0] y;
  logic [NO-1:0] y_bit;
  logic [NW-1:0][W-1:0] wts;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  architecture_block dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- reference model --------------------------------------------------------
  longint mw [NW];

  function automatic longint sat(input longint a);
    return (a > MAXV) ? MAXV : (a < MINV) ? MINV : a;
  endfunction
  function automatic longint mul(input longint a, input longint b);
    return sat((a * b + 2048) >>> 12);
  endfunction
  function automatic longint half(input longint a);
    return (a + 1) >>> 1;
  endfunction
  function automatic longint sig(input longint v);
    longint a, p;
    a = (v < 0) ? -v : v;
    if (a > MAXV) a = MAXV;
    p = (a >>> 2) + 2048;
    if ((a >>> 3) + 2560 < p) p = (a >>> 3) + 2560;
    if ((a >>> 5) + 3456 < p) p = (a >>> 5) + 3456;
    if (p > ONE) p = ONE;
    return (v < 0) ? ONE - p : p;
  endfunction
  function automatic longint dsig(input longint s);
    return (s * (ONE - s) + 2048) >>> 12;
  endfunction

  longint m_y, m_err;
  task automatic model_pass(input logic [1:0] xi, input bit ti, input bit tr);
    longint zin[2], z[2], dz[2], yin, yy, dy, e, dk, dj[2];
    for (int j = 0; j < 2; j++) begin
      zin[j] = mw[j*3];
      for (int i = 0; i < 2; i++) if (xi[i]) zin[j] = sat(zin[j] + mw[j*3 + i + 1]);
      z[j]  = sig(zin[j]);
      dz[j] = dsig(z[j]);
    end
    yin = mw[6];
    for (int j = 0; j < 2; j++) yin = sat(yin + mul(z[j], mw[7 + j]));
    yy = sig(yin);
    dy = dsig(yy);
    e  = (ti ? ONE : 0) - yy;
    m_y   = yy;
    m_err = mul(e, e);
    if (tr) begin
      dk = mul(e, dy);
      for (int j = 0; j < 2; j++) dj[j] = mul(mul(dk, mw[7 + j]), dz[j]);
      mw[6] = sat(mw[6] + half(dk));
      for (int j = 0; j < 2; j++) mw[7 + j] = sat(mw[7 + j] + half(mul(dk, z[j])));
      for (int j = 0; j < 2; j++) begin
        mw[j*3] = sat(mw[j*3] + half(dj[j]));
        for (int i = 0; i < 2; i++) if (xi[i]) mw[j*3 + i + 1] = sat(mw[j*3 + i + 1] + half(dj[j]));
      end
    end
  endtask

  // ---- driving ----------------------------------------------------------------
  task automatic load_weights();
    for (int n = 0; n < NW; n++) begin
      @(negedge clk);
      w_init_we  = 1'b1;
      w_init_idx = 4'(n);
      w_init_val = W'(mw[n]);
    end
    @(negedge clk);
    w_init_we = 1'b0;
  endtask

  // runs one pass, returns clocks from the start edge to s_error and s_train
  task automatic run_pass(input logic [1:0] xi, input bit ti, input bit tr,
                          output int lat_err, output int lat_tr);
    int c = 0;
    lat_err = -1;
    lat_tr  = -1;
    @(negedge clk);
    x = xi; t = ti; train = tr; start = 1'b1;
    @(posedge clk);               // start edge
    @(negedge clk);
    start = 1'b0;
    while (c < 20) begin
      c++;
      if (c == 2) begin           // start while busy must be ignored
        start = 1'b1; x = ~xi;
      end else start = 1'b0;
      @(posedge clk);
      #1;
      if (s_error && lat_err < 0) lat_err = c;
      if (s_train && lat_tr < 0)  lat_tr = c;
      @(negedge clk);
      start = 1'b0;
      if ((!tr && lat_err >= 0) || (tr && lat_tr >= 0)) break;
    end
    repeat (3) @(negedge clk);
  endtask

  task automatic compare(input string tag);
    check(longint'(signed'(y[0])) == m_y, $sformatf("%s: y %0d vs %0d", tag, signed'(y[0]), m_y));
    check(longint'(error) == m_err, $sformatf("%s: error %0d vs %0d", tag, error, m_err));
    check(y_bit[0] == (m_y >= 2048), $sformatf("%s: y_bit", tag));
    for (int n = 0; n < NW; n++)
      check(longint'(signed'(wts[n])) == mw[n],
            $sformatf("%s: weight %0d = %0d vs %0d", tag, n, signed'(wts[n]), mw[n]));
  endtask

  initial begin
    int le, lt, ok_xor, ep;
    logic [1:0] xi;
    bit ti, tr;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // hand-worked step: all weights 0, x = 11, t = 1
    // z = 0.5, y = 0.5, f'(y) = 0.25, d_k = 0.125, hidden deltas 0,
    // w0 += 0.0625 (256), w1,w2 += 0.5*0.125*0.5 = 0.03125 (128), error 0.25
    run_pass(2'b11, 1'b1, 1'b1, le, lt);
    check(signed'(y[0]) == 18'sd2048, "hand: y = 0.5");
    check(error == 18'sd1024, "hand: error = 0.25");
    check(signed'(wts[6]) == 18'sd256 && signed'(wts[7]) == 18'sd128 && signed'(wts[8]) == 18'sd128,
          "hand: output weights");
    check(wts[5:0] == '0, "hand: hidden weights unchanged (zero hidden deltas)");
    check(le == 2, $sformatf("latency to s_error = %0d", le));
    check(lt == 4, $sformatf("latency to s_train = %0d", lt));

    // random passes against the model
    for (int r = 0; r < 300; r++) begin
      if (r % 50 == 0) begin
        for (int n = 0; n < NW; n++)
          mw[n] = (r == 250) ? ((($urandom & 1) != 0) ? 64'sd120000 : -64'sd120000)
                             : longint'($signed(18'($urandom_range(0, 16383)))) - 8192;
        load_weights();
      end
      xi = 2'($urandom);
      ti = 1'($urandom);
      tr = ($urandom_range(0, 3) != 0);
      run_pass(xi, ti, tr, le, lt);
      model_pass(xi, ti, tr);
      compare($sformatf("pass %0d", r));
      check(le == 2, "latency to s_error");
      if (tr) check(lt == 4, "latency to s_train");
      else    check(lt == -1, "no s_train on a feed-forward pass");
    end

    // learning XOR: weights from a fixed pseudo-random set in [-0.5, 0.5)
    for (int n = 0; n < NW; n++) mw[n] = longint'((n * 1237 + 311) % 4096) - 2048;
    load_weights();
    ok_xor = 0;
    for (ep = 0; ep < 5000 && ok_xor < 4; ep++) begin
      for (int p = 0; p < 4; p++) run_pass(2'(p), 1'(p[0] ^ p[1]), 1'b1, le, lt);
      ok_xor = 0;
      for (int p = 0; p < 4; p++) begin
        run_pass(2'(p), 1'(p[0] ^ p[1]), 1'b0, le, lt);
        if (y_bit[0] == (p[0] ^ p[1]) && error < 18'sd400) ok_xor++;
      end
    end
    check(ok_xor == 4, $sformatf("XOR learned (%0d epochs)", ep));
    $display("XOR learned after %0d epochs", ep);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
