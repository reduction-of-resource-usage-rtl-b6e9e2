// tb_control_block: checks the training sequence of the control block
// against a simple stand-in for the network, written here.
//
// The stand-in answers a start pulse after a random 1 to 4 clocks with
// s_train (training pass) or s_error (feed-forward pass); its error for
// validation pattern p in epoch e is 100 - 10*e + p, so the summed error of a
// pass falls every epoch. The testbench checks:
//   - after data_setting, exactly NW weight writes with indices 0..NW-1 and
//     the values of an LFSR model (low 12 bits, sign-extended);
//   - every epoch presents training patterns 0..n_train-1 with training high
//     and arch_train high, then validation patterns 0..n_valid-1 with
//     validation high and arch_train low;
//   - training stops in the first epoch whose summed validation error is at
//     or below the goal, with converged set and the right epoch count;
//   - with an unreachable goal it stops at the epoch limit, not converged;
//   - a query held while training runs is served only after training, with
//     the network's outputs returned on query_y / query_ybit.
`timescale 1ns/1ps
module tb_control_block;
  localparam int NI = 2, NH = 2, NO = 1, W = 18, F = 12, NPAT = 16;
  localparam int NW = NH * (NI + 1) + NO * (NH + 1);
  localparam int MAXE = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic data_setting = 1'b0;
  logic [4:0] n_train = 5'd4, n_valid = 5'd3;
  logic training, validation;
  logic [3:0] pat_idx;
  logic query_req = 1'b0, query_done;
  logic [NO-1:0][W-1:0] query_y, y;
  logic [NO-1:0] query_ybit, y_bit;
  logic arch_start, arch_train;
  logic s_train = 1'b0, s_error = 1'b0;
  logic signed [W-1:0] error = '0;
  logic w_init_we;
  logic [3:0] w_init_idx;
  logic signed [W-1:0] w_init_val;
  logic done, converged;
  logic [15:0] epoch;
  logic [23:0] val_err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ERR_GOAL 250: with 3 validation patterns the pass error 300 - 30e + 3
  // first reaches 250 or less in epoch 2 (counting from 0), i.e. 3 epochs.
  control_block #(.N_PAT(NPAT), .MAX_EPOCHS(MAXE), .ERR_GOAL(250)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- stand-in network and sequence recorder ---------------------------------
  int tr_seen[$], va_seen[$];
  int cur_epoch = 0, bad_flags = 0;
  logic [NO-1:0][W-1:0] y_val = '0;
  assign y = y_val;
  assign y_bit = y_val[0] >= 18'd2048;
  bit offset_goal = 1'b0;

  initial begin
    forever begin
      @(negedge clk);
      if (arch_start) begin
        automatic bit tr = arch_train;
        automatic int p = int'(pat_idx);
        if (tr) begin
          tr_seen.push_back(p);
          if (!training || validation) bad_flags++;
        end else if (validation) begin
          va_seen.push_back(p);
          if (training) bad_flags++;
        end
        repeat ($urandom_range(1, 4)) @(posedge clk);
        #1;
        if (tr) s_train = 1'b1;
        else begin
          s_error = 1'b1;
          error = offset_goal ? 18'sd5000 : W'(100 - 10 * int'(epoch) + p);
        end
        @(posedge clk);
        #1;
        s_train = 1'b0;
        s_error = 1'b0;
      end
    end
  end

  // ---- LFSR model ------------------------------------------------------------
  logic [15:0] lf = 16'hACE1;
  int n_writes = 0;
  always @(negedge clk) begin
    if (rst_n && w_init_we) begin
      check(int'(w_init_idx) == n_writes % NW, $sformatf("init index %0d", w_init_idx));
      check(w_init_val == {{(W-12){lf[11]}}, lf[11:0]},
            $sformatf("init value %0d vs lfsr %04h", w_init_val, lf));
      lf = {lf[14:0], lf[15] ^ lf[13] ^ lf[12] ^ lf[10]};
      n_writes++;
    end
  end

  task automatic start_training();
    @(negedge clk);
    data_setting = 1'b1;
    @(negedge clk);
    data_setting = 1'b0;
  endtask

  task automatic wait_done();
    int g = 0;
    while (!done && g < 20000) begin
      @(negedge clk);
      g++;
    end
  endtask

  task automatic check_sequence(input int epochs);
    check(tr_seen.size() == epochs * int'(n_train), $sformatf("training passes %0d", tr_seen.size()));
    check(va_seen.size() == epochs * int'(n_valid), $sformatf("validation passes %0d", va_seen.size()));
    for (int i = 0; i < tr_seen.size(); i++)
      check(tr_seen[i] == i % int'(n_train), $sformatf("training order at %0d", i));
    for (int i = 0; i < va_seen.size(); i++)
      check(va_seen[i] == i % int'(n_valid), $sformatf("validation order at %0d", i));
    check(bad_flags == 0, "training/validation flags during passes");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!done && !training && !validation, "idle after reset");

    // run 1: converges in epoch 3
    start_training();
    wait_done();
    check(n_writes == NW, $sformatf("weight writes %0d", n_writes));
    check(done && converged, "run 1 converged");
    check(epoch == 16'd3, $sformatf("run 1 epochs %0d", epoch));
    check(val_err == 24'(300 - 30 * 2 + 3), $sformatf("run 1 validation error %0d", val_err));
    check_sequence(3);

    // run 2: unreachable goal, stops at the epoch limit; a query is held meanwhile
    tr_seen.delete();
    va_seen.delete();
    offset_goal = 1'b1;
    n_train = 5'd2;
    n_valid = 5'd1;
    start_training();
    repeat (20) @(negedge clk);
    query_req = 1'b1;
    y_val[0] = 18'd3000;
    while (!query_done) begin
      @(negedge clk);
      if (query_done) check(done, "query served only after training");
    end
    @(negedge clk);
    query_req = 1'b0;
    check(query_y[0] == 18'd3000 && query_ybit[0] == 1'b1, "query answer");
    check(done && !converged, "run 2 stopped at the limit");
    check(epoch == 16'(MAXE), $sformatf("run 2 epochs %0d", epoch));
    check(n_writes == 2 * NW, "weights re-initialised for run 2");
    check_sequence(MAXE);

    // a query while idle
    y_val[0] = 18'd100;
    @(negedge clk);
    query_req = 1'b1;
    while (!query_done) @(negedge clk);
    @(negedge clk);
    query_req = 1'b0;
    repeat (10) @(negedge clk);
    check(query_y[0] == 18'd100 && query_ybit[0] == 1'b0, "idle query answer");
    check(va_seen.size() == MAXE, "a query is not a validation pass");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
