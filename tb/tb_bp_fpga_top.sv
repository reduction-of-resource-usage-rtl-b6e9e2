// tb_bp_fpga_top: end-to-end test of the back-propagation trainer at its
// default sizes (2-2-1 network, 115200 baud at 100 MHz, 20000-epoch limit).
//
// The testbench plays the PC on the serial line:
//   1. asks for status and recalls one input on the untrained network
//      (all weights zero, so the output must be exactly 0.5);
//   2. loads the four XOR patterns as training set and a contradictory
//      validation set (input 00 with target 0 and with target 1), whose error
//      can never reach the goal, starts training, queries status and sends a
//      recall while training runs (the recall must wait until training ends)
//      and checks that training stops at the epoch limit, not converged;
//   3. loads the XOR patterns as validation set, retrains, and checks that
//      training converges before the limit and that recalls of all four
//      inputs give the XOR truth table.
// It counts how often each mechanism happened (weight initialisation,
// training steps, validation passes, epochs, weight updates, stop on goal,
// stop on limit, deferred recall, status answers) and fails any that never
// did.
`timescale 1ns/1ps
module tb_bp_fpga_top;
  localparam int CPB        = 868;        // top default
  localparam int MAX_EPOCHS = 20000;      // top default
  localparam int NW         = 9;

  logic clk = 1'b0, rst_n = 1'b0, rxd = 1'b1;
  logic txd, training, validation, done, converged;
  logic [15:0] epoch;
  logic [23:0] val_err;
  int checks = 0, failures = 0;
  longint cycles = 0;

  always #5 clk = ~clk;              // 100 MHz
  always @(posedge clk) cycles++;

  bp_fpga_top dut (
    .clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd),
    .training, .validation, .done, .converged, .epoch, .val_err
  );

  // ---- mechanism counters (observed inside the design) ----------------------
  int n_init = 0, n_train_steps = 0, n_valid_pass = 0, n_updates = 0;
  int n_goal_stop = 0, n_limit_stop = 0, n_deferred = 0, n_status = 0;
  logic done_q = 1'b0;
  always @(negedge clk) begin
    if (dut.u_arch.w_init_we) n_init++;
    if (dut.u_arch.s_train) n_train_steps++;
    if (dut.u_control.v_err_valid) n_valid_pass++;
    if (dut.u_arch.state == bp_pkg::A_UPDATE) n_updates++;
    done_q <= done;
    if (done && !done_q) begin
      if (converged) n_goal_stop++;
      else           n_limit_stop++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- serial line, PC side -------------------------------------------------
  task automatic send_byte(input logic [7:0] b);
    rxd = 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (CPB) @(posedge clk);
    end
    rxd = 1'b1;
    repeat (CPB) @(posedge clk);
  endtask

  task automatic send_cmd(input logic [1:0] op, input logic set, input logic [4:0] idx,
                          input logic [7:0] data);
    send_byte({op, set, idx});
    send_byte(data);
  endtask

  logic [7:0] rxq[$];
  initial begin : serial_monitor
    logic [7:0] b;
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      rxq.push_back(b);
    end
  end

  task automatic get_byte(output logic [7:0] b);
    int guard = 0;
    while (rxq.size() == 0 && guard < 4_000_000) begin
      @(posedge clk);
      guard++;
    end
    if (rxq.size() == 0) begin
      b = 8'hxx;
      check(1'b0, "no answer byte from the design");
    end else b = rxq.pop_front();
  endtask

  task automatic status(output logic [7:0] flags, output logic [15:0] ep);
    logic [7:0] hi, lo;
    send_cmd(2'd3, 1'b0, 5'd0, 8'h00);
    get_byte(flags);
    get_byte(hi);
    get_byte(lo);
    ep = {hi, lo};
    n_status++;
  endtask

  task automatic load_xor(input logic set);
    for (int p = 0; p < 4; p++)
      send_cmd(2'd0, set, 5'(p), {5'b0, 1'(p[0] ^ p[1]), 2'(p)});
  endtask

  task automatic wait_done();
    longint guard = 0;
    while (!done && guard < 3_000_000) begin
      @(posedge clk);
      guard++;
    end
    check(done, "training ends");
    repeat (10) @(posedge clk);
  endtask

  // ---- test ------------------------------------------------------------------
  initial begin
    logic [7:0]  b, flags;
    logic [15:0] ep;
    int epochs_goal;

    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // 1. untrained network
    status(flags, ep);
    check(flags == 8'h00 && ep == 16'd0, $sformatf("status after reset %02h %04h", flags, ep));
    send_cmd(2'd2, 1'b0, 5'd0, 8'h01);
    get_byte(b);
    check(b == 8'hC0, $sformatf("recall of zero-weight net gives 0.5 (got %02h)", b));

    // 2. contradictory validation set: must stop at the epoch limit
    load_xor(1'b0);
    send_cmd(2'd0, 1'b1, 5'd0, 8'h00);   // 00 -> 0
    send_cmd(2'd0, 1'b1, 5'd1, 8'h04);   // 00 -> 1
    send_cmd(2'd1, 1'b0, 5'd0, 8'h13);   // n_valid = 2, n_train = 4
    repeat (100) @(posedge clk);
    check(training || validation || !done, "training running after start");
    status(flags, ep);
    check(flags[7] == 1'b0 && ep != 16'd0, $sformatf("status during training %02h %04h", flags, ep));
    send_cmd(2'd2, 1'b0, 5'd0, 8'h00);   // recall sent while training runs
    check(!done, "recall sent while training still runs");
    get_byte(b);
    check(done, "recall answered only after training ended");
    if (done) n_deferred++;
    wait_done();
    check(!converged, "contradictory validation set does not converge");
    check(epoch == 16'(MAX_EPOCHS), $sformatf("stopped at epoch limit (%0d)", epoch));
    check(n_init == NW, $sformatf("one random value per weight (%0d)", n_init));

    // 3. proper XOR validation set: must converge and learn XOR
    load_xor(1'b1);
    send_cmd(2'd1, 1'b0, 5'd0, 8'h33);   // n_valid = 4, n_train = 4
    wait_done();
    check(converged, "XOR training converges");
    epochs_goal = int'(epoch);
    check(epochs_goal > 0 && epochs_goal < MAX_EPOCHS, $sformatf("converged after %0d epochs", epochs_goal));
    check(val_err <= 24'd205, $sformatf("validation error %0d within goal", val_err));
    check(n_init == 2 * NW, "weights initialised again for the second run");
    for (int p = 0; p < 4; p++) begin
      send_cmd(2'd2, 1'b0, 5'd0, {6'b0, 2'(p)});
      get_byte(b);
      check(b[7] == (p[0] ^ p[1]), $sformatf("XOR(%0d,%0d) = %0d (byte %02h)", p[1], p[0], b[7], b));
      if (p[0] ^ p[1]) check(b[6:0] >= 7'd96, "output high is above 0.75");
      else             check(b[6:0] <= 7'd32, "output low is below 0.25");
    end
    status(flags, ep);
    check(flags == 8'hC0, $sformatf("status flags done+converged (%02h)", flags));
    check(ep == 16'(epochs_goal), "status epoch count matches");

    // mechanisms
    check(n_init > 0, "weight initialisation happened");
    check(n_train_steps == 4 * (MAX_EPOCHS + epochs_goal),
          $sformatf("training steps = 4 per epoch (%0d)", n_train_steps));
    check(n_valid_pass == 2 * MAX_EPOCHS + 4 * epochs_goal,
          $sformatf("validation patterns per epoch (%0d)", n_valid_pass));
    check(n_updates == n_train_steps, "one weight update per training step");
    check(n_goal_stop == 1, "stop on error goal happened once");
    check(n_limit_stop == 1, "stop on epoch limit happened once");
    check(n_deferred == 1, "deferred recall happened");
    check(n_status == 3, "status answers");
    $display("mechanisms: init=%0d train_steps=%0d valid_patterns=%0d updates=%0d goal_stop=%0d limit_stop=%0d deferred_recall=%0d status=%0d epochs_to_goal=%0d cycles=%0d",
             n_init, n_train_steps, n_valid_pass, n_updates, n_goal_stop, n_limit_stop,
             n_deferred, n_status, epochs_goal, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
