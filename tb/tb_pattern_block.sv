// tb_pattern_block: checks the serial protocol and the pattern memory.
//
// The testbench acts as the PC (serial bytes at 20 clocks per bit, set by
// parameter) and as the control block. It checks that:
//   - written training and validation patterns come back on x / t for every
//     index while training or validation is raised, and writes to an index
//     beyond the memory change nothing;
//   - the start command pulses data_setting once and sets n_train / n_valid,
//     clamped to the memory size;
//   - a recall raises query_req with its input on x, a second recall while
//     the first is pending is ignored, and after query_done the answer byte
//     {hard-limited bit, 7 fraction bits} is sent, 7'h7F for an output of 1.0;
//   - a status command is answered with the flags and the epoch count;
//   - every answer byte has a valid start and stop bit.
`timescale 1ns/1ps
module tb_pattern_block;
  localparam int CPB = 20, NPAT = 12, W = 18;

  logic clk = 1'b0, rst_n = 1'b0, rxd = 1'b1, txd;
  logic training = 1'b0, validation = 1'b0;
  logic [3:0] pat_idx = '0;
  logic [1:0] x;
  logic [0:0] t;
  logic data_setting;
  logic [3:0] n_train, n_valid;
  logic query_req, query_done = 1'b0;
  logic [0:0][W-1:0] query_y = '0;
  logic [0:0] query_ybit = '0;
  logic done = 1'b0, converged = 1'b0;
  logic [15:0] epoch = '0;
  int checks = 0, failures = 0, n_setting = 0, frame_errors = 0;

  always #5 clk = ~clk;

  pattern_block #(.N_PAT(NPAT), .CLKS_PER_BIT(CPB)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) if (data_setting) n_setting++;

  task automatic send_byte(input logic [7:0] b);
    rxd = 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (CPB) @(posedge clk);
    end
    rxd = 1'b1;
    repeat (CPB + 3) @(posedge clk);
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
      if (txd) frame_errors++;
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      if (!txd) frame_errors++;
      rxq.push_back(b);
    end
  end

  task automatic get_byte(output logic [7:0] b);
    int g = 0;
    while (rxq.size() == 0 && g < 5000) begin
      @(posedge clk);
      g++;
    end
    if (rxq.size() == 0) begin
      b = '0;
      check(1'b0, "expected an answer byte");
    end else b = rxq.pop_front();
  endtask

  logic [2:0] tm [NPAT], vm [NPAT];

  initial begin
    logic [7:0] b, b2, b3;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // patterns
    for (int p = 0; p < NPAT; p++) begin
      tm[p] = 3'($urandom);
      vm[p] = 3'($urandom);
      send_cmd(2'd0, 1'b0, 5'(p), {5'b0, tm[p]});
      send_cmd(2'd0, 1'b1, 5'(p), {5'b0, vm[p]});
    end
    send_cmd(2'd0, 1'b0, 5'(NPAT), 8'h07);        // beyond the memory
    send_cmd(2'd0, 1'b1, 5'd31, 8'h07);
    for (int p = 0; p < NPAT; p++) begin
      @(negedge clk);
      pat_idx = 4'(p);
      training = 1'b1; validation = 1'b0;
      #1;
      check({t, x} == tm[p], $sformatf("training pattern %0d: %0b vs %0b", p, {t, x}, tm[p]));
      validation = 1'b1; training = 1'b0;
      #1;
      check({t, x} == vm[p], $sformatf("validation pattern %0d: %0b vs %0b", p, {t, x}, vm[p]));
    end
    @(negedge clk);
    training = 1'b0; validation = 1'b0;

    // start
    check(n_setting == 0, "no data_setting before start");
    send_cmd(2'd1, 1'b0, 5'd0, 8'h52);             // n_valid 6, n_train 3
    check(n_setting == 1, "one data_setting pulse");
    check(n_train == 4'd3 && n_valid == 4'd6, $sformatf("counts %0d %0d", n_train, n_valid));
    send_cmd(2'd1, 1'b0, 5'd0, 8'hF0);             // n_valid 16 -> clamped, n_train 1
    check(n_setting == 2 && n_train == 4'd1 && n_valid == 4'(NPAT), "counts clamped");

    // recall, with a second recall while the first is pending
    send_cmd(2'd2, 1'b0, 5'd0, 8'h02);
    check(query_req && x == 2'b10, "query_req with the recall input");
    send_cmd(2'd2, 1'b0, 5'd0, 8'h01);
    check(query_req && x == 2'b10, "second recall ignored while pending");
    check(rxq.size() == 0, "no answer before query_done");
    @(negedge clk);
    query_y[0] = 18'd3000;                          // 0.7324 -> fraction bits 1011101
    query_ybit = 1'b1;
    query_done = 1'b1;
    @(negedge clk);
    query_done = 1'b0;
    check(!query_req, "query_req drops after query_done");
    get_byte(b);
    check(b == {1'b1, 7'(3000 >> 5)}, $sformatf("recall answer %02h", b));
    send_cmd(2'd2, 1'b0, 5'd0, 8'h03);
    check(query_req && x == 2'b11, "next recall accepted");
    @(negedge clk);
    query_y[0] = 18'd4096;                          // exactly 1.0
    query_done = 1'b1;
    @(negedge clk);
    query_done = 1'b0;
    get_byte(b);
    check(b == 8'hFF, $sformatf("answer for 1.0 is FF (%02h)", b));

    // status
    done = 1'b1; converged = 1'b0; epoch = 16'h1A2B;
    send_cmd(2'd3, 1'b0, 5'd0, 8'h00);
    get_byte(b); get_byte(b2); get_byte(b3);
    check(b == 8'h80 && b2 == 8'h1A && b3 == 8'h2B, $sformatf("status %02h %02h %02h", b, b2, b3));
    converged = 1'b1; validation = 1'b1; epoch = 16'd7;
    send_cmd(2'd3, 1'b0, 5'd0, 8'h00);
    get_byte(b); get_byte(b2); get_byte(b3);
    check(b == 8'hD0 && b2 == 8'h00 && b3 == 8'h07, $sformatf("status %02h %02h %02h", b, b2, b3));
    check(frame_errors == 0, "answer framing");
    repeat (50) @(negedge clk);
    check(rxq.size() == 0, "no extra answer bytes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
