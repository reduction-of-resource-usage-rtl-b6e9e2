// tb_validation_unit: checks error accumulation and the stopping verdict.
//
// It runs 200 validation passes of 1 to 16 random pattern errors (including
// negative values, which must be ignored, and huge ones, which must saturate
// the sum), each followed by an evaluate pulse with a random epoch count,
// and compares val_err, goal_met and stop with values worked out here. The
// unit runs with a small epoch limit (50) and error goal (300) so that all
// four combinations of goal and limit occur; it also checks that decided
// pulses exactly one clock after evaluate.
`timescale 1ns/1ps
module tb_validation_unit;
  localparam int W = 18, ACC_W = 12, MAXE = 50, GOAL = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, err_valid = 1'b0, evaluate = 1'b0;
  logic signed [W-1:0] err = '0;
  logic [15:0] epoch = '0;
  logic [ACC_W-1:0] val_err;
  logic decided, stop, goal_met;
  int checks = 0, failures = 0;
  int n_goal = 0, n_limit = 0, n_both = 0, n_none = 0;

  always #5 clk = ~clk;

  validation_unit #(.W(W), .ACC_W(ACC_W), .MAX_EPOCHS(MAXE), .ERR_GOAL(GOAL)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int sum, n, e, ep;
    bit g, s;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      sum = 0;
      n = $urandom_range(1, 16);
      for (int p = 0; p < n; p++) begin
        case ($urandom_range(0, 9))
          0:       e = -int'($urandom_range(1, 1000));
          1:       e = $urandom_range(1000, 2000);
          default: e = $urandom_range(0, (r % 2) ? 60 : 100);
        endcase
        err = W'(e);
        err_valid = 1'b1;
        @(negedge clk);
        err_valid = 1'b0;
        if (e > 0) sum += e;
        if (sum > 4095) sum = 4095;
      end
      check(int'(val_err) == sum, $sformatf("pass %0d: val_err %0d vs %0d", r, val_err, sum));
      ep = $urandom_range(MAXE - 5, MAXE + 5);
      epoch = 16'(ep);
      evaluate = 1'b1;
      @(posedge clk);
      #1;
      evaluate = 1'b0;
      check(decided, "decided one clock after evaluate");
      g = (sum <= GOAL);
      s = g || (ep >= MAXE);
      check(goal_met == g && stop == s, $sformatf("pass %0d: goal %0b stop %0b (sum %0d epoch %0d)",
                                                  r, goal_met, stop, sum, ep));
      @(posedge clk);
      #1;
      check(!decided, "decided is one pulse");
      if (g && ep >= MAXE) n_both++;
      else if (g) n_goal++;
      else if (ep >= MAXE) n_limit++;
      else n_none++;
    end
    check(n_goal > 0 && n_limit > 0 && n_both > 0 && n_none > 0,
          $sformatf("all verdicts seen %0d %0d %0d %0d", n_goal, n_limit, n_both, n_none));
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
