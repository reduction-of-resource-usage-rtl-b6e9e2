// validation_unit: decides after every training epoch whether training stops.
//
// During the validation pass that follows an epoch the control block pulses
// clear once, then err_valid once per validation pattern with that pattern's
// squared error on err; the unit sums them (saturating at ACC_W bits) into
// val_err. A pulse on evaluate, with epoch holding the number of epochs run
// so far, registers the verdict and pulses decided one clock later:
//   goal_met = val_err <= ERR_GOAL
//   stop     = goal_met or epoch >= MAX_EPOCHS
// The validation pass after every epoch follows the source; the stopping
// rule (error goal or epoch limit) and its defaults (summed squared error of
// 0.05, 20000 epochs) are this design's choice.
module validation_unit #(
  parameter int W          = bp_pkg::NET_W,
  parameter int ACC_W      = 24,
  parameter int MAX_EPOCHS = 20000,
  parameter int ERR_GOAL   = 205      // 0.05 with 12 fraction bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 err_valid,
  input  logic signed [W-1:0]  err,
  input  logic                 evaluate,
  input  logic [15:0]          epoch,
  output logic [ACC_W-1:0]     val_err,
  output logic                 decided,
  output logic                 stop,
  output logic                 goal_met
);

  logic [ACC_W:0] sum;
  assign sum = {1'b0, val_err} + ((err > 0) ? (ACC_W+1)'(err) : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      val_err  <= '0;
      decided  <= 1'b0;
      stop     <= 1'b0;
      goal_met <= 1'b0;
    end else begin
      decided <= 1'b0;
      if (clear)
        val_err <= '0;
      else if (err_valid)
        val_err <= sum[ACC_W] ? '1 : sum[ACC_W-1:0];
      if (evaluate) begin
        goal_met <= (val_err <= ACC_W'(ERR_GOAL));
        stop     <= (val_err <= ACC_W'(ERR_GOAL)) || (int'(epoch) >= MAX_EPOCHS);
        decided  <= 1'b1;
      end
    end
  end

endmodule
