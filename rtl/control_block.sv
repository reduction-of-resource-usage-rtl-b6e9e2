// control_block: sequences the whole learning process.
//
// After data_setting (patterns loaded, start asked for) it
//   1. gives every weight and bias a random value, one per clock, from an
//      LFSR: the low F bits of the LFSR state read as a signed number, which
//      is uniform in [-0.5, 0.5);
//   2. runs a training epoch: for every training pattern in stored order it
//      raises training with the pattern's index on pat_idx, starts a training
//      pass of the architecture block and waits for s_train;
//   3. runs a validation pass: for every validation pattern it raises
//      validation, starts a feed-forward pass, waits for s_error and hands the
//      pattern's squared error to the validation unit;
//   4. asks the validation unit whether to stop, and repeats from 2 if not.
// When training ends, done is set and converged tells whether the error goal
// was reached. While no training runs (before or after), a held query_req
// starts a feed-forward pass on the pattern block's query input; the outputs
// are returned on query_y / query_ybit with a one-cycle query_done pulse
// (query_req must drop in the cycle after that pulse).
//
// Timing: one clock per weight during initialisation, then per pattern the
// architecture block's pass plus one clock (start) for training and for
// validation, and two clocks per epoch for the verdict.
// The training/validation sequence follows the source; the stopping rule,
// pattern order and handshakes are this design's choice.
module control_block #(
  parameter int N_IN       = bp_pkg::NET_N_IN,
  parameter int N_HID      = bp_pkg::NET_N_HID,
  parameter int N_OUT      = bp_pkg::NET_N_OUT,
  parameter int W          = bp_pkg::NET_W,
  parameter int F          = bp_pkg::NET_F,
  parameter int N_PAT      = 16,
  parameter int MAX_EPOCHS = 20000,
  parameter int ERR_GOAL   = 205,
  parameter logic [15:0] SEED = 16'hACE1,
  localparam int NW        = N_HID * (N_IN + 1) + N_OUT * (N_HID + 1),
  localparam int IW        = $clog2(NW),
  localparam int PI        = $clog2(N_PAT),
  localparam int PC        = $clog2(N_PAT + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // pattern block side
  input  logic                     data_setting,
  input  logic [PC-1:0]            n_train,
  input  logic [PC-1:0]            n_valid,
  output logic                     training,
  output logic                     validation,
  output logic [PI-1:0]            pat_idx,
  input  logic                     query_req,
  output logic                     query_done,
  output logic [N_OUT-1:0][W-1:0]  query_y,
  output logic [N_OUT-1:0]         query_ybit,
  // architecture block side
  output logic                     arch_start,
  output logic                     arch_train,
  input  logic                     s_train,
  input  logic                     s_error,
  input  logic signed [W-1:0]      error,
  input  logic [N_OUT-1:0][W-1:0]  y,
  input  logic [N_OUT-1:0]         y_bit,
  output logic                     w_init_we,
  output logic [IW-1:0]            w_init_idx,
  output logic signed [W-1:0]      w_init_val,
  // status
  output logic                     done,
  output logic                     converged,
  output logic [15:0]              epoch,
  output logic [23:0]              val_err
);
  import bp_pkg::*;

  ctrl_state_e state;
  logic [15:0] rnd;
  logic        last_train, last_valid;
  logic        v_clear, v_err_valid, v_eval, v_decided, v_stop, v_goal;

  lfsr #(.N(16), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .en(state == C_INIT), .seed_load(1'b0), .seed(16'h0), .q(rnd)
  );

  validation_unit #(.W(W), .ACC_W(24), .MAX_EPOCHS(MAX_EPOCHS), .ERR_GOAL(ERR_GOAL)) u_val (
    .clk, .rst_n,
    .clear(v_clear), .err_valid(v_err_valid), .err(error),
    .evaluate(v_eval), .epoch(epoch),
    .val_err(val_err), .decided(v_decided), .stop(v_stop), .goal_met(v_goal)
  );

  assign last_train = (PC'(pat_idx) + 1'b1 >= n_train);
  assign last_valid = (PC'(pat_idx) + 1'b1 >= n_valid);

  assign training    = (state == C_TRAIN) || (state == C_TRAIN_WAIT);
  assign validation  = (state == C_VALID) || (state == C_VALID_WAIT);
  assign arch_start  = (state == C_TRAIN) || (state == C_VALID) ||
                       (state == C_IDLE && !data_setting && query_req && !query_done);
  assign arch_train  = (state == C_TRAIN);
  assign w_init_we   = (state == C_INIT);
  // only the low F bits of the LFSR state are used (a value in [-0.5, 0.5))
  assign w_init_val  = W'(signed'(rnd[F-1:0]));
  assign v_clear     = (state == C_TRAIN_WAIT) && s_train && last_train;
  assign v_err_valid = (state == C_VALID_WAIT) && s_error;
  assign v_eval      = (state == C_EVAL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      pat_idx    <= '0;
      w_init_idx <= '0;
      epoch      <= '0;
      done       <= 1'b0;
      converged  <= 1'b0;
      query_done <= 1'b0;
      query_y    <= '0;
      query_ybit <= '0;
    end else begin
      query_done <= 1'b0;
      unique case (state)
        C_IDLE: begin
          if (data_setting) begin
            state      <= C_INIT;
            w_init_idx <= '0;
            epoch      <= '0;
            done       <= 1'b0;
            converged  <= 1'b0;
          end else if (query_req && !query_done) begin
            state <= C_QUERY_WAIT;
          end
        end
        C_INIT: begin
          if (int'(w_init_idx) == NW - 1) begin
            pat_idx <= '0;
            state   <= C_TRAIN;
          end else w_init_idx <= w_init_idx + 1'b1;
        end
        C_TRAIN: state <= C_TRAIN_WAIT;
        C_TRAIN_WAIT: begin
          if (s_train) begin
            if (last_train) begin
              pat_idx <= '0;
              state   <= C_VALID;
            end else begin
              pat_idx <= pat_idx + 1'b1;
              state   <= C_TRAIN;
            end
          end
        end
        C_VALID: state <= C_VALID_WAIT;
        C_VALID_WAIT: begin
          if (s_error) begin
            if (last_valid) begin
              pat_idx <= '0;
              epoch   <= epoch + 1'b1;
              state   <= C_EVAL;
            end else begin
              pat_idx <= pat_idx + 1'b1;
              state   <= C_VALID;
            end
          end
        end
        C_EVAL: state <= C_EVAL_WAIT;
        C_EVAL_WAIT: begin
          if (v_decided) begin
            if (v_stop) begin
              done      <= 1'b1;
              converged <= v_goal;
              state     <= C_IDLE;
            end else begin
              state <= C_TRAIN;
            end
          end
        end
        C_QUERY_WAIT: begin
          if (s_error) begin
            query_y    <= y;
            query_ybit <= y_bit;
            query_done <= 1'b1;
            state      <= C_IDLE;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // Handshake rules: training and validation requests never overlap, and the
  // network only reports the end of a pass the control block is waiting for.
  a_one_set: assert property (@(posedge clk) disable iff (!rst_n) !(training && validation));
  a_train_done: assert property (@(posedge clk) disable iff (!rst_n)
                                 s_train |-> state == C_TRAIN_WAIT);
  a_error_done: assert property (@(posedge clk) disable iff (!rst_n)
                                 s_error |-> state inside {C_TRAIN_WAIT, C_VALID_WAIT, C_QUERY_WAIT});

endmodule
